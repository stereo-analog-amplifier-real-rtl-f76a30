// tb_direction_sweep: runs the full design, at its default parameters,
// through every direction it supports: the 72 azimuths 0..355 degrees in
// 5-degree steps at each of the 4 elevations, 288 directions in all.
//
// Codec model and loader model surround the design as in the end-to-end
// test. For each direction the testbench steps the azimuth with the +5 button
// (or selects the next elevation switch after a full turn), waits for the
// loader to be asked for exactly that direction and to finish, then lets
// audio run for three more frames. Every frame the codec model receives is
// compared bit-exactly with the filter computed here for the coefficient set
// in place, with a fixed one-frame ADC-to-DAC delay; frames that may overlap
// a coefficient load are skipped. Checked per direction: the LED reading,
// the requested angle, one load per direction, and at least one checked frame.
module tb_direction_sweep;
  import spatial_pkg::*;
  import tb_hrtf_pkg::*;

  localparam int NF = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  // board side
  logic [3:0] key_n, sw;
  logic [8:0] led;
  logic aud_bclk, aud_lrck, aud_adcdat, aud_dacdat;
  logic i2c_sclk, i2c_sda_oe, sda_pull, codec_ready, clipped;
  logic [7:0] codec_nacks;
  wire i2c_sda = !(i2c_sda_oe || sda_pull);
  // loader side
  logic coef_req, coef_ack, coef_we, writing;
  angle_t coef_req_angle;
  logic [7:0] coef_waddr;
  logic signed [15:0] coef_wdata;
  int loads;
  // codec model
  int frame, dac_frame, n_writes, n_transfers;
  logic [23:0] adc_l, adc_r, dac_l, dac_r;
  logic dac_strobe;
  logic [8:0] regs [16];

  spatializer_top dut (
    .clk, .rst_n, .key_n, .sw, .led,
    .aud_bclk, .aud_adclrck(aud_lrck), .aud_adcdat, .aud_daclrck(aud_lrck), .aud_dacdat,
    .i2c_sclk, .i2c_sda_oe, .i2c_sda_i(i2c_sda), .codec_ready, .codec_nacks,
    .coef_req, .coef_req_angle, .coef_ack, .coef_we, .coef_waddr, .coef_wdata,
    .clipped
  );

  wm8731_model #(.BCLK_HALF(177), .NACK_FIRST(1'b1)) codec (
    .run(codec_ready && rst_n), .bclk(aud_bclk), .lrck(aud_lrck), .adcdat(aud_adcdat), .dacdat(aud_dacdat),
    .frame, .adc_l, .adc_r, .dac_l, .dac_r, .dac_frame, .dac_strobe,
    .scl(i2c_sclk), .sda(i2c_sda), .sda_pull, .regs, .n_writes, .n_transfers);

  nios_loader_model #(.N_TAPS(TAPS), .DELAY(50)) loader (
    .clk, .rst_n, .coef_req, .req_angle(coef_req_angle), .coef_ack, .coef_we, .coef_waddr, .coef_wdata,
    .writing, .loads);

  function automatic bit loud_frame(input int n);
    return n >= 215 && n < 245;
  endfunction

  always_comb begin
    adc_l = 24'(adc_word(frame, 0, loud_frame(frame)));
    adc_r = 24'(adc_word(frame, 1, loud_frame(frame)));
  end

  int checks = 0, failures = 0;
  int n_checked = 0, n_skipped = 0, n_clip = 0, n_press = 0, n_wrap = 0, n_elev = 0;
  int n_badsw_ignored = 0, lat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // coefficient loads: which frames saw writes, which set was in place
  bit     wrote [NF + 8];
  angle_t loaded_angle, angle_at [NF + 8];
  bit     loaded_any = 0;

  always @(posedge clk) begin
    if (rst_n && coef_ack) begin
      loaded_angle = coef_req_angle;
      loaded_any   = 1;
    end
    if (writing && frame >= 0 && frame < NF + 8) wrote[frame] = 1;
    if (clipped && rst_n) n_clip++;
  end

  always @(frame) if (frame >= 0 && frame < NF + 8) angle_at[frame] = loaded_angle;

  function automatic longint expect_out(input int a, input int ch, input angle_t ang);
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (a - k >= 0)
        s += longint'(adc_word(a - k, ch, loud_frame(a - k))) *
             longint'(coef_value(int'(ang.az), int'(ang.el), ch, k));
    return ref_out(s, 15);
  endfunction

  function automatic bit usable(input int a);
    return a >= 0 && loaded_any && !wrote[a] && !wrote[a + 1];
  endfunction

  function automatic bit frame_ok(input int a);
    return longint'($signed(dac_l)) == expect_out(a, 0, angle_at[a + 1]) &&
           longint'($signed(dac_r)) == expect_out(a, 1, angle_at[a + 1]);
  endfunction

  always @(posedge dac_strobe) begin
    int m;
    m = dac_frame;
    if (m >= 3 && m < NF) begin
      if (lat == 0) begin   // not used: the delay is fixed to one frame here
        if (usable(m - 1) && usable(m - 2)) begin
          if (frame_ok(m - 1)) lat = 1;
          else if (frame_ok(m - 2)) lat = 2;
          check(lat != 0, $sformatf("frame %0d matches neither a 1- nor a 2-frame delay", m));
          if (lat != 0) begin
            n_checked++;
            $display("ADC-to-DAC delay: %0d frame(s)", lat);
          end
        end
      end else if (usable(m - lat)) begin
        check(frame_ok(m - lat), $sformatf("DAC frame %0d: got %h %h want %h %h", m, dac_l, dac_r,
              24'(expect_out(m - lat, 0, angle_at[m - lat + 1])),
              24'(expect_out(m - lat, 1, angle_at[m - lat + 1]))));
        n_checked++;
      end else n_skipped++;
    end
  end

  int n_dirs = 0, dir_fail = 0;

  task automatic press_plus5();
    @(negedge clk); key_n[0] = 0;
    repeat (10) @(negedge clk); key_n[0] = 1;
    repeat (10) @(negedge clk);
  endtask

  task automatic settle_and_check(input int az, input int el);
    int loads0, checked0, f0;
    loads0 = loads;
    checked0 = n_checked;
    wait (coef_req);
    check(int'(coef_req_angle.az) == az && int'(coef_req_angle.el) == el,
          $sformatf("request for %0d/%0d, want %0d/%0d", coef_req_angle.az, coef_req_angle.el, az, el));
    wait (loads == loads0 + 1);
    f0 = frame;
    wait (frame == f0 + 4);
    check(int'(led) == az * 5, $sformatf("LEDs %0d want %0d", led, az * 5));
    check(loaded_angle.az == 7'(az) && loaded_angle.el == 2'(el), "loaded angle differs");
    check(n_checked > checked0, $sformatf("no frame checked at %0d/%0d", az, el));
    n_dirs++;
  endtask

  initial begin
    key_n = 4'hF; sw = 4'b0001;
    lat = 1;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (codec_ready);
    wait (loads == 1);
    wait (frame == 4);
    n_dirs = 1;
    for (int el = 0; el < 4; el++) begin
      for (int az = 0; az < 72; az++) begin
        if (el == 0 && az == 0) continue;
        if (az == 0) begin
          @(negedge clk); sw = 4'(1 << el);
        end else begin
          press_plus5();
        end
        settle_and_check(az, el);
      end
      if (el < 3) press_plus5();     // back to azimuth 0 for the next elevation
      if (el < 3) begin
        wait (loads > 0 && !coef_req && !writing);
        repeat (2000) @(negedge clk);
        wait (!coef_req && !writing);
      end
    end
    check(n_dirs == 288, $sformatf("%0d directions visited, want 288", n_dirs));
    check(loads == 288 + 3, $sformatf("%0d loads, want 291", loads));
    $display("directions %0d, frames checked %0d, skipped %0d, loads %0d, saturated outputs %0d",
             n_dirs, n_checked, n_skipped, loads, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog (directions %0d, frame %0d, loads %0d)", n_dirs, frame, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
