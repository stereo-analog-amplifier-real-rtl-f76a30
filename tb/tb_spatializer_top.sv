// tb_spatializer_top: end-to-end test of the spatializer at its default
// parameters (128 taps, 50 MHz clock, 100 kHz control bus, 1 ms codec wait).
//
// Around the design sit the codec model (bus master at 44.1 kHz frames,
// 2.8224 MHz bit clock, control-bus slave that refuses the first transfer)
// and the coefficient-loader model. The run:
//   * the codec is set up; its audio clocks start when codec_ready rises;
//   * the initial request (azimuth 0, elevation 0) is served by the loader;
//   * about 270 frames of pseudo-random audio stream through; the buttons
//     step the azimuth (+5, +90, -90 twice so it wraps below 0, -5), the
//     switches change the elevation, an invalid switch pattern is tried,
//     and at elevation 3 a loud passage drives the output into saturation.
// Every frame the codec model receives is compared with the filter output
// computed here from the frames it sent and the coefficient set loaded at the
// time, shifted by 15 bits and saturated to 24 bits; frames whose filter run
// may have overlapped a coefficient load are skipped and counted. The
// ADC-to-DAC delay must be the same whole number of frames (1 or 2)
// throughout. Each mechanism must occur at least once: control-bus retry,
// coefficient load, button step, wrap-around, elevation change, ignored
// switch pattern, output saturation, checked frames.
module tb_spatializer_top;
  import spatial_pkg::*;
  import tb_hrtf_pkg::*;

  localparam int NF = 270;

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
      if (lat == 0) begin
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

  task automatic press(input int b, input int delta);
    int prev_deg, new_deg;
    prev_deg = int'(led);
    @(negedge clk); key_n[b] = 0;
    repeat (10) @(negedge clk); key_n[b] = 1;
    repeat (10) @(negedge clk);
    new_deg = int'(led);
    n_press++;
    if (prev_deg + delta < 0 || prev_deg + delta >= 360) n_wrap++;
    check(new_deg == (prev_deg + delta + 360) % 360,
          $sformatf("button %0d: %0d -> %0d degrees", b, prev_deg, new_deg));
  endtask

  task automatic set_sw(input logic [3:0] p, input bit valid);
    int loads0;
    loads0 = loads;
    @(negedge clk); sw = p;
    if (valid) n_elev++;
    if (!valid) begin
      repeat (2000) @(negedge clk);
      check(!coef_req && loads == loads0, "invalid switch pattern caused a reload");
      if (!coef_req && loads == loads0) n_badsw_ignored++;
    end
  endtask

  initial begin
    key_n = 4'hF; sw = 4'b0001;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (codec_ready);
    check(codec_nacks == 8'd1, $sformatf("codec_nacks = %0d, want 1", codec_nacks));
    check(regs[7] == 9'h04A && regs[8] == 9'h020 && regs[4] == 9'h012 && regs[9] == 9'h001,
          "codec registers not set up");
    check(loads == 1 && loaded_angle == '0, "initial coefficient set not loaded");
    wait (frame == 30);  press(0, 5);
    wait (frame == 55);  press(2, 90);
    wait (frame == 80);  press(3, -90);  press(3, -90);
    wait (frame == 105); press(1, -5);
    wait (frame == 130); set_sw(4'b0100, 1);
    wait (frame == 160); set_sw(4'b0110, 0);
    wait (frame == 185); set_sw(4'b1000, 1);
    wait (frame == NF);
    @(posedge clk);
    check(int'(led) == 270, $sformatf("final azimuth %0d, want 270", led));
    check(loaded_angle.az == 7'd54 && loaded_angle.el == 2'd3, "final coefficient set is not 270/elevation 3");
    check(n_checked > 200, $sformatf("only %0d frames checked", n_checked));
    check(loads == 8, $sformatf("%0d coefficient loads, want 8", loads));
    check(n_press == 5 && n_wrap > 0, "buttons or wrap-around not exercised");
    check(n_elev == 2 && n_badsw_ignored == 1, "elevation switching not exercised");
    check(n_clip > 0, "output saturation never happened");
    $display("frames checked %0d, skipped during loads %0d, loads %0d, presses %0d, wraps %0d",
             n_checked, n_skipped, loads, n_press, n_wrap);
    $display("elevation changes %0d, ignored switch patterns %0d, saturated outputs %0d, bus retries %0d",
             n_elev, n_badsw_ignored, n_clip, codec_nacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
