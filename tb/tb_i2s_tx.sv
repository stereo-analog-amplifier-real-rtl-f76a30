// tb_i2s_tx: checks the DAC-side serial transmitter against the codec model.
// Once per frame, at a varying point inside the left word (odd frames) or
// the right word (even frames) of frame n, a new pair is handed to the
// transmitter; the model must receive exactly that
// pair, left and right, in frame n + 1, so a pair is never split across
// frames. In some frames two pairs are handed over: only the later is sent.
module tb_i2s_tx;
  import spatial_pkg::*;
  import tb_hrtf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic run = 1'b0, bclk, lrck, adcdat, dacdat, dac_strobe, sda_pull;
  int frame, dac_frame, n_writes, n_transfers;
  logic [23:0] dac_l, dac_r;
  logic [8:0] regs [16];
  stereo_t in;
  logic in_valid;
  int checks = 0, failures = 0;
  stereo_t sent [200];

  wm8731_model codec (.run, .bclk, .lrck, .adcdat, .dacdat, .frame,
    .adc_l(24'h0), .adc_r(24'h0), .dac_l, .dac_r, .dac_frame, .dac_strobe,
    .scl(1'b1), .sda(1'b1), .sda_pull, .regs, .n_writes, .n_transfers);

  i2s_tx dut (.clk, .rst_n, .in_valid, .in, .bclk, .lrck, .dat(dacdat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge dac_strobe) if (dac_frame >= 1 && dac_frame < 200) begin
    check(dac_l == sent[dac_frame-1].left && dac_r == sent[dac_frame-1].right,
          $sformatf("frame %0d: got %h %h want %h %h", dac_frame, dac_l, dac_r,
                    sent[dac_frame-1].left, sent[dac_frame-1].right));
  end

  initial begin
    in_valid = 0; in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    for (int n = 0; n < 120; n++) begin
      wait (frame == n);
      if (n % 2 == 0) @(posedge lrck);   // odd frames: during the left word
      repeat (20 + (n * 37) % 400) @(posedge clk);
      if (n % 4 == 3) begin            // a pair that is overwritten before use
        in_valid <= 1; in <= '{left: 24'h0BAD00, right: 24'h00BAD0};
        @(posedge clk);
        in_valid <= 0;
        repeat (5) @(posedge clk);
      end
      sent[n].left  = 24'(adc_word(n, 0, n % 2 == 0));
      sent[n].right = 24'(adc_word(n, 1, n % 3 == 0));
      in_valid <= 1; in <= sent[n];
      @(posedge clk);
      in_valid <= 0;
    end
    wait (dac_frame == 120);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
