// tb_i2s_rx: checks the ADC-side serial receiver against the codec model.
// The model, as bus master, sends frames of pseudo-random 24-bit words at
// the real bit rate (2.8224 MHz bit clock against a 50 MHz system clock).
// Every pair the receiver presents must equal the next frame the model sent,
// in order with none missing, the first pair being frame 0 (the model's
// leading lone right word must be dropped), and out_valid must come once
// per frame.
module tb_i2s_rx;
  import spatial_pkg::*;
  import tb_hrtf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic run = 1'b0, bclk, lrck, adcdat, dac_strobe, sda_pull;
  int frame, dac_frame, n_writes, n_transfers;
  logic [23:0] adc_l, adc_r, dac_l, dac_r;
  logic [8:0] regs [16];
  stereo_t out;
  logic out_valid;
  int checks = 0, failures = 0, got = 0;

  wm8731_model codec (.run, .bclk, .lrck, .adcdat, .dacdat(1'b0), .frame,
    .adc_l, .adc_r, .dac_l, .dac_r, .dac_frame, .dac_strobe,
    .scl(1'b1), .sda(1'b1), .sda_pull, .regs, .n_writes, .n_transfers);

  always_comb begin
    adc_l = 24'(adc_word(frame, 0, frame % 3 == 1));
    adc_r = 24'(adc_word(frame, 1, frame % 5 == 2));
  end

  i2s_rx dut (.clk, .rst_n, .bclk, .lrck, .dat(adcdat), .out, .out_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    check(out.left == 24'(adc_word(got, 0, got % 3 == 1)) && out.right == 24'(adc_word(got, 1, got % 5 == 2)),
          $sformatf("pair %0d: %h %h", got, out.left, out.right));
    check(frame == got + 1 || frame == got, $sformatf("pair %0d arrived in model frame %0d", got, frame));
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    wait (frame == 60);
    @(posedge clk);
    check(got == 60 || got == 59, $sformatf("%0d pairs for 60 frames", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
