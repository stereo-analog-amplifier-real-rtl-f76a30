// tb_i2c_writer: checks the two-wire register write against the codec
// model's bus slave.
// Sends several writes with random bytes (QDIV = 4 to keep it short): the
// model must decode each as address 0x1A plus the two bytes, done must come
// exactly 116 * QDIV clocks (29 bus bits) after start, busy must cover the
// transfer, and the clock line must stay high when idle. The first transfer
// is left unacknowledged by the model: nack must be reported for it only.
module tb_i2c_writer;
  localparam int QDIV = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic start, busy, done, nack, scl, sda_oe, sda_pull;
  logic [7:0] b1, b2;
  wire sda = !(sda_oe || sda_pull);
  logic bclk, lrck, adcdat, dac_strobe;
  int frame, dac_frame, n_writes, n_transfers;
  logic [23:0] dac_l, dac_r;
  logic [8:0] regs [16];
  int checks = 0, failures = 0;

  wm8731_model #(.NACK_FIRST(1'b1)) codec (.run(1'b0), .bclk, .lrck, .adcdat, .dacdat(1'b0), .frame,
    .adc_l(24'h0), .adc_r(24'h0), .dac_l, .dac_r, .dac_frame, .dac_strobe,
    .scl, .sda, .sda_pull, .regs, .n_writes, .n_transfers);

  i2c_writer #(.QDIV(QDIV)) dut (.clk, .rst_n, .start, .dev_addr(7'h1A), .byte1(b1), .byte2(b2),
    .busy, .done, .nack, .scl, .sda_oe, .sda_i(sda));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    start = 0; b1 = 0; b2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(scl && !sda_oe && !busy, "bus not idle after reset");
    for (int t = 0; t < 8; t++) begin
      int cyc;
      logic [3:0] ra;
      ra = 4'(t + 2);
      @(negedge clk);
      b1 = {3'b000, ra, 1'(t)}; b2 = 8'($urandom);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 10000) begin
        check(busy, "busy low during a transfer");
        @(negedge clk);
        cyc++;
      end
      // cyc counts from the first negedge after the edge that took start
      check(cyc == 116 * QDIV + 1, $sformatf("transfer %0d took %0d clocks, want %0d", t, cyc - 1, 116 * QDIV));
      check(nack == (t == 0), $sformatf("transfer %0d nack=%0b", t, nack));
      @(negedge clk);
      check(!busy && scl && !sda_oe, "bus not released after a transfer");
      check(n_transfers == t + 1, "model saw a different number of transfers");
      if (t > 0)
        check(regs[ra] == {1'(t), b2}, $sformatf("register %0d = %h want %h", ra, regs[ra], {1'(t), b2}));
      repeat (7) @(negedge clk);
    end
    check(n_writes == 8, $sformatf("model decoded %0d writes", n_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
