// tb_codec_config: checks the codec set-up sequence against the codec model.
// With a short power-up wait and a fast bus, the model leaves the first
// transfer unacknowledged; the sequencer must repeat it, count one nack and
// then write all eleven registers, and the model's register file must end
// up holding the set-up values (44.1 kHz, line-in, master, I2S 24-bit,
// active). done must not rise before the wait and the last write.
module tb_codec_config;
  localparam int QDIV = 3;
  localparam int WAITC = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic scl, sda_oe, sda_pull, done;
  logic [7:0] nacks;
  wire sda = !(sda_oe || sda_pull);
  logic bclk, lrck, adcdat, dac_strobe;
  int frame, dac_frame, n_writes, n_transfers;
  logic [23:0] dac_l, dac_r;
  logic [8:0] regs [16];
  int checks = 0, failures = 0;

  wm8731_model #(.NACK_FIRST(1'b1)) codec (.run(1'b0), .bclk, .lrck, .adcdat, .dacdat(1'b0), .frame,
    .adc_l(24'h0), .adc_r(24'h0), .dac_l, .dac_r, .dac_frame, .dac_strobe,
    .scl, .sda, .sda_pull, .regs, .n_writes, .n_transfers);

  codec_config #(.QDIV(QDIV), .WAIT_CYCLES(WAITC)) dut (.clk, .rst_n, .scl, .sda_oe, .sda_i(sda),
    .done, .nacks);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int cyc;
    logic [8:0] want [10];
    want = '{9'h017, 9'h017, 9'h079, 9'h079, 9'h012, 9'h000, 9'h000, 9'h04A, 9'h020, 9'h001};
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (!done && cyc < 50000) begin
      @(negedge clk);
      cyc++;
      if (cyc == WAITC - 2) check(n_transfers == 0 && scl && !sda_oe, "bus used during the wait");
    end
    check(done, "done never rose");
    check(cyc >= WAITC + 12 * 116 * QDIV, $sformatf("done after only %0d clocks", cyc));
    check(n_transfers == 12, $sformatf("%0d transfers, want 12", n_transfers));
    check(n_writes == 12, $sformatf("%0d decoded writes, want 12", n_writes));
    check(nacks == 8'd1, $sformatf("nacks = %0d", nacks));
    for (int r = 0; r < 10; r++)
      check(regs[r] == want[r], $sformatf("R%0d = %h want %h", r, regs[r], want[r]));
    check(regs[15] == 9'h000, "reset register not written");
    repeat (2000) @(negedge clk);
    check(done && n_transfers == 12, "bus activity after done");
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
