// tb_hrtf_coef_ram: checks the coefficient RAM.
// Fills both ears with random words, reads every tap back and checks both
// ears' words arrive exactly one clock after the address; checks that the
// write port's channel bit selects the ear, and that a read of a word being
// written in the same clock returns the old word.
module tb_hrtf_coef_ram;
  localparam int DEPTH = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   we;
  logic [7:0]             waddr;
  logic signed [15:0]     wdata;
  logic [6:0]             raddr;
  logic signed [15:0]     rdata_l, rdata_r;
  int checks = 0, failures = 0;
  logic signed [15:0] ml [DEPTH];
  logic signed [15:0] mr [DEPTH];

  hrtf_coef_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata_l, .rdata_r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk);
    for (int ch = 0; ch < 2; ch++)
      for (int k = 0; k < DEPTH; k++) begin
        we = 1; waddr = 8'(ch * DEPTH + k); wdata = 16'($urandom);
        if (ch == 0) ml[k] = wdata; else mr[k] = wdata;
        @(negedge clk);
      end
    we = 0;
    for (int k = 0; k < DEPTH; k++) begin
      raddr = 7'(k);
      @(posedge clk); #1;
      check(rdata_l == ml[k] && rdata_r == mr[k],
            $sformatf("read tap %0d: %h %h want %h %h", k, rdata_l, rdata_r, ml[k], mr[k]));
    end
    // latency: the output must not change before the clock edge
    raddr = 7'd5;
    @(posedge clk); #1;
    @(negedge clk);
    raddr = 7'd9;
    #1 check(rdata_l == ml[5], "read data changed before the clock edge");
    // read during write of the same word returns the old word
    @(negedge clk);
    raddr = 7'd9; we = 1; waddr = 8'd9; wdata = ~ml[9];
    @(posedge clk); #1;
    check(rdata_l == ml[9], "read-during-write did not return the old word");
    ml[9] = ~ml[9];
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    check(rdata_l == ml[9] && rdata_r == mr[9], "new word not read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
