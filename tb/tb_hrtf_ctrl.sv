// tb_hrtf_ctrl: checks the convolution state controller.
// For several starts it checks that shift and clr come only in the start
// cycle, that issue is high for exactly TAPS cycles carrying taps 0..TAPS-1 in
// order, that done is a single pulse exactly TAPS + 2 cycles after start, that
// busy covers the whole run, and that a start while busy is ignored.
module tb_hrtf_ctrl;
  localparam int N = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, shift, clr, issue, done, busy;
  logic [6:0] tap;
  int checks = 0, failures = 0;

  hrtf_ctrl dut (.clk, .rst_n, .start, .shift, .clr, .tap, .issue, .done, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(input bit extra_start);
    int cyc, n_issue, n_done, n_shift, done_at, expect_tap;
    bit order_ok;
    @(negedge clk);
    start = 1;
    #1 check(shift && clr, "shift/clr not high with start in idle");
    @(negedge clk);
    start = 0;
    n_issue = 0; n_done = 0; n_shift = 0; done_at = -1; expect_tap = 0; order_ok = 1;
    for (cyc = 1; cyc < N + 10; cyc++) begin
      if (extra_start && cyc == 40) start = 1; else start = 0;
      #1;
      if (shift || clr) n_shift++;
      if (issue) begin
        if (int'(tap) != expect_tap) order_ok = 0;
        expect_tap++;
        n_issue++;
      end
      if (done) begin
        n_done++;
        done_at = cyc;
      end
      if (cyc <= N + 1) check(busy, $sformatf("busy low in cycle %0d", cyc));
      @(negedge clk);
    end
    start = 0;
    check(n_issue == N, $sformatf("issue cycles %0d", n_issue));
    check(order_ok, "taps out of order");
    check(n_done == 1, $sformatf("done pulses %0d", n_done));
    check(done_at == N + 2, $sformatf("done at %0d, want %0d", done_at, N + 2));
    check(n_shift == 0, "shift/clr during a run");
    check(!busy, "busy after the run");
  endtask

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 check(!busy && !issue && !done, "not idle after reset");
    run_one(0);
    run_one(1);
    run_one(0);
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
