// tb_hrtf_conv: checks the HRTF module (128-tap filter per ear).
// Loads random coefficients into both ears through the write port, feeds a
// stream of random stereo samples spaced like a real sample stream, and for
// each sample compares y_l/y_r with the sum of products computed here from
// the samples it sent (zero before the first). It checks that done comes
// exactly TAPS + 2 clocks after each sample and that a second coefficient set,
// written while the filter is idle, is used from the next sample on.
module tb_hrtf_conv;
  import spatial_pkg::*;
  localparam int N = TAPS;
  localparam int NS = 300;      // samples

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid, coef_we, done, busy;
  stereo_t                 in;
  logic [7:0]              coef_waddr;
  logic signed [15:0]      coef_wdata;
  logic signed [ACC_W-1:0] y_l, y_r;
  int checks = 0, failures = 0;

  int hl [N], hr [N];
  int xl [NS], xr [NS];

  hrtf_conv dut (.clk, .rst_n, .in_valid, .in, .coef_we, .coef_waddr, .coef_wdata,
                 .done, .busy, .y_l, .y_r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic load_coefs();
    for (int ch = 0; ch < 2; ch++)
      for (int k = 0; k < N; k++) begin
        int v;
        v = int'($urandom % 65536) - 32768;
        if (ch == 0) hl[k] = v; else hr[k] = v;
        @(negedge clk);
        coef_we = 1; coef_waddr = 8'(ch * N + k); coef_wdata = 16'(v);
      end
    @(negedge clk);
    coef_we = 0;
  endtask

  function automatic longint ref_sum(input int n, input bit right);
    longint s = 0;
    for (int k = 0; k < N; k++)
      if (n - k >= 0)
        s += longint'(right ? xr[n-k] : xl[n-k]) * longint'(right ? hr[k] : hl[k]);
    return s;
  endfunction

  initial begin
    in_valid = 0; in = '0; coef_we = 0; coef_waddr = 0; coef_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs();
    for (int n = 0; n < NS; n++) begin
      int lat;
      if (n == NS / 2) load_coefs();
      xl[n] = int'($urandom % (1 << 24)) - (1 << 23);
      xr[n] = int'($urandom % (1 << 24)) - (1 << 23);
      if (n % 50 == 7) begin xl[n] = 8388607; xr[n] = -8388608; end
      @(negedge clk);
      in_valid = 1; in.left = 24'(xl[n]); in.right = 24'(xr[n]);
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!done && lat < 1000) begin
        @(negedge clk);
        lat++;
      end
      check(lat == N + 2, $sformatf("sample %0d: done after %0d clocks, want %0d", n, lat, N + 2));
      check(y_l == ACC_W'(ref_sum(n, 0)), $sformatf("sample %0d left %0d want %0d", n, y_l, ref_sum(n, 0)));
      check(y_r == ACC_W'(ref_sum(n, 1)), $sformatf("sample %0d right %0d want %0d", n, y_r, ref_sum(n, 1)));
      repeat ($urandom % 20) @(negedge clk);
    end
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
