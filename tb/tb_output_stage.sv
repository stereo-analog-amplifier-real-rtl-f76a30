// tb_output_stage: checks the output stage's scaling and saturation.
// Drives random sums over the accumulator's whole range, including values
// just inside and just outside the 24-bit range after the shift, and checks
// the registered output against shift-and-saturate computed here, the
// one-clock out_valid pulse, the clipped flag, and that the output holds
// while en is low.
module tb_output_stage;
  import spatial_pkg::*;
  import tb_hrtf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    en, out_valid, clipped;
  logic signed [ACC_W-1:0] y_l, y_r;
  stereo_t                 out;
  int checks = 0, failures = 0, n_clip = 0;

  output_stage dut (.clk, .rst_n, .en, .y_l, .y_r, .out, .out_valid, .clipped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic longint pick();
    longint v;
    case ($urandom % 5)
      0: v = (longint'(8388607) <<< 15) + longint'($urandom % 65536) - 32768;
      1: v = (-longint'(8388608) <<< 15) + longint'($urandom % 65536) - 32768;
      2: v = longint'($signed($urandom)) <<< 14;
      default: v = longint'($signed($urandom)) <<< ($urandom % 8);
    endcase
    return v;
  endfunction

  initial begin
    en = 0; y_l = 0; y_r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      longint a, b, ea, eb;
      bit ec;
      a = pick(); b = pick();
      ea = ref_out(a, 15); eb = ref_out(b, 15);
      ec = (ea != (a >>> 15)) || (eb != (b >>> 15));
      @(negedge clk);
      en = 1; y_l = ACC_W'(a); y_r = ACC_W'(b);
      @(negedge clk);
      en = 0; y_l = ACC_W'(pick()); y_r = ACC_W'(pick());
      check(out_valid, "out_valid missing");
      check(longint'(out.left) == ea && longint'(out.right) == eb,
            $sformatf("in %0d %0d out %0d %0d want %0d %0d", a, b, out.left, out.right, ea, eb));
      check(clipped == ec, "clipped flag wrong");
      if (ec) n_clip++;
      @(negedge clk);
      check(!out_valid && longint'(out.left) == ea, "output did not hold");
    end
    check(n_clip > 100, "too few saturating cases");
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
