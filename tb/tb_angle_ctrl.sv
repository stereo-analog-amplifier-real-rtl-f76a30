// tb_angle_ctrl: checks buttons, switches, LEDs and the loader handshake.
// A model of the azimuth (kept here in degrees, modulo 360) follows 300
// random button presses; after each the azimuth index, azimuth in degrees
// and LEDs must match it. Wrap-around both ways past 0/360 must occur.
// Switch patterns with one switch up must select that elevation; others
// must leave it unchanged. The loader side answers requests after a random
// delay: the requested angle must be the current one when the request is
// raised, stay stable while pending, and after things settle the last
// acknowledged angle must equal the current one.
module tb_angle_ctrl;
  import spatial_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic [3:0] key_n, sw;
  logic [AZ_W-1:0] az;
  logic [EL_W-1:0] el;
  logic [8:0] az_deg, led;
  logic coef_req, coef_ack;
  angle_t req_angle, acked;
  int checks = 0, failures = 0, wraps_up = 0, wraps_down = 0, n_req = 0, n_bad_sw = 0;
  int deg, elv;

  angle_ctrl dut (.clk, .rst_n, .key_n, .sw, .az, .el, .az_deg, .led, .coef_req, .req_angle, .coef_ack);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // loader side
  logic req_d;
  angle_t req_hold;
  initial begin
    coef_ack = 0; req_d = 0;
    forever begin
      @(posedge clk);
      if (rst_n && coef_req) begin
        if (!req_d) begin
          n_req++;
          req_hold = req_angle;
        end else begin
          check(req_angle == req_hold, "requested angle changed while pending");
        end
        req_d = 1;
        repeat ($urandom % 300) @(posedge clk);
        coef_ack <= 1;
        acked = req_angle;
        @(posedge clk);
        coef_ack <= 0;
        req_d = 0;
        @(posedge clk);
      end
    end
  end

  task automatic press(input int b);
    @(negedge clk); key_n[b] = 0;
    repeat (5) @(negedge clk); key_n[b] = 1;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    key_n = 4'hF; sw = 4'b0001; deg = 0; elv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(az == 0 && led == 0, "azimuth not 0 after reset");
    for (int i = 0; i < 300; i++) begin
      int b, nd;
      b = $urandom % 4;
      case (b)
        0: nd = deg + 5;
        1: nd = deg - 5;
        2: nd = deg + 90;
        default: nd = deg - 90;
      endcase
      if (nd >= 360) wraps_up++;
      if (nd < 0) wraps_down++;
      deg = (nd + 360) % 360;
      press(b);
      check(int'(az_deg) == deg && int'(led) == deg && int'(az) * 5 == deg,
            $sformatf("after button %0d: %0d degrees, want %0d", b, az_deg, deg));
      if (i % 10 == 5) begin
        logic [3:0] p;
        p = 4'($urandom);
        sw = p;
        repeat (5) @(negedge clk);
        if (p == 4'b0001 || p == 4'b0010 || p == 4'b0100 || p == 4'b1000) begin
          elv = (p == 4'b0001) ? 0 : (p == 4'b0010) ? 1 : (p == 4'b0100) ? 2 : 3;
        end else n_bad_sw++;
        check(int'(el) == elv, $sformatf("switches %b: elevation %0d want %0d", p, el, elv));
      end
      if (i % 37 == 0) repeat (400) @(negedge clk);
    end
    repeat (1500) @(negedge clk);
    check(!coef_req, "request still pending at the end");
    check(acked.az == az && acked.el == el, "last loaded angle is not the current angle");
    check(wraps_up > 0 && wraps_down > 0, "wrap-around not exercised");
    check(n_bad_sw > 0, "invalid switch pattern not exercised");
    check(n_req > 5, $sformatf("only %0d requests", n_req));
    $display("requests %0d, wraps %0d/%0d, invalid switch patterns %0d", n_req, wraps_up, wraps_down, n_bad_sw);
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
