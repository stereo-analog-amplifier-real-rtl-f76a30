// nios_loader_model: behavioural model of the coefficient loader, the
// embedded processor's program, for simulation only.
//
// When coef_req is high, reset (rst_n low) is over and the model is idle it waits DELAY clocks, then
// writes the two ears' N_TAPS coefficients for req_angle, one word per clock
// (left ear at addresses 0..N_TAPS-1, right ear at N_TAPS..2*N_TAPS-1),
// values from tb_hrtf_pkg::coef_value, then pulses coef_ack for one clock.
// loads counts the completed loads; writing is high while it writes.
module nios_loader_model
  import spatial_pkg::*;
  import tb_hrtf_pkg::*;
#(
  parameter int N_TAPS = 128,
  parameter int DELAY  = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_req,
  input  angle_t                    req_angle,
  output logic                      coef_ack,
  output logic                      coef_we,
  output logic [$clog2(N_TAPS):0]   coef_waddr,
  output logic signed [COEF_W-1:0]  coef_wdata,
  output logic                      writing,
  output int                        loads
);

  initial begin
    coef_ack = 1'b0; coef_we = 1'b0; coef_waddr = '0; coef_wdata = '0;
    writing = 1'b0; loads = 0;
    forever begin
      @(posedge clk);
      if (rst_n && coef_req) begin
        angle_t a;
        a = req_angle;
        repeat (DELAY) @(posedge clk);
        writing <= 1'b1;
        for (int ch = 0; ch < 2; ch++)
          for (int k = 0; k < N_TAPS; k++) begin
            coef_we    <= 1'b1;
            coef_waddr <= ($clog2(N_TAPS)+1)'(ch * N_TAPS + k);
            coef_wdata <= COEF_W'(coef_value(int'(a.az), int'(a.el), ch, k));
            @(posedge clk);
          end
        coef_we  <= 1'b0;
        coef_ack <= 1'b1;
        @(posedge clk);
        coef_ack <= 1'b0;
        writing  <= 1'b0;
        loads++;
        @(posedge clk);
      end
    end
  end

endmodule
