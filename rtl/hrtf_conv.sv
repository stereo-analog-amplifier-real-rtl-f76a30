// hrtf_conv: the HRTF module, a 128-tap FIR filter per ear.
//
// Each ear's output is the convolution of that channel's input with the
// ear's head-related impulse response:
//     y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]
// The latest TAPS input samples of each channel sit in a chain of registers
// connected in series (x[n] in stage 0). For every new sample pair the state
// controller (hrtf_ctrl) shifts the chain, then steps k through the taps: the
// coefficient h[k] is read from the coefficient RAM (hrtf_coef_ram) and the
// chain stage k is selected, both registered, and their product is added to
// the ear's accumulator on the next cycle. The full-precision sums are
// presented on y_l/y_r while done is high; scaling them back to the codec
// width is the output stage's job.
//
// Interface and timing:
//   in_valid/in : a new stereo sample pair (one-cycle pulse).
//   done        : one cycle, TAPS + 2 cycles after in_valid; y_l/y_r valid
//                 then and held until the next in_valid.
//   coef_*      : write port of the coefficient RAM, see hrtf_coef_ram.
// The register chain, the 128 taps, the coefficient RAM, the state machine
// and done follow the design description. The left input is filtered with
// the left-ear response and the right input with the right-ear response, as
// the two paths of the block diagram show. Word widths, the sequential
// one-multiplier-per-ear schedule and the reset of the chain to zero are
// this design's choices.
module hrtf_conv
  import spatial_pkg::*;
#(
  parameter int unsigned N_TAPS = TAPS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input samples
  input  logic                          in_valid,
  input  stereo_t                       in,
  // coefficient RAM write port
  input  logic                          coef_we,
  input  logic [$clog2(N_TAPS):0]       coef_waddr,
  input  logic signed [COEF_W-1:0]      coef_wdata,
  // results
  output logic                          done,
  output logic                          busy,
  output logic signed [ACC_W-1:0]       y_l,
  output logic signed [ACC_W-1:0]       y_r
);

  localparam int unsigned AW = $clog2(N_TAPS);

  logic          shift, clr, issue;
  logic [AW-1:0] tap;

  hrtf_ctrl #(.N_TAPS(N_TAPS)) u_ctrl (
    .clk, .rst_n, .start(in_valid),
    .shift, .clr, .tap, .issue, .done, .busy
  );

  logic signed [COEF_W-1:0] h_l, h_r;

  hrtf_coef_ram #(.DEPTH(N_TAPS), .WIDTH(COEF_W)) u_coef (
    .clk,
    .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .raddr(tap), .rdata_l(h_l), .rdata_r(h_r)
  );

  // Sample chains: stage 0 holds the newest sample.
  logic signed [SAMPLE_W-1:0] x_l [N_TAPS];
  logic signed [SAMPLE_W-1:0] x_r [N_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_TAPS); i++) begin
        x_l[i] <= '0;
        x_r[i] <= '0;
      end
    end else if (shift) begin
      x_l[0] <= in.left;
      x_r[0] <= in.right;
      for (int i = 1; i < int'(N_TAPS); i++) begin
        x_l[i] <= x_l[i-1];
        x_r[i] <= x_r[i-1];
      end
    end
  end

  // Operand registers, aligned with the RAM's one-cycle read.
  logic signed [SAMPLE_W-1:0] xs_l, xs_r;
  logic                       mac_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs_l  <= '0;
      xs_r  <= '0;
      mac_v <= 1'b0;
    end else begin
      xs_l  <= x_l[tap];
      xs_r  <= x_r[tap];
      mac_v <= issue;
    end
  end

  // Multiply-accumulate, one product per ear per cycle.
  logic signed [SAMPLE_W+COEF_W-1:0] p_l, p_r;

  always_comb begin
    p_l = xs_l * h_l;
    p_r = xs_r * h_r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_l <= '0;
      y_r <= '0;
    end else if (clr) begin
      y_l <= '0;
      y_r <= '0;
    end else if (mac_v) begin
      y_l <= y_l + ACC_W'(p_l);
      y_r <= y_r + ACC_W'(p_r);
    end
  end

endmodule
