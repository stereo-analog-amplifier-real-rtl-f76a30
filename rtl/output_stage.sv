// output_stage: output module between the convolution and the DAC.
//
// The HRTF module's done signal is its enable: on done it takes the two
// full-precision sums, removes the coefficient fraction bits, applies a
// further normalising right shift of NORM_SHIFT bits, and saturates the
// result to the codec's word width. Saturation replaces the wrap-around a
// plain truncation would give on loud, wide-dynamic-range material, which is
// heard as popping.
//
// Interface and timing:
//   en, y_l, y_r : done and the sums from hrtf_conv.
//   out          : registered stereo word, updated one clock after en and
//                  held until the next en.
//   out_valid    : one-cycle pulse with each update.
//   clipped      : one-cycle pulse when either channel saturated.
// That an output module is enabled by done, and that the output must be
// normalised, follow the design description; the shift-and-saturate method
// and NORM_SHIFT = 0 are this design's choices.
module output_stage
  import spatial_pkg::*;
#(
  parameter int unsigned NORM_SHIFT = 0   // extra attenuation, in bits (6 dB each)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [ACC_W-1:0]  y_l,
  input  logic signed [ACC_W-1:0]  y_r,
  output stereo_t                  out,
  output logic                     out_valid,
  output logic                     clipped
);

  localparam int unsigned SH = COEF_FRAC + NORM_SHIFT;

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (SAMPLE_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (SAMPLE_W - 1));

  function automatic logic signed [SAMPLE_W:0] scale(input logic signed [ACC_W-1:0] y);
    // returns {saturated?, value}
    logic signed [ACC_W-1:0] s;
    s = y >>> SH;
    if (s > MAXV)      return {1'b1, MAXV[SAMPLE_W-1:0]};
    else if (s < MINV) return {1'b1, MINV[SAMPLE_W-1:0]};
    else               return {1'b0, s[SAMPLE_W-1:0]};
  endfunction

  logic signed [SAMPLE_W:0] sl, sr;

  always_comb begin
    sl = scale(y_l);
    sr = scale(y_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
      clipped   <= 1'b0;
    end else begin
      out_valid <= en;
      clipped   <= en && (sl[SAMPLE_W] || sr[SAMPLE_W]);
      if (en) begin
        out.left  <= sl[SAMPLE_W-1:0];
        out.right <= sr[SAMPLE_W-1:0];
      end
    end
  end

endmodule
