// i2s_tx: sends the processed samples to the codec's DAC ("Audio DAC" side).
//
// The codec drives the bit clock (bclk) and the DAC frame clock (lrck, low for
// the left word). Both are synchronised into the system clock domain. At a
// rising bit-clock edge where the frame clock has changed, the word for the
// new channel is loaded: at the start of the left word the latest pair is
// copied aside and its left word loaded, at the start of the right word
// the right word of that same copy, so a frame always carries one pair; on each of the next W
// falling edges one bit is put on dat, most significant first, so that the
// codec samples the MSB at the second rising edge after the frame edge
// (I2S). After the W bits dat stays low.
//
// Interface and timing:
//   in_valid, in : a new stereo pair to play; it is held and sent in the
//                  next frame whose left word starts after it arrived.
//   bclk, lrck   : codec pins, asynchronous, slower than clk/4.
//   dat          : serial data to the codec, changes 3 to 4 clocks after a
//                  falling bit-clock edge.
// The 24-bit words follow the design description; I2S format and codec
// master mode are this design's choices.
module i2s_tx
  import spatial_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  stereo_t         in,
  input  logic            bclk,
  input  logic            lrck,
  output logic            dat
);

  logic bclk_s, lrck_s, bclk_d;

  sync2 u_sb (.clk, .rst_n, .d(bclk), .q(bclk_s));
  sync2 u_sl (.clk, .rst_n, .d(lrck), .q(lrck_s));

  localparam int unsigned CW = $clog2(W + 1);

  stereo_t       hold;       // latest pair from in
  logic signed [SAMPLE_W-1:0] cur_right;  // right word of the pair being sent
  logic          lr_prev;
  logic [CW-1:0] left_bits;  // bits still to send
  logic [W-1:0]  sreg;

  wire rise = bclk_s && !bclk_d;
  wire fall = !bclk_s && bclk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_d    <= 1'b0;
      hold      <= '0;
      cur_right <= '0;
      lr_prev   <= 1'b0;
      left_bits <= '0;
      sreg      <= '0;
      dat       <= 1'b0;
    end else begin
      bclk_d <= bclk_s;
      if (in_valid) hold <= in;
      if (rise && (lrck_s != lr_prev)) begin
        lr_prev   <= lrck_s;
        left_bits <= CW'(W);
        if (!lrck_s) begin
          cur_right <= hold.right;
          sreg <= W'(hold.left >>> (SAMPLE_W - W));
        end else begin
          sreg <= W'(cur_right >>> (SAMPLE_W - W));
        end
      end else if (fall) begin
        if (left_bits != '0) begin
          dat       <= sreg[W-1];
          sreg      <= {sreg[W-2:0], 1'b0};
          left_bits <= left_bits - 1'b1;
        end else begin
          dat <= 1'b0;
        end
      end
    end
  end

endmodule
