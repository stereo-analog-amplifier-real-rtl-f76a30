// i2s_rx: receives the codec's ADC stream (the "Audio ADC" side).
//
// The codec is the serial-bus master: it drives the bit clock (bclk), the ADC
// frame clock (lrck, low for the left word, high for the right word) and the
// data (dat) in I2S format, most significant bit first, one bit clock after
// each frame-clock edge. All three are brought into the system clock domain
// through synchronisers and the bit clock's rising edges are found there,
// so no logic runs on the codec's clock. At each rising edge the frame clock
// is compared with its last value: a change marks the start of a word, and
// the next W rising edges carry its bits. When the right word following a
// left word is complete, the pair is presented with a one-cycle valid pulse
// (a right word without its left word, as at start-up, is dropped).
//
// Interface and timing:
//   bclk, lrck, dat : codec pins, asynchronous to clk; the bit clock must be
//                     slower than clk/4 (2.8224 MHz against 50 MHz in use).
//   out, out_valid  : stereo pair; out_valid pulses once per frame, 3 to 4
//                     clocks after the rising bit-clock edge that carried the
//                     right word's last bit.
// The 24-bit words and 44.1 kHz frames follow the design description; I2S
// format, codec master mode and the synchronised sampling are this design's
// choices (the design description only says the codec's example set-up was
// used and that gating the clocks caused glitches).
module i2s_rx
  import spatial_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bclk,
  input  logic            lrck,
  input  logic            dat,
  output stereo_t         out,
  output logic            out_valid
);

  logic bclk_s, lrck_s, dat_s, bclk_d;

  sync2 u_sb (.clk, .rst_n, .d(bclk), .q(bclk_s));
  sync2 u_sl (.clk, .rst_n, .d(lrck), .q(lrck_s));
  sync2 u_sd (.clk, .rst_n, .d(dat),  .q(dat_s));

  localparam int unsigned CW = $clog2(W + 2);

  logic          lr_prev;
  logic [CW-1:0] cnt;      // 1..W: index of the next bit, 0: idle
  logic [W-2:0]  sreg;     // bits received so far, MSB first
  logic [W-1:0]  left_q;
  logic          have_left; // a left word was received in this frame

  wire rise = bclk_s && !bclk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_d    <= 1'b0;
      lr_prev   <= 1'b0;
      cnt       <= '0;
      sreg      <= '0;
      left_q    <= '0;
      have_left <= 1'b0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      bclk_d    <= bclk_s;
      out_valid <= 1'b0;
      if (rise) begin
        if (lrck_s != lr_prev) begin
          lr_prev <= lrck_s;
          cnt     <= CW'(1);
        end else if (cnt != '0) begin
          sreg <= {sreg[W-3:0], dat_s};
          if (cnt == CW'(W)) begin
            cnt <= '0;
            if (!lr_prev) begin
              left_q    <= {sreg, dat_s};
              have_left <= 1'b1;
            end else if (have_left) begin
              have_left <= 1'b0;
              out.left  <= SAMPLE_W'(signed'(left_q));
              out.right <= SAMPLE_W'(signed'({sreg, dat_s}));
              out_valid <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
