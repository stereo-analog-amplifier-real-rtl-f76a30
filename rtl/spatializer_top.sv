// spatializer_top: real-time binaural sound spatializer for an FPGA board
// with a WM8731 audio codec.
//
// Line-in audio is digitised by the codec, filtered for each ear with a
// 128-tap head-related impulse response (HRIR) for the chosen azimuth and
// elevation, and played back through the codec's DAC, so that a listener on
// headphones hears the sound coming from that direction. The path, at one
// system clock of 50 MHz against a 44.1 kHz sample rate:
//
//   codec ADC --I2S--> i2s_rx --pair--> hrtf_conv --done, sums--> output_stage
//     --pair--> i2s_tx --I2S--> codec DAC
//
// codec_config writes the codec's registers once after reset over the
// two-wire control bus. angle_ctrl turns buttons and switches into an
// azimuth/elevation, shows the azimuth on the LEDs, and asks the coefficient
// loader for a new coefficient set when the angle changes. The loader is an
// embedded processor running C code, not part of this RTL: its request and
// acknowledge and its write port into the coefficient RAM are ports here.
//
// Interface and timing:
//   clk, rst_n        : 50 MHz system clock, asynchronous active-low reset.
//   key_n, sw, led    : board buttons (low = pressed), elevation switches,
//                       azimuth display, see angle_ctrl.
//   aud_*             : codec serial audio pins; the codec is bus master and
//                       drives bclk and both frame clocks (its master clock,
//                       11.2896 MHz, comes from outside this design).
//   i2c_*             : codec control bus; sda is open-drain: i2c_sda_oe = 1
//                       pulls it low, i2c_sda_i reads it.
//   codec_ready       : high once the codec has accepted its set-up;
//                       codec_nacks counts writes it had to repeat.
//   coef_req, coef_req_angle, coef_ack : request to the loader, held until
//                       the loader's one-cycle acknowledge.
//   coef_we, coef_waddr, coef_wdata    : loader's write port into the
//                       coefficient RAM, {channel, tap} addressing.
//   clipped           : pulses when an output word saturated.
// A pair from the ADC reaches the DAC one or two frames later: the filter
// needs TAPS + 2 clocks plus a few for synchronising and registering, and a
// pair waits for the next frame's left word in i2s_tx.
// The block structure (codec ADC and DAC, HRTF convolution with a state
// controller and a coefficient RAM, a CPU-side coefficient loader, buttons,
// switches and LEDs) follows the design description; the codec protocols and
// all word widths and handshakes are this design's choices.
module spatializer_top
  import spatial_pkg::*;
#(
  parameter int unsigned N_TAPS      = TAPS,    // filter length per ear
  parameter int unsigned NORM_SHIFT  = 0,       // output attenuation, bits
  parameter int unsigned I2C_QDIV    = 125,     // 100 kHz control bus at 50 MHz
  parameter int unsigned CFG_WAIT    = 50_000   // codec power-up wait, clocks
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // buttons, switches, LEDs
  input  logic [3:0]                 key_n,
  input  logic [N_ELEV-1:0]          sw,
  output logic [DEG_W-1:0]           led,
  // codec serial audio
  input  logic                       aud_bclk,
  input  logic                       aud_adclrck,
  input  logic                       aud_adcdat,
  input  logic                       aud_daclrck,
  output logic                       aud_dacdat,
  // codec control bus
  output logic                       i2c_sclk,
  output logic                       i2c_sda_oe,
  input  logic                       i2c_sda_i,
  output logic                       codec_ready,
  output logic [7:0]                 codec_nacks,
  // coefficient loader (embedded CPU)
  output logic                       coef_req,
  output angle_t                     coef_req_angle,
  input  logic                       coef_ack,
  input  logic                       coef_we,
  input  logic [$clog2(N_TAPS):0]    coef_waddr,
  input  logic signed [COEF_W-1:0]   coef_wdata,
  // status
  output logic                       clipped
);

  // ---- codec set-up ------------------------------------------------------
  codec_config #(.QDIV(I2C_QDIV), .WAIT_CYCLES(CFG_WAIT)) u_cfg (
    .clk, .rst_n,
    .scl(i2c_sclk), .sda_oe(i2c_sda_oe), .sda_i(i2c_sda_i),
    .done(codec_ready), .nacks(codec_nacks)
  );

  // ---- angle selection ---------------------------------------------------
  angle_ctrl u_angle (
    .clk, .rst_n, .key_n, .sw,
    .az(), .el(), .az_deg(), .led,
    .coef_req, .req_angle(coef_req_angle), .coef_ack
  );

  // ---- audio path --------------------------------------------------------
  stereo_t                 adc_pair, dac_pair;
  logic                    adc_valid, dac_valid, conv_done, conv_busy;
  logic signed [ACC_W-1:0] y_l, y_r;

  i2s_rx u_adc (
    .clk, .rst_n,
    .bclk(aud_bclk), .lrck(aud_adclrck), .dat(aud_adcdat),
    .out(adc_pair), .out_valid(adc_valid)
  );

  hrtf_conv #(.N_TAPS(N_TAPS)) u_hrtf (
    .clk, .rst_n,
    .in_valid(adc_valid), .in(adc_pair),
    .coef_we, .coef_waddr, .coef_wdata,
    .done(conv_done), .busy(conv_busy), .y_l, .y_r
  );

  output_stage #(.NORM_SHIFT(NORM_SHIFT)) u_out (
    .clk, .rst_n,
    .en(conv_done), .y_l, .y_r,
    .out(dac_pair), .out_valid(dac_valid), .clipped
  );

  i2s_tx u_dac (
    .clk, .rst_n,
    .in_valid(dac_valid), .in(dac_pair),
    .bclk(aud_bclk), .lrck(aud_daclrck), .dat(aud_dacdat)
  );

  // A new sample pair must never find the filter still busy: at 50 MHz and
  // 44.1 kHz there are about 1134 clocks per pair.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) adc_valid |-> !conv_busy);

endmodule
