// spatial_pkg: widths and types shared by the sound spatializer.
//
// Audio words are 24-bit two's-complement, the codec's word length. HRTF
// coefficients are 16-bit two's-complement fractions with 15 fraction bits
// (Q1.15). Each channel's filter has 128 taps. The convolution accumulator
// is wide enough that 128 full-scale products cannot overflow it.
// The 24-bit width and the 128 taps follow the design description; the
// coefficient format is this design's choice.
package spatial_pkg;

  localparam int unsigned SAMPLE_W  = 24;   // codec word length
  localparam int unsigned COEF_W    = 16;   // HRTF coefficient width
  localparam int unsigned COEF_FRAC = 15;   // fraction bits of a coefficient
  localparam int unsigned TAPS      = 128;  // filter length per channel
  localparam int unsigned TAP_W     = $clog2(TAPS);
  localparam int unsigned ACC_W     = SAMPLE_W + COEF_W + TAP_W;

  // Azimuth is kept in 5-degree steps, 0..355 degrees: 72 positions.
  localparam int unsigned AZ_STEP_DEG = 5;
  localparam int unsigned AZ_POS      = 360 / AZ_STEP_DEG;
  localparam int unsigned AZ_W        = $clog2(AZ_POS);   // azimuth index width
  localparam int unsigned DEG_W       = 9;                // 0..359 in binary
  localparam int unsigned N_ELEV      = 4;                // elevation switches
  localparam int unsigned EL_W        = $clog2(N_ELEV);

  typedef enum logic {CH_LEFT = 1'b0, CH_RIGHT = 1'b1} channel_e;

  // One stereo sample pair.
  typedef struct packed {
    logic signed [SAMPLE_W-1:0] left;
    logic signed [SAMPLE_W-1:0] right;
  } stereo_t;

  // A request for a new coefficient set: the angle it is for.
  typedef struct packed {
    logic [AZ_W-1:0] az;   // azimuth index, degrees / 5
    logic [EL_W-1:0] el;   // elevation switch index
  } angle_t;

endpackage
