// angle_ctrl: listener-facing controls of the spatializer.
//
// The virtual source's azimuth is changed with the board's four push buttons:
// two step it by 5 degrees, the resolution of the measured responses, and two
// by 90 degrees. It is kept as an index 0..71 (degrees / 5), so it always stays
// in 0..355 degrees and wraps around past 360. The elevation is picked with
// four slide switches, of which exactly one must be up; any other switch
// pattern leaves the elevation as it was. The LEDs show the azimuth in
// degrees, in binary.
//
// Whenever the selected angle differs from the one whose coefficients are in
// the coefficient RAM, a request is raised to the coefficient loader (an
// embedded CPU running C code, outside this design): coef_req goes high with
// the wanted angle on req_angle, both held until the loader pulses coef_ack
// after it has written the new set. If the angle changed meanwhile, a new
// request follows. After reset a request for the initial angle is raised.
//
// Interface and timing:
//   key_n[3:0] : buttons, low when pressed (board-debounced), asynchronous:
//                [0] +5, [1] -5, [2] +90, [3] -90 degrees. One step per press,
//                3 to 4 clocks after the press; the lowest-numbered wins if
//                several are pressed in the same clock.
//   sw[3:0]    : elevation switches, asynchronous; index of the one high switch.
//   az, el     : current angle; az_deg / led: azimuth in degrees.
//   coef_req, req_angle, coef_ack : loader handshake as above.
// The buttons, steps, range, switches and LEDs follow the design description,
// as does a request signal to the loader. The assignment of buttons, the
// handshake details and the binary LED code are this design's choices.
module angle_ctrl
  import spatial_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         key_n,
  input  logic [N_ELEV-1:0]  sw,
  output logic [AZ_W-1:0]    az,
  output logic [EL_W-1:0]    el,
  output logic [DEG_W-1:0]   az_deg,
  output logic [DEG_W-1:0]   led,
  output logic               coef_req,
  output angle_t             req_angle,
  input  logic               coef_ack
);

  localparam int unsigned STEP90 = 90 / AZ_STEP_DEG;   // 18 positions

  logic [3:0]        key_s, key_d;
  logic [N_ELEV-1:0] sw_s;

  for (genvar i = 0; i < 4; i++) begin : g_key
    sync2 #(.RESET_VALUE(1'b1)) u_s (.clk, .rst_n, .d(key_n[i]), .q(key_s[i]));
  end
  for (genvar i = 0; i < int'(N_ELEV); i++) begin : g_sw
    sync2 u_s (.clk, .rst_n, .d(sw[i]), .q(sw_s[i]));
  end

  wire [3:0] press = key_d & ~key_s;   // high-to-low edge

  function automatic logic [AZ_W-1:0] az_add(input logic [AZ_W-1:0] a, input int unsigned n);
    return AZ_W'((int'(a) + n) % AZ_POS);
  endfunction

  function automatic logic one_hot(input logic [N_ELEV-1:0] v);
    return (v != '0) && ((v & (v - 1'b1)) == '0);
  endfunction

  function automatic logic [EL_W-1:0] hot_index(input logic [N_ELEV-1:0] v);
    logic [EL_W-1:0] r;
    r = '0;
    for (int i = 0; i < int'(N_ELEV); i++) if (v[i]) r = EL_W'(i);
    return r;
  endfunction

  angle_t loaded;
  logic   loaded_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_d     <= '1;
      az        <= '0;
      el        <= '0;
      coef_req  <= 1'b0;
      req_angle <= '0;
      loaded    <= '0;
      loaded_v  <= 1'b0;
    end else begin
      key_d <= key_s;
      if      (press[0]) az <= az_add(az, 1);
      else if (press[1]) az <= az_add(az, AZ_POS - 1);
      else if (press[2]) az <= az_add(az, STEP90);
      else if (press[3]) az <= az_add(az, AZ_POS - STEP90);
      if (one_hot(sw_s)) el <= hot_index(sw_s);

      if (!coef_req) begin
        if (!loaded_v || (loaded != angle_t'{az: az, el: el})) begin
          coef_req  <= 1'b1;
          req_angle <= '{az: az, el: el};
        end
      end else if (coef_ack) begin
        coef_req <= 1'b0;
        loaded   <= req_angle;
        loaded_v <= 1'b1;
      end
    end
  end

  always_comb begin
    az_deg = DEG_W'(az) * DEG_W'(AZ_STEP_DEG);
    led    = az_deg;
  end

  // The loader acknowledges only a pending request.
  a_ack_when_req: assert property (@(posedge clk) disable iff (!rst_n) coef_ack |-> coef_req);

endmodule
