// hrtf_coef_ram: storage for the HRTF coefficient set in use.
//
// Holds TAPS coefficients for each of the two ears. It is written as a RAM
// (an array with a synchronous read) rather than as loose registers so that
// an FPGA tool maps it onto block memory, which is the reason the design
// keeps its coefficients in a RAM-like block. The coefficient loader (an
// embedded CPU outside this design) rewrites it one word at a time while the
// convolution keeps reading it.
//
// Interface and timing:
//   write port: we, waddr = {channel, tap}, wdata; the word is stored at the
//               rising clock edge where we is high.
//   read port : raddr selects a tap; rdata_l and rdata_r hold that tap of
//               both channels one clock after raddr is presented.
// A read and a write of the same word in one cycle return the old word.
// The contents are not reset: they are undefined until the loader has
// written a set. Separate read and write ports, the word layout and the
// one-cycle read latency are this design's choices.
module hrtf_coef_ram
  import spatial_pkg::*;
#(
  parameter int unsigned DEPTH = TAPS,     // taps per channel
  parameter int unsigned WIDTH = COEF_W    // coefficient width
) (
  input  logic                       clk,
  // write port, from the coefficient loader
  input  logic                       we,
  input  logic [$clog2(DEPTH):0]     waddr,   // MSB: 0 left, 1 right
  input  logic signed [WIDTH-1:0]    wdata,
  // read port, to the convolution
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic signed [WIDTH-1:0]    rdata_l,
  output logic signed [WIDTH-1:0]    rdata_r
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic signed [WIDTH-1:0] mem_l [DEPTH];
  logic signed [WIDTH-1:0] mem_r [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !waddr[AW]) mem_l[waddr[AW-1:0]] <= wdata;
    if (we &&  waddr[AW]) mem_r[waddr[AW-1:0]] <= wdata;
    rdata_l <= mem_l[raddr];
    rdata_r <= mem_r[raddr];
  end

endmodule
