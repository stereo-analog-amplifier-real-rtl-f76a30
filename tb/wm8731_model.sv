// wm8731_model: behavioural model of the board's audio codec, as seen from
// the FPGA, for simulation only.
//
// Serial audio: the model is the bus master. Once run is high it drives the
// bit clock (half period BCLK_HALF time units) and one frame clock shared by
// ADC and DAC, 32 bit clocks per word, low for the left word, I2S format
// (MSB one bit clock after the frame edge, 24 bits). It first sends one
// right-channel word of zeros, then frames 0, 1, 2, ...: at the start of
// frame n it sets frame to n, waits one time unit and takes adc_l/adc_r as
// that frame's words. It samples dacdat at the rising bit-clock edges of
// each word; after each frame it puts the two received words on dac_l/dac_r
// with dac_frame = n and pulses dac_strobe.
//
// Control bus: a two-wire slave at address 0x1A. It decodes START, bytes,
// acknowledges and STOP on scl/sda, pulls sda low (sda_pull) to acknowledge,
// and stores every complete three-byte write in regs[]. With NACK_FIRST set
// it leaves the first byte of the first transfer unacknowledged.
module wm8731_model #(
  parameter int BCLK_HALF  = 177,
  parameter bit NACK_FIRST = 1'b0
) (
  input  logic        run,
  output logic        bclk,
  output logic        lrck,
  output logic        adcdat,
  input  logic        dacdat,
  output int          frame,
  input  logic [23:0] adc_l,
  input  logic [23:0] adc_r,
  output logic [23:0] dac_l,
  output logic [23:0] dac_r,
  output int          dac_frame,
  output logic        dac_strobe,
  input  logic        scl,
  input  logic        sda,
  output logic        sda_pull,
  output logic [8:0]  regs [16],
  output int          n_writes,
  output int          n_transfers
);

  // ---------------- serial audio ----------------
  task automatic send_word(input logic ch, input logic [23:0] w, output logic [23:0] got);
    got = '0;
    for (int j = 0; j < 32; j++) begin
      bclk = 1'b0;
      if (j == 0) lrck = ch;
      adcdat = (j >= 1 && j <= 24) ? w[24 - j] : 1'b0;
      #(BCLK_HALF);
      bclk = 1'b1;
      if (j >= 1 && j <= 24) got[24 - j] = dacdat;
      #(BCLK_HALF);
    end
  endtask

  initial begin
    logic [23:0] gl, gr, wl, wr;
    bclk = 1'b0; lrck = 1'b1; adcdat = 1'b0; frame = -1;
    dac_l = '0; dac_r = '0; dac_frame = -1; dac_strobe = 1'b0;
    wait (run);
    send_word(1'b1, 24'h0, gr);
    for (int n = 0; ; n++) begin
      frame = n;
      #1;
      wl = adc_l;
      wr = adc_r;
      send_word(1'b0, wl, gl);
      send_word(1'b1, wr, gr);
      dac_l = gl; dac_r = gr; dac_frame = n;
      dac_strobe = 1'b1;
      #1 dac_strobe = 1'b0;
    end
  end

  // ---------------- control bus ----------------
  logic       active, ackphase;
  int         bitcnt, nbytes;
  logic [7:0] sh;
  logic [7:0] bytes [3];

  initial begin
    sda_pull = 1'b0; active = 1'b0; ackphase = 1'b0;
    bitcnt = 0; nbytes = 0; n_writes = 0; n_transfers = 0; sh = '0;
    for (int i = 0; i < 16; i++) regs[i] = 9'h1FF;
  end

  always @(negedge sda) if (scl) begin          // START
    active = 1'b1; ackphase = 1'b0; bitcnt = 0; nbytes = 0;
  end

  always @(posedge sda) if (scl && active) begin // STOP
    active = 1'b0;
    n_transfers++;
    if (nbytes == 3 && bytes[0] == 8'h34) begin
      regs[bytes[1][4:1]] = {bytes[1][0], bytes[2]};
      n_writes++;
    end
  end

  always @(posedge scl) if (active && !ackphase) begin
    sh = {sh[6:0], sda};
    bitcnt++;
  end

  always @(negedge scl) if (active) begin
    if (ackphase) begin
      sda_pull = 1'b0;
      ackphase = 1'b0;
    end else if (bitcnt == 8) begin
      if (nbytes < 3) bytes[nbytes] = sh;
      bitcnt   = 0;
      ackphase = 1'b1;
      sda_pull = !(NACK_FIRST && n_transfers == 0 && nbytes == 0);
      nbytes++;
    end
  end

endmodule
