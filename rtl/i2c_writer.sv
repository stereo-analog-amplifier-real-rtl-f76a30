// i2c_writer: two-wire serial bus master that performs one register write.
//
// A write is START, the 7-bit device address with the write bit, then two
// data bytes, each byte followed by an acknowledge bit from the device, then
// STOP. The codec takes a register write as {reg[6:0], data[8]} and
// data[7:0], which codec_config packs into byte1 and byte2.
//
// Every bus bit takes four quarter periods of QDIV system clocks each. Data
// changes in the first quarter while the clock is low, the clock is high in
// the second and third, and acknowledges are sampled in the third. The data
// line is open-drain: sda_oe = 1 pulls it low, otherwise the board pull-up
// makes it high; sda_i is the line as read back.
//
// Interface and timing:
//   start             : one-cycle pulse in idle with dev_addr, byte1, byte2.
//   busy              : high from the cycle after start until done.
//   done, nack        : done pulses once at the end; nack is valid with it
//                       and is high if any of the three bytes was not
//                       acknowledged.
//   scl, sda_oe       : bus outputs, registered. A write lasts 29 bus bits
//                       of 4*QDIV clocks (start, 27 bits, stop).
// The design description only says the codec's registers are set; this bus
// master, its timing and the default 100 kHz bus rate at 50 MHz are this
// design's choices, following the codec's standard control interface.
module i2c_writer #(
  parameter int unsigned QDIV = 125   // clocks per quarter bit: 50 MHz / (4*125) = 100 kHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] byte1,
  input  logic [7:0] byte2,
  output logic       busy,
  output logic       done,
  output logic       nack,
  output logic       scl,
  output logic       sda_oe,
  input  logic       sda_i
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_e;

  localparam int unsigned NBITS = 27;   // 3 x (8 data + 1 acknowledge)
  localparam int unsigned DW    = (QDIV > 1) ? $clog2(QDIV) : 1;

  state_e            state;
  logic [DW-1:0]     div;
  logic [1:0]        phase;
  logic [4:0]        bitn;          // index of the bus bit being sent
  logic [NBITS-1:0]  frame;         // bits to send, MSB first; 1 in ack slots
  logic [NBITS-1:0]  is_ack;        // ack slots
  logic              err;

  wire tick = (div == DW'(QDIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      div    <= '0;
      phase  <= '0;
      bitn   <= '0;
      frame  <= '0;
      is_ack <= '0;
      err    <= 1'b0;
      scl    <= 1'b1;
      sda_oe <= 1'b0;
      done   <= 1'b0;
      nack   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        div   <= '0;
        phase <= '0;
        scl    <= 1'b1;
        sda_oe <= 1'b0;
        if (start) begin
          state  <= S_START;
          frame  <= {dev_addr, 1'b0, 1'b1, byte1, 1'b1, byte2, 1'b1};
          is_ack <= NBITS'(27'b00000000_1_00000000_1_00000000_1);
          bitn   <= '0;
          err    <= 1'b0;
        end
      end else begin
        div <= tick ? '0 : div + 1'b1;
        if (tick) begin
          phase <= phase + 1'b1;
          unique case (state)
            S_START: begin
              // SDA falls while SCL is high, then SCL falls.
              unique case (phase)
                2'd0: begin scl <= 1'b1; sda_oe <= 1'b0; end
                2'd1: begin scl <= 1'b1; sda_oe <= 1'b1; end
                2'd2: begin scl <= 1'b0; sda_oe <= 1'b1; end
                2'd3: state <= S_BITS;
              endcase
            end
            S_BITS: begin
              unique case (phase)
                2'd0: begin scl <= 1'b0; sda_oe <= ~frame[NBITS-1]; end
                2'd1: scl <= 1'b1;
                2'd2: if (is_ack[NBITS-1] && sda_i) err <= 1'b1;
                2'd3: begin
                  scl    <= 1'b0;
                  frame  <= {frame[NBITS-2:0], 1'b1};
                  is_ack <= {is_ack[NBITS-2:0], 1'b0};
                  bitn   <= bitn + 1'b1;
                  if (bitn == 5'(NBITS - 1)) state <= S_STOP;
                end
              endcase
            end
            S_STOP: begin
              // SDA rises while SCL is high.
              unique case (phase)
                2'd0: begin scl <= 1'b0; sda_oe <= 1'b1; end
                2'd1: begin scl <= 1'b1; sda_oe <= 1'b1; end
                2'd2: begin scl <= 1'b1; sda_oe <= 1'b0; end
                2'd3: begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                  nack  <= err;
                end
              endcase
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule
