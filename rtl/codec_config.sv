// codec_config: sets up the WM8731 audio codec after reset.
//
// The codec has to be told to sample at 44.1 kHz and to take its input from
// line-in rather than the microphone. After a power-up wait of WAIT_CYCLES
// clocks this sequencer sends the register writes below, one at a time,
// through i2c_writer. A write that is not acknowledged is sent again. When
// all have been acknowledged, done goes high and stays high.
//
//   reg  value  meaning
//   15   0x000  reset the codec
//    6   0x000  power up every section
//    0   0x017  left line-in: 0 dB, not muted
//    1   0x017  right line-in: 0 dB, not muted
//    2   0x079  left headphone out: 0 dB
//    3   0x079  right headphone out: 0 dB
//    4   0x012  analogue path: DAC selected, line-in selected (INSEL = 0),
//               microphone muted, no bypass
//    5   0x000  digital path: no de-emphasis, DAC not muted, high-pass on
//    7   0x04A  interface: codec is master, 24-bit words, I2S format
//    8   0x020  sampling: normal mode, 256 fs, ADC and DAC at 44.1 kHz
//               (needs an 11.2896 MHz master clock on the codec)
//    9   0x001  activate the digital interface
//
// Interface and timing: scl/sda_oe/sda_i go to the codec's control pins
// (device address 0x1A); done rises after the last acknowledged write,
// about WAIT_CYCLES + 11 x 29 x 4 x QDIV clocks after reset; nacks counts
// unacknowledged writes (saturating).
// The 44.1 kHz rate, the line-in input and the 24-bit words follow the design
// description; the register values are this design's reading of the codec's
// register map, and the retry and the wait are this design's choices.
module codec_config #(
  parameter int unsigned QDIV        = 125,     // i2c_writer quarter-bit divider
  parameter int unsigned WAIT_CYCLES = 50_000   // 1 ms at 50 MHz before the first write
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       scl,
  output logic       sda_oe,
  input  logic       sda_i,
  output logic       done,
  output logic [7:0] nacks
);

  localparam logic [6:0] CODEC_ADDR = 7'h1A;
  localparam int unsigned N_WRITES  = 11;

  typedef struct packed {
    logic [6:0] addr;
    logic [8:0] data;
  } reg_write_t;

  function automatic reg_write_t setup_word(input logic [3:0] i);
    unique case (i)
      4'd0:    return '{addr: 7'd15, data: 9'h000};
      4'd1:    return '{addr: 7'd6,  data: 9'h000};
      4'd2:    return '{addr: 7'd0,  data: 9'h017};
      4'd3:    return '{addr: 7'd1,  data: 9'h017};
      4'd4:    return '{addr: 7'd2,  data: 9'h079};
      4'd5:    return '{addr: 7'd3,  data: 9'h079};
      4'd6:    return '{addr: 7'd4,  data: 9'h012};
      4'd7:    return '{addr: 7'd5,  data: 9'h000};
      4'd8:    return '{addr: 7'd7,  data: 9'h04A};
      4'd9:    return '{addr: 7'd8,  data: 9'h020};
      default: return '{addr: 7'd9,  data: 9'h001};
    endcase
  endfunction

  typedef enum logic [1:0] {S_WAIT, S_SEND, S_BUSY, S_DONE} state_e;

  localparam int unsigned WW = (WAIT_CYCLES > 1) ? $clog2(WAIT_CYCLES) : 1;

  state_e        state;
  logic [WW-1:0] wait_cnt;
  logic [3:0]    idx;
  logic          wr_start, wr_done, wr_nack, wr_busy;
  reg_write_t    word;

  assign word = setup_word(idx);

  i2c_writer #(.QDIV(QDIV)) u_i2c (
    .clk, .rst_n,
    .start(wr_start), .dev_addr(CODEC_ADDR),
    .byte1({word.addr, word.data[8]}), .byte2(word.data[7:0]),
    .busy(wr_busy), .done(wr_done), .nack(wr_nack),
    .scl, .sda_oe, .sda_i
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_WAIT;
      wait_cnt <= '0;
      idx      <= '0;
      nacks    <= '0;
    end else begin
      unique case (state)
        S_WAIT: begin
          if (wait_cnt == WW'(WAIT_CYCLES - 1)) state <= S_SEND;
          else                                   wait_cnt <= wait_cnt + 1'b1;
        end
        S_SEND: state <= S_BUSY;
        S_BUSY: if (wr_done) begin
          if (wr_nack) begin
            if (nacks != 8'hFF) nacks <= nacks + 1'b1;
            state <= S_SEND;                    // send the same word again
          end else if (idx == 4'(N_WRITES - 1)) begin
            state <= S_DONE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_SEND;
          end
        end
        S_DONE: ;
        default: state <= S_WAIT;
      endcase
    end
  end

  assign wr_start = (state == S_SEND);
  assign done     = (state == S_DONE);

  // A new write is only started when the bus master is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) wr_start |-> !wr_busy);

endmodule
