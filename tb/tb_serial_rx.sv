// tb_serial_rx: receiver for the serial line of an EOC line output buffer.
//
// Samples sout on the falling edge of the read-out clock. An idle line is
// '0'. A frame starts with one or more '1's (one in synchronous mode; in
// asynchronous mode the line also stays '1' while the hit waits for the
// clock), then a '0', then DATA_W data bits, MSB first. For each frame it
// pulses frame_valid for one sample with the word, the number of leading
// '1's, the number of read-out clocks from the last leading '1' to the last
// data bit inclusive (expected 1 + 1 + DATA_W), and whether the frame began
// right after the previous one (back-to-back).
module tb_serial_rx #(
  parameter int unsigned DATA_W = 197
) (
  input  logic              rd_clk,
  input  logic              sout,
  output logic              frame_valid,
  output logic [DATA_W-1:0] frame_word,
  output int                frame_ones,
  output int                frame_cycles,
  output bit                frame_b2b
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_t;
  state_t            state = S_IDLE;
  int                ones = 0, nbits = 0, cycles = 0;
  logic [DATA_W-1:0] sh;
  bit                just_ended = 1'b0, b2b = 1'b0;

  initial frame_valid = 1'b0;

  always @(negedge rd_clk) begin
    frame_valid <= 1'b0;
    case (state)
      S_IDLE: begin
        if (sout) begin
          state <= S_HDR;
          ones  <= 1;
          b2b   <= just_ended;
        end
        just_ended <= 1'b0;
      end
      S_HDR: begin
        if (sout) ones <= ones + 1;
        else begin
          state  <= S_DATA;
          nbits  <= 0;
          cycles <= 2;
        end
      end
      default: begin
        sh     = {sh[DATA_W-2:0], sout};
        nbits  <= nbits + 1;
        cycles <= cycles + 1;
        if (nbits == DATA_W - 1) begin
          frame_valid  <= 1'b1;
          frame_word   <= sh;
          frame_ones   <= ones;
          frame_cycles <= cycles + 1;
          frame_b2b    <= b2b;
          state        <= S_IDLE;
          just_ended   <= 1'b1;
        end
      end
    endcase
  end
endmodule
