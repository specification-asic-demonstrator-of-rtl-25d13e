// line_output_buffer: read-out register and serializer of one data line.
//
// When the hit register flags a complete hit (hit_tgl changes), the flag is
// synchronised into the read-out clock domain with two flip-flops and the
// hit word is copied into a shift register together with a two-bit header.
// The line then carries, one bit per read-out clock, '1', '0' and the
// DATA_W data bits, most significant first: HDR_W + DATA_W = 199 clocks per
// hit for the 197-bit word, 622 ns at 320 MHz. If another hit has completed
// meanwhile, its sequence follows in the next clock without a gap; otherwise
// the line returns to idle.
//
// Two modes, selected by async_mode (static):
//   synchronous  (0): the read-out clock runs continuously; the idle line is 0.
//   asynchronous (1): the read-out clock may be stopped. While a hit waits
//                     and nothing is being sent the line is driven to '1'
//                     without any clock (combinationally from the flag), and
//                     the header and data follow once the clock runs.
// The header, bit count and both modes follow the specification. The
// two-phase flag, its synchroniser (the word is copied 2 to 3 clocks after
// the hit completes) and the one-deep buffering (a hit completing while an
// earlier one still waits replaces it) are this design's choices. The word
// must not change while it is copied; hits are far apart compared to the
// read-out clock period.
module line_output_buffer
  import eoc_pkg::*;
#(
  parameter int unsigned DATA_W = HIT_WORD_W
) (
  input  logic              rd_clk,
  input  logic              rst,
  input  logic              async_mode,
  input  logic              hit_tgl,
  input  logic [DATA_W-1:0] word,
  output logic              sout,
  output logic              busy
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SEQ_W = HDR_W + DATA_W;
  localparam int unsigned CNT_W = $clog2(SEQ_W + 1);

  logic [1:0]        tgl_sync;   // synchroniser of hit_tgl
  logic              tgl_seen;   // value of hit_tgl whose word was taken
  logic [SEQ_W-1:0]  shreg;
  logic [CNT_W-1:0]  bits_left;
  logic              pending, last, load;

  assign pending = tgl_sync[1] ^ tgl_seen;
  assign busy    = (bits_left != '0);
  assign last    = (bits_left == CNT_W'(1));
  assign load    = pending && (!busy || last);

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst) begin
      tgl_sync  <= '0;
      tgl_seen  <= 1'b0;
      shreg     <= '0;
      bits_left <= '0;
    end else begin
      tgl_sync <= {tgl_sync[0], hit_tgl};
      if (load) begin
        shreg     <= {2'b10, word};
        bits_left <= CNT_W'(SEQ_W);
        tgl_seen  <= tgl_sync[1];
      end else if (busy) begin
        shreg     <= {shreg[SEQ_W-2:0], 1'b0};
        bits_left <= bits_left - 1'b1;
      end
    end
  end

  // asynchronous mode flags a waiting hit without a clock
  always_comb begin
    if (busy) sout = shreg[SEQ_W-1];
    else      sout = async_mode & (hit_tgl ^ tgl_seen);
  end

  // a transfer always lasts exactly SEQ_W clocks
  property p_count_down;
    @(posedge rd_clk) disable iff (rst)
      (busy && !last) |=> (bits_left == $past(bits_left) - 1'b1);
  endproperty
  a_count_down: assert property (p_count_down);
endmodule
