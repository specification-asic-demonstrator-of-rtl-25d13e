// eoc_channel: end-of-column logic of one data transmission line.
//
// The receiver output of the line (high for the time over threshold of a
// hit) drives an address transition detector, whose leading- and trailing-
// edge pulses (tdr, tdf) clock the TDC hit register bank. The bank samples
// the shared DLL taps, the shared coarse counters and the shared address
// lines. The line output buffer copies each completed hit and sends it out
// serially on this line's own read-out clock: header '1','0', then the
// 197-bit hit word, MSB first.
//
// The chain receiver -> TDR/TDF -> hit registers -> line output buffer is the
// specification's; the trigger delay and width are set in atd_pulse.
module eoc_channel
  import eoc_pkg::*;
(
  input  logic                rst,
  input  logic                hit,
  input  logic [FINE_W-1:0]   dll_taps,
  input  logic [COARSE_W-1:0] cnt_pos,
  input  logic [COARSE_W-1:0] cnt_neg,
  input  logic [ADDR_W-1:0]   addr_in,
  input  logic                rd_clk,
  input  logic                async_mode,
  output logic                sout
);
  timeunit 1ps; timeprecision 1ps;

  logic      tdr, tdf, hit_tgl, busy;
  hit_word_t word;

  atd_pulse u_atd (.hit(hit), .tdr(tdr), .tdf(tdf));

  tdc_hit_register #(.HAS_COARSE(1'b1), .HAS_ADDR(1'b1)) u_hitreg (
    .rst(rst), .tdr(tdr), .tdf(tdf), .dll_taps(dll_taps),
    .cnt_pos(cnt_pos), .cnt_neg(cnt_neg), .addr_in(addr_in),
    .word(word), .hit_tgl(hit_tgl)
  );

  line_output_buffer #(.DATA_W(HIT_WORD_W)) u_lob (
    .rd_clk(rd_clk), .rst(rst), .async_mode(async_mode), .hit_tgl(hit_tgl),
    .word(word), .sout(sout), .busy(busy)
  );
endmodule
