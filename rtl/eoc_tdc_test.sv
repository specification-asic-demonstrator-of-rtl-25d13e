// eoc_tdc_test: stand-alone TDC test structure (structure 5).
//
// One DLL and one TDC hit register bank without coarse counters or address,
// triggered directly from the TDR and TDF trigger pads (externally
// controlled, e.g. by an IC tester's timing unit). Each completed tdr/tdf
// pair is read out on rd_clk like a column channel: header '1','0' then a
// 64-bit word, rise fine time (32 bits) followed by fall fine time (32 bits),
// MSB first, 66 read-out clocks per hit. Both read-out modes are available.
// The composition and the 64-bit word follow the specification; the single
// reset for DLL and logic follows its pad list; header and modes are taken
// over from the column read-out by this design.
module eoc_tdc_test
  import eoc_pkg::*;
(
  input  logic clk320,
  input  logic rst,
  input  logic tdr_in,
  input  logic tdf_in,
  input  logic rd_clk,
  input  logic async_mode,
  output logic sout
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DATA_W = 2 * FINE_W;

  logic [FINE_W-1:0] dll_taps;
  hit_word_t         word;
  logic              hit_tgl, busy;

  dll_delay_line #(.N_TAPS(FINE_W)) u_dll (.clk(clk320), .rst(rst), .taps(dll_taps));

  tdc_hit_register #(.HAS_COARSE(1'b0), .HAS_ADDR(1'b0)) u_hitreg (
    .rst(rst), .tdr(tdr_in), .tdf(tdf_in), .dll_taps(dll_taps),
    .cnt_pos('0), .cnt_neg('0), .addr_in('0),
    .word(word), .hit_tgl(hit_tgl)
  );

  line_output_buffer #(.DATA_W(DATA_W)) u_lob (
    .rd_clk(rd_clk), .rst(rst), .async_mode(async_mode), .hit_tgl(hit_tgl),
    .word({word.fine_rise, word.fine_fall}), .sout(sout), .busy(busy)
  );
endmodule
