// tdc_hit_register: TDC hit register bank of one data transmission line.
//
// The bank has no clock of its own: its registers are clocked by the trigger
// pulses of the address transition detector. On the rising edge of tdr
// (leading edge of the hit) it stores the DLL state as the rise fine time,
// both coarse counters, and the address lines. On the rising edge of tdf
// (trailing edge) it stores the DLL state as the fall fine time and both
// coarse counters, and toggles hit_tgl to tell the read-out that a complete
// hit word is waiting. The DLL state is stored as sampled, without decoding.
//
// Interface: word holds the last captured hit (eoc_pkg::hit_word_t, 197
// bits); hit_tgl changes once per completed hit (two-phase flag, to be
// synchronised by the reader). The word is stable from tdf until the next
// tdr. HAS_COARSE = 0 leaves out the coarse registers and HAS_ADDR = 0 the
// address register (their fields read 0), as in the stand-alone TDC test
// structure.
//
// From the specification: two 32-bit fine registers, leading/trailing-edge
// capture, two coarse counters captured at each edge, the address captured
// with the hit. This design's choices: the address is captured at the leading
// edge only, the toggle handshake, and the asynchronous active-high reset.
module tdc_hit_register
  import eoc_pkg::*;
#(
  parameter bit HAS_COARSE = 1'b1,
  parameter bit HAS_ADDR   = 1'b1
) (
  input  logic                rst,
  input  logic                tdr,
  input  logic                tdf,
  input  logic [FINE_W-1:0]   dll_taps,
  input  logic [COARSE_W-1:0] cnt_pos,
  input  logic [COARSE_W-1:0] cnt_neg,
  input  logic [ADDR_W-1:0]   addr_in,
  output hit_word_t           word,
  output logic                hit_tgl
);
  timeunit 1ps; timeprecision 1ps;

  logic [FINE_W-1:0]   fine_rise_q, fine_fall_q;
  logic [COARSE_W-1:0] crs_rise_pos_q, crs_rise_neg_q, crs_fall_pos_q, crs_fall_neg_q;
  logic [ADDR_W-1:0]   addr_q;

  // leading edge: rise fine time
  always_ff @(posedge tdr or posedge rst) begin
    if (rst) fine_rise_q <= '0;
    else     fine_rise_q <= dll_taps;
  end

  // trailing edge: fall fine time and completion flag
  always_ff @(posedge tdf or posedge rst) begin
    if (rst) begin
      fine_fall_q <= '0;
      hit_tgl     <= 1'b0;
    end else begin
      fine_fall_q <= dll_taps;
      hit_tgl     <= ~hit_tgl;
    end
  end

  if (HAS_COARSE) begin : g_coarse
    always_ff @(posedge tdr or posedge rst) begin
      if (rst) begin
        crs_rise_pos_q <= '0;
        crs_rise_neg_q <= '0;
      end else begin
        crs_rise_pos_q <= cnt_pos;
        crs_rise_neg_q <= cnt_neg;
      end
    end
    always_ff @(posedge tdf or posedge rst) begin
      if (rst) begin
        crs_fall_pos_q <= '0;
        crs_fall_neg_q <= '0;
      end else begin
        crs_fall_pos_q <= cnt_pos;
        crs_fall_neg_q <= cnt_neg;
      end
    end
  end else begin : g_no_coarse
    assign crs_rise_pos_q = '0;
    assign crs_rise_neg_q = '0;
    assign crs_fall_pos_q = '0;
    assign crs_fall_neg_q = '0;
  end

  if (HAS_ADDR) begin : g_addr
    always_ff @(posedge tdr or posedge rst) begin
      if (rst) addr_q <= '0;
      else     addr_q <= addr_in;
    end
  end else begin : g_no_addr
    assign addr_q = '0;
  end

  always_comb begin
    word.fine_rise    = fine_rise_q;
    word.fine_fall    = fine_fall_q;
    word.crs_rise_pos = crs_rise_pos_q;
    word.crs_rise_neg = crs_rise_neg_q;
    word.crs_fall_pos = crs_fall_pos_q;
    word.crs_fall_neg = crs_fall_neg_q;
    word.addr         = addr_q;
  end
endmodule
