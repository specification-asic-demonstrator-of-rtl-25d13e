// eoc_pkg: constants and the hit word shared by the end-of-column (EOC) logic.
//
// A hit on one data transmission line is described by a 197-bit word: the
// 32-bit DLL state sampled at the leading and at the trailing edge of the
// time-over-threshold pulse (fine times), the two coarse counters (one
// advancing on each clock edge) sampled at each of those two edges, and the
// 5 pixel-address lines. The widths are those of the demonstrator
// specification; the order of the fields follows its read-out word drawing
// (rise fine, fall fine, rise coarse, fall coarse, address). The order of the
// two counters inside each coarse pair is this design's choice.
package eoc_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned FINE_W     = 32;  // DLL taps, 97.7 ps bins at 320 MHz
  localparam int unsigned COARSE_W   = 32;  // coarse counters, 13.4 s range
  localparam int unsigned ADDR_W     = 5;   // one address line per folded column
  localparam int unsigned N_DATA     = 9;   // data lines of a column bus
  localparam int unsigned N_PIX      = 45;  // pixels of the folded column
  localparam int unsigned HDR_W      = 2;   // serial header '1','0'

  typedef struct packed {
    logic [FINE_W-1:0]   fine_rise;   // DLL state at the leading edge
    logic [FINE_W-1:0]   fine_fall;   // DLL state at the trailing edge
    logic [COARSE_W-1:0] crs_rise_pos; // rising-edge counter at the leading edge
    logic [COARSE_W-1:0] crs_rise_neg; // falling-edge counter at the leading edge
    logic [COARSE_W-1:0] crs_fall_pos; // rising-edge counter at the trailing edge
    logic [COARSE_W-1:0] crs_fall_neg; // falling-edge counter at the trailing edge
    logic [ADDR_W-1:0]   addr;         // address lines at the leading edge
  } hit_word_t;

  localparam int unsigned HIT_WORD_W = $bits(hit_word_t);  // 197
endpackage
