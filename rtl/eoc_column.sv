// eoc_column: end of column of one column bus.
//
// The pixels of the column drive N_DATA data transmission lines and ADDR_W
// address lines. For the 45-pixel demonstrator column, folded into 5 segments
// of 9 pixels, pixel p (0..44) drives data line p mod 9 and address line
// p / 9: the data line and the address line together identify the pixel.
// Each data line has its own channel (trigger generation, TDC hit registers,
// line output buffer) and its own serial output and read-out clock. One
// DLL and one pair of coarse counters, all on the 320 MHz clock, serve all
// channels; the address lines are sampled, undecoded, by every channel.
//
// Resets: reset_cnt clears the coarse counters and the channel logic;
// reset_dll holds the DLL taps low. async_mode selects the read-out mode of
// all channels. Channel counts, the shared DLL and counters and the
// separate serial outputs follow the specification; using Reset CNT for the
// channel logic is this design's choice.
module eoc_column
  import eoc_pkg::*;
#(
  parameter int unsigned N_CH = N_DATA
) (
  input  logic              clk320,
  input  logic              reset_cnt,
  input  logic              reset_dll,
  input  logic              async_mode,
  input  logic [N_CH-1:0]   rx_data,
  input  logic [ADDR_W-1:0] rx_addr,
  input  logic [N_CH-1:0]   rd_clk,
  output logic [N_CH-1:0]   sout
);
  timeunit 1ps; timeprecision 1ps;

  logic [FINE_W-1:0]   dll_taps;
  logic [COARSE_W-1:0] cnt_pos, cnt_neg;

  dll_delay_line #(.N_TAPS(FINE_W)) u_dll (
    .clk(clk320), .rst(reset_dll), .taps(dll_taps)
  );

  coarse_counter #(.COARSE_W(COARSE_W)) u_coarse (
    .clk(clk320), .rst(reset_cnt), .cnt_pos(cnt_pos), .cnt_neg(cnt_neg)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    eoc_channel u_ch (
      .rst(reset_cnt), .hit(rx_data[c]), .dll_taps(dll_taps),
      .cnt_pos(cnt_pos), .cnt_neg(cnt_neg), .addr_in(rx_addr),
      .rd_clk(rd_clk[c]), .async_mode(async_mode), .sout(sout[c])
    );
  end
endmodule
