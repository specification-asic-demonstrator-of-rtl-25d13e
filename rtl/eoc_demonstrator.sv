// eoc_demonstrator: digital part of the end-of-column (EOC) demonstrator chip.
//
// The chip tests a pixel read-out in which the pixels hold only analogue
// circuits (preamplifier, time-over-threshold discriminator, current-mode
// line driver) and send each hit as a current pulse over a transmission line
// to the end of the column, where all timing is measured: a 32-tap DLL gives
// the fine time (97.7 ps bins at 320 MHz), two coarse counters (on opposite
// clock edges) the coarse time, and every hit is sent off chip serially.
// The analogue parts (pixels, lines, receivers, LVDS drivers) are outside
// this module: the receiver outputs are its inputs and the serial outputs
// its outputs.
//
// Three digital structures stand side by side:
//   s1: the 45-pixel column, folded into 5 segments of 9 pixels: 9 data
//       lines and 5 address lines into an eoc_column with 9 serial outputs,
//       plus the 45-bit calibration mask register.
//   s2: the 9-pixel column, one pixel per line: an eoc_column with 9 serial
//       outputs (no address lines: its address field is sent as 0), plus a
//       9-bit calibration mask register.
//   s5: the stand-alone TDC with external TDR/TDF triggers, own clock and
//       reset, 64-bit words.
// s1 and s2 share the 320 MHz clock, the two resets and the read-out mode.
// Each serial output has its own read-out clock. The structures and their
// sizes follow the specification; sharing of clock and resets between s1
// and s2 and the tied-off address of s2 are this design's reading of its pad
// lists.
module eoc_demonstrator
  import eoc_pkg::*;
(
  input  logic              clk320,
  input  logic              reset_cnt,
  input  logic              reset_dll,
  input  logic              async_mode,
  // s1: 45-pixel folded column
  input  logic [N_DATA-1:0] s1_rx_data,
  input  logic [ADDR_W-1:0] s1_rx_addr,
  input  logic [N_DATA-1:0] s1_rd_clk,
  output logic [N_DATA-1:0] s1_sout,
  input  logic              s1_cal_clk,
  input  logic              s1_cal_data,
  output logic [N_PIX-1:0]  s1_cal_mask,
  // s2: 9-pixel column
  input  logic [N_DATA-1:0] s2_rx_data,
  input  logic [N_DATA-1:0] s2_rd_clk,
  output logic [N_DATA-1:0] s2_sout,
  input  logic              s2_cal_clk,
  input  logic              s2_cal_data,
  output logic [N_DATA-1:0] s2_cal_mask,
  // s5: stand-alone TDC
  input  logic              s5_clk320,
  input  logic              s5_rst,
  input  logic              s5_tdr,
  input  logic              s5_tdf,
  input  logic              s5_rd_clk,
  input  logic              s5_async_mode,
  output logic              s5_sout
);
  timeunit 1ps; timeprecision 1ps;

  logic s1_cal_sout, s2_cal_sout;

  eoc_column #(.N_CH(N_DATA)) u_s1_column (
    .clk320(clk320), .reset_cnt(reset_cnt), .reset_dll(reset_dll),
    .async_mode(async_mode), .rx_data(s1_rx_data), .rx_addr(s1_rx_addr),
    .rd_clk(s1_rd_clk), .sout(s1_sout)
  );

  cal_mask_register #(.N_PIX(N_PIX)) u_s1_cal (
    .cal_clk(s1_cal_clk), .cal_data(s1_cal_data), .mask(s1_cal_mask),
    .cal_sout(s1_cal_sout)
  );

  eoc_column #(.N_CH(N_DATA)) u_s2_column (
    .clk320(clk320), .reset_cnt(reset_cnt), .reset_dll(reset_dll),
    .async_mode(async_mode), .rx_data(s2_rx_data), .rx_addr('0),
    .rd_clk(s2_rd_clk), .sout(s2_sout)
  );

  cal_mask_register #(.N_PIX(N_DATA)) u_s2_cal (
    .cal_clk(s2_cal_clk), .cal_data(s2_cal_data), .mask(s2_cal_mask),
    .cal_sout(s2_cal_sout)
  );

  eoc_tdc_test u_s5_tdc (
    .clk320(s5_clk320), .rst(s5_rst), .tdr_in(s5_tdr), .tdf_in(s5_tdf),
    .rd_clk(s5_rd_clk), .async_mode(s5_async_mode), .sout(s5_sout)
  );
endmodule
