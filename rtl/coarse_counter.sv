// coarse_counter: the two coarse time counters of the end of column.
//
// Both counters count periods of the 320 MHz clock; cnt_pos advances on the
// rising edge and cnt_neg on the falling edge. A hit arrives asynchronously,
// so a counter sampled at the hit may be caught while it changes; the two
// counters change half a period apart, so at least one of them is stable,
// and the fine time (DLL phase) tells off line which one to use. With 32 bits
// the range is 2^32 x 3.125 ns = 13.4 s. Two counters, their edges and their
// width follow the specification; the asynchronous active-high reset (the
// Reset CNT pad) clearing both to zero is this design's choice.
//
// Timing: after reset release, cnt_pos = n after the n-th rising edge and
// cnt_neg = n after the n-th falling edge.
module coarse_counter #(
  parameter int unsigned COARSE_W = eoc_pkg::COARSE_W
) (
  input  logic                clk,
  input  logic                rst,
  output logic [COARSE_W-1:0] cnt_pos,
  output logic [COARSE_W-1:0] cnt_neg
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt_pos <= '0;
    else     cnt_pos <= cnt_pos + 1'b1;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) cnt_neg <= '0;
    else     cnt_neg <= cnt_neg + 1'b1;
  end
endmodule
