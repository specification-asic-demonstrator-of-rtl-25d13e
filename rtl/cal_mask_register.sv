// cal_mask_register: serially loaded calibration mask of a pixel column.
//
// Each pixel can receive a test charge from the common calibration pulse;
// mask[i] = 1 enables it for pixel i. The mask is downloaded serially: on
// every rising edge of cal_clk (pad Cal-Reg CLK) the register shifts by one
// towards the high index and cal_data (pad Data-cal) enters at mask[0].
// After N_PIX clocks the first bit sent sits in mask[N_PIX-1]. cal_sout is
// the bit leaving the register, for reading the mask back or chaining.
// The serial download and one bit per pixel follow the specification; the
// shift direction, the read-back output and the absence of a reset are this
// design's choices. The gating of the analogue pulse itself is in the pixel.
module cal_mask_register #(
  parameter int unsigned N_PIX = eoc_pkg::N_PIX
) (
  input  logic             cal_clk,
  input  logic             cal_data,
  output logic [N_PIX-1:0] mask,
  output logic             cal_sout
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge cal_clk) begin
    mask <= {mask[N_PIX-2:0], cal_data};
  end

  assign cal_sout = mask[N_PIX-1];
endmodule
