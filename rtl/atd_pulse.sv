// atd_pulse: behavioural model of the address transition detector (ATD).
//
// This is a behavioural model: the real circuit is a monostable whose pulse
// width is set by an analogue delay. From the receiver output of one data
// line (high for the time over threshold of a hit) it makes two trigger
// pulses: tdr on the leading edge and tdf on the trailing edge, each
// PULSE_PS long (the specification calls for 2 to 3 ns) and starting DELAY_PS
// after the edge. The rising edges of tdr/tdf clock the TDC hit registers.
// The two pulses and their width follow the specification; the 100 ps
// propagation delay is this model's choice.
module atd_pulse #(
  parameter int unsigned PULSE_PS = 2500,
  parameter int unsigned DELAY_PS = 100
) (
  input  logic hit,
  output logic tdr,
  output logic tdf
);
  timeunit 1ps; timeprecision 1ps;

  initial begin
    tdr = 1'b0;
    tdf = 1'b0;
  end

  always @(posedge hit) begin
    fork
      begin
        #(DELAY_PS) tdr = 1'b1;
        #(PULSE_PS) tdr = 1'b0;
      end
    join_none
  end

  always @(negedge hit) begin
    fork
      begin
        #(DELAY_PS) tdf = 1'b1;
        #(PULSE_PS) tdf = 1'b0;
      end
    join_none
  end
endmodule
