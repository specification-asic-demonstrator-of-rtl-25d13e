// dll_delay_line: behavioural model of the 32-tap delay-locked loop (DLL).
//
// This is a behavioural model, not synthesizable logic: the real DLL is a
// mixed-signal circuit (a chain of voltage-controlled delay cells locked to
// one clock period by a phase detector and charge pump). The model keeps the
// real block's interface: the 320 MHz clock in, a reset, and the N_TAPS tap
// outputs. Tap k is the clock delayed by k/N_TAPS of its period, so at 320 MHz
// one tap is 97.7 ps, the TDC time bin. The hit registers sample all taps at
// once; the sampled pattern (a run of ones and a run of zeros) encodes the
// phase of the hit within the clock period.
//
// The model is the DLL in lock: it assumes the clock has the nominal period
// PERIOD_PS (3125 ps, 320 MHz) and delays tap k by k*PERIOD_PS/N_TAPS,
// rounded to 1 ps. While rst (Reset DLL) is high all taps are low (each tap
// follows the reset with its own delay). Tap 0 is
// the clock itself. The tap count and the clock follow the specification;
// the reset behaviour and the ideal lock are this model's choices.
module dll_delay_line #(
  parameter int unsigned N_TAPS    = eoc_pkg::FINE_W,
  parameter int unsigned PERIOD_PS = 3125
) (
  input  logic              clk,
  input  logic              rst,
  output logic [N_TAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    if (k == 0) begin : g_direct
      always_comb taps[k] = clk & ~rst;
    end else begin : g_delay
      localparam int unsigned TAP_PS = (PERIOD_PS * k + N_TAPS / 2) / N_TAPS;
      // transport delay: every clock edge reappears TAP_PS later
      always @(posedge clk or negedge clk or posedge rst or negedge rst) begin
        automatic logic v = clk & ~rst;
        fork
          begin
            #(TAP_PS);
            taps[k] = v;
          end
        join_none
      end
    end
  end
endmodule
