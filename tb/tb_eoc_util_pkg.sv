// tb_eoc_util_pkg: reference arithmetic shared by the EOC testbenches.
//
// The testbenches generate the 320 MHz clock themselves: low until T0_PS,
// then high for HIGH_PS and low for PERIOD_PS - HIGH_PS, repeating. These
// functions predict, from that waveform alone, what the DLL taps and the
// coarse counters must show at a given time, independently of the design.
package tb_eoc_util_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam longint PERIOD_PS = 3125;
  localparam longint HIGH_PS   = 1562;
  localparam longint T0_PS     = 1000;
  localparam int     N_TAPS    = 32;

  // delay of DLL tap k, rounded to the nearest ps
  function automatic longint tap_delay(int k);
    return (PERIOD_PS * k + N_TAPS / 2) / N_TAPS;
  endfunction

  // distance of time t from the nearest clock edge (large before T0)
  function automatic longint edge_dist(longint t);
    longint ph, d;
    if (t < T0_PS) return T0_PS - t;
    ph = (t - T0_PS) % PERIOD_PS;
    d = ph;
    if (PERIOD_PS - ph < d) d = PERIOD_PS - ph;
    if (ph >= HIGH_PS && ph - HIGH_PS < d) d = ph - HIGH_PS;
    if (ph < HIGH_PS && HIGH_PS - ph < d) d = HIGH_PS - ph;
    return d;
  endfunction

  function automatic bit clk_level(longint t);
    if (t < T0_PS) return 1'b0;
    return ((t - T0_PS) % PERIOD_PS) < HIGH_PS;
  endfunction

  // expected DLL state at time t; ok = 0 if some tap is within 1 ps of an edge
  function automatic logic [N_TAPS-1:0] dll_state(longint t, output bit ok);
    logic [N_TAPS-1:0] v;
    ok = 1'b1;
    for (int k = 0; k < N_TAPS; k++) begin
      v[k] = clk_level(t - tap_delay(k));
      if (edge_dist(t - tap_delay(k)) <= 1) ok = 1'b0;
    end
    return v;
  endfunction

  // number of rising (neg = 0) or falling (neg = 1) edges at or before t
  function automatic longint edges_upto(longint t, bit neg);
    longint first;
    first = T0_PS + (neg ? HIGH_PS : 0);
    if (t < first) return 0;
    return (t - first) / PERIOD_PS + 1;
  endfunction
endpackage
