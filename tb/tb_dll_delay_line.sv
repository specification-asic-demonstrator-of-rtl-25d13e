// tb_dll_delay_line: self-checking test of the DLL tap model.
//
// At random instants compares the 32 taps with the clock waveform delayed
// by k/32 of the 3125 ps period (tap k), computed from the clock alone.
// Instants where a tap is within 1 ps of a clock edge are skipped. Also
// checks that Reset DLL holds every tap low and that the taps of a running
// DLL show both values (a phase pattern, not a constant).
module tb_dll_delay_line;
  timeunit 1ps; timeprecision 1ps;
  import tb_eoc_util_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] taps, exp_taps;
  int          checks = 0, failures = 0, mixed = 0;
  bit          ok;

  dll_delay_line dut (.clk(clk), .rst(rst), .taps(taps));

  initial begin
    #(T0_PS);
    forever begin
      clk = 1'b1; #(HIGH_PS);
      clk = 1'b0; #(PERIOD_PS - HIGH_PS);
    end
  end

  initial begin
    #(T0_PS + 2 * PERIOD_PS + 333);
    for (int i = 0; i < 20; i++) begin
      #($urandom_range(1, 700));
      checks++;
      if (taps != '0) begin failures++; $display("FAIL taps not held in reset: %h", taps); end
    end
    rst = 1'b0;
    #(2 * PERIOD_PS);
    for (int i = 0; i < 2000; i++) begin
      #($urandom_range(1, 5000));
      exp_taps = dll_state($time, ok);
      if (!ok) continue;
      checks++;
      if (taps != exp_taps) begin
        failures++;
        $display("FAIL at %0t taps=%b exp=%b", $time, taps, exp_taps);
      end
      if (taps != '0 && taps != '1) mixed++;
    end
    checks++;
    if (mixed < 100) begin failures++; $display("FAIL phase patterns seen only %0d times", mixed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000 * 5000 + 1000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
