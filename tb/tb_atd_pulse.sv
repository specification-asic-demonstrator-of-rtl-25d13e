// tb_atd_pulse: self-checking test of the transition detector model.
//
// Sends hit pulses of random length (time over threshold 5 to 60 ns) and
// measures, for each, when tdr and tdf rise and how long they stay high:
// tdr must start 100 ps after the leading edge, tdf 100 ps after the trailing
// edge, both 2500 ps wide, exactly one pulse each per hit.
module tb_atd_pulse;
  timeunit 1ps; timeprecision 1ps;

  logic   hit = 1'b0;
  logic   tdr, tdf;
  int     checks = 0, failures = 0, n_tdr = 0, n_tdf = 0;
  longint t_hr, t_hf, t_rr, t_rf, t_fr, t_ff;

  atd_pulse dut (.hit(hit), .tdr(tdr), .tdf(tdf));

  always @(posedge tdr) begin t_rr = $time; n_tdr++; end
  always @(negedge tdr) t_rf = $time;
  always @(posedge tdf) begin t_fr = $time; n_tdf++; end
  always @(negedge tdf) t_ff = $time;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000;
    for (int i = 0; i < 50; i++) begin
      hit = 1'b1; t_hr = $time;
      #($urandom_range(5000, 60000));
      hit = 1'b0; t_hf = $time;
      #($urandom_range(5000, 30000));
      check(t_rr - t_hr == 100, "tdr delay");
      check(t_rf - t_rr == 2500, "tdr width");
      check(t_fr - t_hf == 100, "tdf delay");
      check(t_ff - t_fr == 2500, "tdf width");
      check(n_tdr == i + 1 && n_tdf == i + 1, "one pulse per edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50 * 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
