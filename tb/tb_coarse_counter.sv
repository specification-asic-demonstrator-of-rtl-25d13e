// tb_coarse_counter: self-checking test of the two coarse time counters.
//
// Runs the 320 MHz clock, releases the reset between two edges, and at many
// random instants compares cnt_pos and cnt_neg with the number of rising and
// falling clock edges counted from the clock waveform since the reset. A
// 4-bit instance is run past its wrap-around. Reset is checked to clear both.
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1ps;
  import tb_eoc_util_pkg::*;

  logic        clk = 1'b0, rst = 1'b0;
  logic [31:0] cnt_pos, cnt_neg;
  logic [3:0]  s_pos, s_neg;
  int          checks = 0, failures = 0;
  longint      t_rel, t, e_pos, e_neg;

  coarse_counter dut (.clk(clk), .rst(rst), .cnt_pos(cnt_pos), .cnt_neg(cnt_neg));
  coarse_counter #(.COARSE_W(4)) dut4 (.clk(clk), .rst(rst), .cnt_pos(s_pos), .cnt_neg(s_neg));

  initial begin
    #(T0_PS);
    forever begin
      clk = 1'b1; #(HIGH_PS);
      clk = 1'b0; #(PERIOD_PS - HIGH_PS);
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: pos=%0d neg=%0d", what, $time, cnt_pos, cnt_neg);
    end
  endtask

  initial begin
    #100 rst = 1'b1;
    #(T0_PS + 3 * PERIOD_PS + 600);
    check(cnt_pos == 0 && cnt_neg == 0, "held in reset");
    rst = 1'b0;
    t_rel = $time;
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(1, 40000));
      t = $time;
      if (edge_dist(t) < 2) #5;
      t = $time;
      e_pos = edges_upto(t, 1'b0) - edges_upto(t_rel, 1'b0);
      e_neg = edges_upto(t, 1'b1) - edges_upto(t_rel, 1'b1);
      check(cnt_pos == 32'(e_pos), "rising-edge counter");
      check(cnt_neg == 32'(e_neg), "falling-edge counter");
      check(s_pos == 4'(e_pos) && s_neg == 4'(e_neg), "4-bit counters wrap");
    end
    check(e_pos > 100, "enough edges counted");
    #100 rst = 1'b1;
    #10 check(cnt_pos == 0 && cnt_neg == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200 * 45000 + 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
