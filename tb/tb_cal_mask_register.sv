// tb_cal_mask_register: self-checking test of the serial calibration mask.
//
// Downloads random 45-bit masks bit by bit (first bit sent ends in the
// highest index), then checks the parallel mask and the bits shifted out at
// cal_sout during the next download, which must be the previous mask.
module tb_cal_mask_register;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 45;
  logic         cal_clk = 1'b0, cal_data = 1'b0, cal_sout;
  logic [N-1:0] mask, pat, prev, seen;
  int           checks = 0, failures = 0;

  cal_mask_register dut (.cal_clk(cal_clk), .cal_data(cal_data), .mask(mask), .cal_sout(cal_sout));

  task automatic load(input logic [N-1:0] m, output logic [N-1:0] out_bits);
    for (int i = N - 1; i >= 0; i--) begin
      cal_data = m[i];
      out_bits[i] = cal_sout;
      #5000 cal_clk = 1'b1;
      #5000 cal_clk = 1'b0;
    end
  endtask

  initial begin
    prev = '0;
    #1000;
    load(prev, seen);
    for (int r = 0; r < 20; r++) begin
      pat = {$urandom(), $urandom()};
      load(pat, seen);
      checks++;
      if (mask != pat) begin failures++; $display("FAIL mask %h exp %h", mask, pat); end
      checks++;
      if (seen != prev) begin failures++; $display("FAIL read-back %h exp %h", seen, prev); end
      prev = pat;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * N * 10000 + 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
