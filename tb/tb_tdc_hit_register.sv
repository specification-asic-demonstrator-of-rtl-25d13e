// tb_tdc_hit_register: self-checking test of the TDC hit register bank.
//
// Drives random DLL states, coarse counter values and address lines, and
// random tdr/tdf trigger pulses. The values present at the rising edge of
// tdr must appear as rise fine time, rise coarse pair and address; those at
// the rising edge of tdf as fall fine time and fall coarse pair; inputs that
// change between triggers must not disturb the stored word. hit_tgl must
// toggle once per tdf. A second instance without coarse registers and
// address must read 0 in those fields.
module tb_tdc_hit_register;
  timeunit 1ps; timeprecision 1ps;
  import eoc_pkg::*;

  logic                rst = 1'b0, tdr = 1'b0, tdf = 1'b0;
  logic [FINE_W-1:0]   taps;
  logic [COARSE_W-1:0] cp, cn;
  logic [ADDR_W-1:0]   addr;
  hit_word_t           word, word_nc, exp_w;
  logic                tgl, tgl_nc, tgl_prev;
  int                  checks = 0, failures = 0;

  tdc_hit_register dut (.rst(rst), .tdr(tdr), .tdf(tdf), .dll_taps(taps),
    .cnt_pos(cp), .cnt_neg(cn), .addr_in(addr), .word(word), .hit_tgl(tgl));
  tdc_hit_register #(.HAS_COARSE(1'b0), .HAS_ADDR(1'b0)) dut_nc (.rst(rst), .tdr(tdr), .tdf(tdf),
    .dll_taps(taps), .cnt_pos(cp), .cnt_neg(cn), .addr_in(addr), .word(word_nc), .hit_tgl(tgl_nc));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t: %h", what, $time, word); end
  endtask

  task automatic randomize_inputs();
    taps = $urandom(); cp = $urandom(); cn = $urandom(); addr = 5'($urandom());
  endtask

  initial begin
    randomize_inputs();
    #100 rst = 1'b1;
    #900;
    check(word == '0 && tgl == 1'b0, "reset value");
    rst = 1'b0;
    #1000;
    for (int i = 0; i < 100; i++) begin
      tgl_prev = tgl;
      randomize_inputs();
      #($urandom_range(50, 500));
      exp_w.fine_rise = taps; exp_w.crs_rise_pos = cp; exp_w.crs_rise_neg = cn; exp_w.addr = addr;
      tdr = 1'b1;
      #($urandom_range(50, 500));
      randomize_inputs();
      #2000 tdr = 1'b0;
      check(word.fine_rise == exp_w.fine_rise, "rise fine time");
      check(word.crs_rise_pos == exp_w.crs_rise_pos && word.crs_rise_neg == exp_w.crs_rise_neg, "rise coarse pair");
      check(word.addr == exp_w.addr, "address");
      check(tgl == tgl_prev, "no completion before trailing edge");
      #($urandom_range(1000, 30000));
      randomize_inputs();
      exp_w.fine_fall = taps; exp_w.crs_fall_pos = cp; exp_w.crs_fall_neg = cn;
      tdf = 1'b1;
      #($urandom_range(50, 500));
      randomize_inputs();
      #2000 tdf = 1'b0;
      check(word == exp_w, "complete word");
      check(tgl == ~tgl_prev, "completion toggle");
      check(tgl_nc == tgl, "toggle without coarse");
      check(word_nc.fine_rise == exp_w.fine_rise && word_nc.fine_fall == exp_w.fine_fall, "fine times without coarse");
      check(word_nc.crs_rise_pos == '0 && word_nc.crs_fall_neg == '0 && word_nc.addr == '0, "no coarse, no address");
      #($urandom_range(1000, 5000));
    end
    rst = 1'b1;
    #10 check(word == '0 && tgl == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100 * 45000 + 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
