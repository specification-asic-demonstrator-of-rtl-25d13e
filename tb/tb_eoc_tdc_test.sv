// tb_eoc_tdc_test: self-checking test of the stand-alone TDC structure.
//
// Applies external TDR and TDF trigger pulses (2.5 ns) at random times. Each
// pair must be read out as one 66-clock frame ('1', '0', 64 bits) holding
// the DLL tap pattern predicted from the clock waveform at the TDR and TDF
// rising edges. Half the hits are read in asynchronous mode with the
// read-out clock stopped until the line signals the hit.
module tb_eoc_tdc_test;
  timeunit 1ps; timeprecision 1ps;
  import tb_eoc_util_pkg::*;

  localparam int W = 64;
  logic         clk = 1'b0, rst = 1'b0, tdr = 1'b0, tdf = 1'b0, rd = 1'b0, run = 1'b1, async_mode = 1'b0;
  logic         sout, fv;
  logic [W-1:0] fw, exp_w;
  int           fones, fcyc;
  bit           fb2b, ok;
  int           checks = 0, failures = 0, frames = 0, async_seen = 0;

  eoc_tdc_test dut (.clk320(clk), .rst(rst), .tdr_in(tdr), .tdf_in(tdf), .rd_clk(rd),
    .async_mode(async_mode), .sout(sout));
  tb_serial_rx #(.DATA_W(W)) rx (.rd_clk(rd), .sout(sout), .frame_valid(fv), .frame_word(fw),
    .frame_ones(fones), .frame_cycles(fcyc), .frame_b2b(fb2b));

  initial begin
    #(T0_PS);
    forever begin
      clk = 1'b1; #(HIGH_PS);
      clk = 1'b0; #(PERIOD_PS - HIGH_PS);
    end
  end
  always begin
    #1562;
    if (run) rd = ~rd;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge rd) if (fv) begin
    frames++;
    check(fw == exp_w, "fine times");
    if (fw != exp_w) $display("  got %h exp %h ones=%0d", fw, exp_w, fones);
    check(fcyc == 2 + W, "66 clocks per frame");
  end

  task automatic align();
    logic [31:0] d;
    forever begin
      d = dll_state($time, ok);
      if (ok) break;
      #3;
    end
  endtask

  initial begin
    #100 rst = 1'b1;
    #(T0_PS + 4 * PERIOD_PS) rst = 1'b0;
    #(4 * PERIOD_PS);
    for (int i = 0; i < 20; i++) begin
      if (i == 10) async_mode = 1'b1;
      #($urandom_range(100, 9000));
      align();
      exp_w[63:32] = dll_state($time, ok);
      tdr = 1'b1; #2500 tdr = 1'b0;
      #($urandom_range(1000, 50000));
      if (async_mode) begin
        wait (rd == 1'b0);
        run = 1'b0;
      end
      align();
      exp_w[31:0] = dll_state($time, ok);
      tdf = 1'b1; #2500 tdf = 1'b0;
      if (async_mode) begin
        #3000;
        if (sout) async_seen++;
        run = 1'b1;
      end
      wait (frames == i + 1);
    end
    check(async_seen == 10, "asynchronous hit flag without clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 1000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
