// tb_eoc_channel: self-checking test of one end-of-column channel.
//
// Sends receiver pulses (time over threshold 5 to 100 ns) into the channel
// while the testbench drives the DLL taps, coarse counters and address lines
// with random values that it changes around every edge. The serial frame of
// each hit must carry the values present 100 ps after the leading edge (rise
// fine time, rise coarse pair, address) and after the trailing edge (fall
// fine time, fall coarse pair). The frame must start at most 5 read-out
// clocks after the trailing edge and last 199 clocks. Runs in synchronous
// mode with a 320 MHz and then a 100 MHz read-out clock, then in
// asynchronous mode.
module tb_eoc_channel;
  timeunit 1ps; timeprecision 1ps;
  import eoc_pkg::*;

  logic                rst = 1'b0, hit = 1'b0, rd_clk = 1'b0, async_mode = 1'b0;
  logic [FINE_W-1:0]   taps;
  logic [COARSE_W-1:0] cp, cn;
  logic [ADDR_W-1:0]   addr;
  logic                sout;
  hit_word_t           exp_w;
  logic                fv;
  logic [HIT_WORD_W-1:0] fw;
  int                  fones, fcyc;
  bit                  fb2b;
  int                  checks = 0, failures = 0, frames = 0, cyc = 0, cyc_tf = 0;

  eoc_channel dut (.rst(rst), .hit(hit), .dll_taps(taps), .cnt_pos(cp), .cnt_neg(cn),
    .addr_in(addr), .rd_clk(rd_clk), .async_mode(async_mode), .sout(sout));
  tb_serial_rx #(.DATA_W(HIT_WORD_W)) rx (.rd_clk(rd_clk), .sout(sout), .frame_valid(fv),
    .frame_word(fw), .frame_ones(fones), .frame_cycles(fcyc), .frame_b2b(fb2b));

  int half_ps = 1562;   // read-out clock half period
  always #(half_ps) rd_clk = ~rd_clk;
  always @(posedge rd_clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic scramble();
    taps = $urandom(); cp = $urandom(); cn = $urandom(); addr = 5'($urandom());
  endtask

  always @(posedge rd_clk) if (fv) begin
    frames++;
    check(fw == HIT_WORD_W'(exp_w), "frame carries the hit");
    check(fcyc == HDR_W + HIT_WORD_W, "199 clocks per frame");
    check(cyc - cyc_tf <= 5 + HDR_W + HIT_WORD_W, "read-out latency");
  end

  initial begin
    scramble();
    #100 rst = 1'b1;
    #5000 rst = 1'b0;
    for (int i = 0; i < 12; i++) begin
      if (i == 3) half_ps = 5000;   // 100 MHz read-out clock
      if (i == 6) begin half_ps = 1562; async_mode = 1'b1; end
      #($urandom_range(1000, 5000));
      scramble();
      exp_w.fine_rise = taps; exp_w.crs_rise_pos = cp; exp_w.crs_rise_neg = cn; exp_w.addr = addr;
      hit = 1'b1;
      #600 scramble();
      #($urandom_range(5000, 100000));
      scramble();
      exp_w.fine_fall = taps; exp_w.crs_fall_pos = cp; exp_w.crs_fall_neg = cn;
      hit = 1'b0;
      cyc_tf = cyc;
      #600 scramble();
      wait (frames == i + 1);
    end
    check(frames == 12, "one frame per hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(12 * 2 * 1000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
