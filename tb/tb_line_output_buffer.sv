// tb_line_output_buffer: self-checking test of the read-out serializer.
//
// Synchronous mode, continuous 320 MHz read-out clock: each hit (a toggle of
// hit_tgl with a new random 197-bit word) must give exactly one frame: one
// '1', one '0', then the word MSB first, 199 clocks in all (622 ns), starting
// within 4 clocks of the toggle; the line must be '0' when idle. A second hit
// during a transfer must follow back-to-back. Asynchronous mode: with the
// read-out clock stopped, a hit must set the line to '1' at once; when the
// clock is started the frame follows.
module tb_line_output_buffer;
  timeunit 1ps; timeprecision 1ps;
  import eoc_pkg::*;

  localparam int W = HIT_WORD_W;
  logic         rd_clk = 1'b0, rst = 1'b0, async_mode = 1'b0, hit_tgl = 1'b0, run = 1'b1;
  logic [W-1:0] word, exp_q[$];
  logic         sout, busy;
  logic         fv;
  logic [W-1:0] fw;
  int           fones, fcyc;
  bit           fb2b;
  int           checks = 0, failures = 0, frames = 0, b2b_frames = 0, async_frames = 0;
  int           f0 = 0, cyc = 0, tgl_cyc = 0, idle_high = 0;

  line_output_buffer dut (.rd_clk(rd_clk), .rst(rst), .async_mode(async_mode),
    .hit_tgl(hit_tgl), .word(word), .sout(sout), .busy(busy));
  tb_serial_rx #(.DATA_W(W)) rx (.rd_clk(rd_clk), .sout(sout), .frame_valid(fv),
    .frame_word(fw), .frame_ones(fones), .frame_cycles(fcyc), .frame_b2b(fb2b));

  always begin
    #1562;
    if (run) rd_clk = ~rd_clk;
  end
  always @(posedge rd_clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < W; i += 32) w = {w, $urandom()};
    return w;
  endfunction

  always @(posedge rd_clk) if (fv) begin
    frames++;
    check(exp_q.size() > 0, "unexpected frame");
    if (exp_q.size() > 0) check(fw == exp_q.pop_front(), "frame data");
    check(fcyc == HDR_W + W, "199 clocks per frame");
    if (!async_mode) check(fones == 1, "single header '1'");
    if (fb2b) b2b_frames++;
    if (async_mode) async_frames++;
  end

  // the idle line is low in synchronous mode
  always @(negedge rd_clk) if (!async_mode && !busy && !rst && sout) idle_high++;

  task automatic send_hit(logic [W-1:0] w);
    word = w;
    exp_q.push_back(w);
    #10 hit_tgl = ~hit_tgl;
    tgl_cyc = cyc;
  endtask

  initial begin
    word = '0;
    #100 rst = 1'b1;
    #10000 rst = 1'b0;
    // synchronous single hits
    for (int i = 0; i < 10; i++) begin
      send_hit(rand_word());
      wait (busy);
      check(cyc - tgl_cyc <= 4, "copy latency");
      wait (!busy);
      #($urandom_range(1000, 20000));
    end
    // back-to-back: a second hit while the first is being sent
    send_hit(rand_word());
    wait (busy);
    #(50 * 3125);
    f0 = frames;
    send_hit(rand_word());
    wait (frames == f0 + 1);
    check(busy, "second frame follows without gap");
    wait (!busy);
    #20000;
    // asynchronous mode with the read-out clock stopped
    async_mode = 1'b1;
    for (int i = 0; i < 5; i++) begin
      wait (rd_clk == 1'b0);
      run = 1'b0;
      #5000;
      check(sout == 1'b0, "async idle low");
      send_hit(rand_word());
      #1000;
      check(sout == 1'b1, "async line high without clock");
      #20000;
      check(sout == 1'b1 && !busy, "async line waits for the clock");
      run = 1'b1;
      wait (busy);
      wait (!busy);
      #10000;
    end
    #20000;
    check(exp_q.size() == 0, "all hits read out");
    check(frames == 17, "frame count");
    check(b2b_frames == 1, "back-to-back frame seen");
    check(async_frames == 5, "asynchronous frames seen");
    check(idle_high == 0, "synchronous idle line low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40 * 1000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
