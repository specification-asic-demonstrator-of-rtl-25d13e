// tb_eoc_column: self-checking test of the end of column of the 45-pixel bus.
//
// Hits every pixel p of the folded column in turn (data line p mod 9 and
// address line p / 9 pulse together, as the pixel's two line drivers do) at
// random times, with the real DLL model and coarse counters running on the
// 320 MHz clock. Each hit must come out, once, on serial output p mod 9 with
// address one-hot 1 << (p / 9), the DLL tap pattern and both coarse counts
// predicted from the clock waveform for the instants 100 ps after each edge,
// and a 199-clock frame. Then three pixels on different data lines and in
// the same folded segment are hit at once: their three channels must work
// in parallel.
module tb_eoc_column;
  timeunit 1ps; timeprecision 1ps;
  import eoc_pkg::*;
  import tb_eoc_util_pkg::*;

  logic              clk = 1'b0, reset_cnt = 1'b0, reset_dll = 1'b1, async_mode = 1'b0, rd = 1'b0;
  logic [N_DATA-1:0] rx_data = '0, sout;
  logic [ADDR_W-1:0] rx_addr = '0;
  hit_word_t         exp_w [N_DATA];
  int                exp_n [N_DATA];
  int                checks = 0, failures = 0, frames = 0, skipped = 0;
  longint            t_rel;

  eoc_column dut (.clk320(clk), .reset_cnt(reset_cnt), .reset_dll(reset_dll),
    .async_mode(async_mode), .rx_data(rx_data), .rx_addr(rx_addr),
    .rd_clk({N_DATA{rd}}), .sout(sout));

  initial begin
    #(T0_PS);
    forever begin
      clk = 1'b1; #(HIGH_PS);
      clk = 1'b0; #(PERIOD_PS - HIGH_PS);
    end
  end
  initial begin
    #777;
    forever #1562 rd = ~rd;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar c = 0; c < N_DATA; c++) begin : g_rx
    logic                  fv;
    logic [HIT_WORD_W-1:0] fw;
    int                    fones, fcyc;
    bit                    fb2b;
    tb_serial_rx #(.DATA_W(HIT_WORD_W)) rx (.rd_clk(rd), .sout(sout[c]), .frame_valid(fv),
      .frame_word(fw), .frame_ones(fones), .frame_cycles(fcyc), .frame_b2b(fb2b));
    always @(posedge rd) if (fv) begin
      frames++;
      check(exp_n[c] == 1, $sformatf("frame expected on line %0d", c));
      exp_n[c]--;
      check(fw == HIT_WORD_W'(exp_w[c]), $sformatf("hit word on line %0d", c));
      if (fw != HIT_WORD_W'(exp_w[c])) $display("  got %h\n  exp %h", fw, exp_w[c]);
      check(fcyc == HDR_W + HIT_WORD_W, "199 clocks per frame");
    end
  end

  // wait until 'now + 100 ps' (the trigger instant) is clear of every edge
  task automatic align();
    bit ok;
    logic [31:0] d;
    forever begin
      d = dll_state($time + 100, ok);
      if (ok && edge_dist($time + 100) > 2) break;
      #3;
    end
  endtask

  function automatic logic [COARSE_W-1:0] cnt_at(longint t, bit neg);
    return COARSE_W'(edges_upto(t, neg) - edges_upto(t_rel, neg));
  endfunction

  // expected capture at a trigger instant t (100 ps after the edge)
  task automatic expect_edge(int c, bit lead, int seg);
    bit ok;
    longint t = $time + 100;
    if (lead) begin
      exp_w[c].fine_rise    = dll_state(t, ok);
      exp_w[c].crs_rise_pos = cnt_at(t, 1'b0);
      exp_w[c].crs_rise_neg = cnt_at(t, 1'b1);
      exp_w[c].addr         = ADDR_W'(1) << seg;
    end else begin
      exp_w[c].fine_fall    = dll_state(t, ok);
      exp_w[c].crs_fall_pos = cnt_at(t, 1'b0);
      exp_w[c].crs_fall_neg = cnt_at(t, 1'b1);
    end
  endtask

  initial begin
    foreach (exp_n[c]) exp_n[c] = 0;
    #100 reset_cnt = 1'b1;
    #(T0_PS + 4 * PERIOD_PS + 300);
    reset_dll = 1'b0;
    reset_cnt = 1'b0;
    t_rel = $time;
    #(4 * PERIOD_PS);
    // every pixel once
    for (int p = 0; p < N_PIX; p++) begin
      int c = p % N_DATA, seg = p / N_DATA;
      #($urandom_range(100, 20000));
      align();
      expect_edge(c, 1'b1, seg);
      exp_n[c]++;
      rx_data[c] = 1'b1; rx_addr[seg] = 1'b1;
      #($urandom_range(5000, 80000));
      align();
      expect_edge(c, 1'b0, seg);
      rx_data[c] = 1'b0; rx_addr[seg] = 1'b0;
      wait (frames == p + 1);
    end
    // three lines of one segment at once
    #5000 align();
    for (int c = 2; c < 5; c++) begin expect_edge(c, 1'b1, 3); exp_n[c]++; end
    rx_data[4:2] = '1; rx_addr[3] = 1'b1;
    #30000 align();
    for (int c = 2; c < 5; c++) expect_edge(c, 1'b0, 3);
    rx_data[4:2] = '0; rx_addr[3] = 1'b0;
    wait (frames == N_PIX + 3);
    #20000;
    check(frames == N_PIX + 3, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60 * 1000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
