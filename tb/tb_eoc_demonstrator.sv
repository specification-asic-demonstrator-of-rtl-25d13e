// tb_eoc_demonstrator: end-to-end test of the demonstrator's digital part,
// every parameter at its default.
//
// s1 (45-pixel folded column): the calibration mask is downloaded and read
// back; every pixel is hit once and must come out on its data line's serial
// output with its one-hot segment address, the DLL pattern and both coarse
// counts predicted from the clock waveform. A second hit on a line while
// its first is still being sent must follow back-to-back.
// s2 (9-pixel column): mask download; all 9 lines hit at once, each read out
// on its own output with address 0.
// s5 (stand-alone TDC): external TDR/TDF pairs read out as 64-bit frames.
// Then the same in asynchronous read-out mode with the read-out clocks
// stopped (the lines must flag the waiting hit without a clock), and a hit
// while Reset DLL holds the taps low (fine times must read 0).
// Each mechanism is counted and must have happened at least once: frames
// per structure, synchronous and asynchronous frames, asynchronous flags,
// back-to-back frames, captures where the two coarse counters differ and
// where they agree, mask downloads, and hits during Reset DLL.
module tb_eoc_demonstrator;
  timeunit 1ps; timeprecision 1ps;
  import eoc_pkg::*;
  import tb_eoc_util_pkg::*;

  logic              clk = 1'b0, reset_cnt = 1'b0, reset_dll = 1'b1, async_mode = 1'b0;
  logic              rd = 1'b0, rd5 = 1'b0, run = 1'b1, run5 = 1'b1;
  logic [N_DATA-1:0] s1_rx_data = '0, s2_rx_data = '0, s1_sout, s2_sout;
  logic [ADDR_W-1:0] s1_rx_addr = '0;
  logic              s1_cal_clk = 1'b0, s1_cal_data = 1'b0, s2_cal_clk = 1'b0, s2_cal_data = 1'b0;
  logic [N_PIX-1:0]  s1_cal_mask, m1;
  logic [N_DATA-1:0] s2_cal_mask, m2;
  logic              s5_rst = 1'b0, s5_tdr = 1'b0, s5_tdf = 1'b0, s5_async = 1'b0, s5_sout;

  int     checks = 0, failures = 0;
  int     n_s1 = 0, n_s2 = 0, n_s5 = 0, n_sync = 0, n_async = 0, n_flag = 0, n_b2b = 0;
  int     n_crs_diff = 0, n_crs_same = 0, n_mask = 0, n_dll_rst = 0;
  longint t_rel;
  bit     ok;

  hit_word_t    q1 [N_DATA][$];
  hit_word_t    q2 [N_DATA][$];
  logic [63:0]  q5 [$];
  hit_word_t    w;
  logic [63:0]  w5;

  eoc_demonstrator dut (
    .clk320(clk), .reset_cnt(reset_cnt), .reset_dll(reset_dll), .async_mode(async_mode),
    .s1_rx_data(s1_rx_data), .s1_rx_addr(s1_rx_addr), .s1_rd_clk({N_DATA{rd}}), .s1_sout(s1_sout),
    .s1_cal_clk(s1_cal_clk), .s1_cal_data(s1_cal_data), .s1_cal_mask(s1_cal_mask),
    .s2_rx_data(s2_rx_data), .s2_rd_clk({N_DATA{rd}}), .s2_sout(s2_sout),
    .s2_cal_clk(s2_cal_clk), .s2_cal_data(s2_cal_data), .s2_cal_mask(s2_cal_mask),
    .s5_clk320(clk), .s5_rst(s5_rst), .s5_tdr(s5_tdr), .s5_tdf(s5_tdf), .s5_rd_clk(rd5),
    .s5_async_mode(s5_async), .s5_sout(s5_sout));

  initial begin
    #(T0_PS);
    forever begin
      clk = 1'b1; #(HIGH_PS);
      clk = 1'b0; #(PERIOD_PS - HIGH_PS);
    end
  end
  initial begin #777; forever begin #1562; if (run) rd = ~rd; end end
  initial begin #333; forever begin #1562; if (run5) rd5 = ~rd5; end end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // serial receivers
  for (genvar c = 0; c < N_DATA; c++) begin : g_rx
    logic fv1, fv2;
    logic [HIT_WORD_W-1:0] fw1, fw2;
    int o1, o2, cy1, cy2;
    bit b1, b2;
    tb_serial_rx #(.DATA_W(HIT_WORD_W)) rx1 (.rd_clk(rd), .sout(s1_sout[c]), .frame_valid(fv1),
      .frame_word(fw1), .frame_ones(o1), .frame_cycles(cy1), .frame_b2b(b1));
    tb_serial_rx #(.DATA_W(HIT_WORD_W)) rx2 (.rd_clk(rd), .sout(s2_sout[c]), .frame_valid(fv2),
      .frame_word(fw2), .frame_ones(o2), .frame_cycles(cy2), .frame_b2b(b2));
    always @(posedge rd) begin
      if (fv1) begin
        n_s1++;
        if (async_mode) n_async++; else n_sync++;
        if (b1) n_b2b++;
        check(q1[c].size() > 0, "s1 frame expected");
        if (q1[c].size() > 0) check(fw1 == HIT_WORD_W'(q1[c].pop_front()), "s1 hit word");
        check(cy1 == HDR_W + HIT_WORD_W, "s1 frame length");
        if (!async_mode) check(o1 == 1, "s1 synchronous header");
      end
      if (fv2) begin
        n_s2++;
        if (async_mode) n_async++; else n_sync++;
        check(q2[c].size() > 0, "s2 frame expected");
        if (q2[c].size() > 0) check(fw2 == HIT_WORD_W'(q2[c].pop_front()), "s2 hit word");
        check(cy2 == HDR_W + HIT_WORD_W, "s2 frame length");
      end
    end
  end

  logic fv5;
  logic [63:0] fw5;
  int o5, cy5;
  bit b5;
  tb_serial_rx #(.DATA_W(64)) rx5 (.rd_clk(rd5), .sout(s5_sout), .frame_valid(fv5),
    .frame_word(fw5), .frame_ones(o5), .frame_cycles(cy5), .frame_b2b(b5));
  always @(posedge rd5) if (fv5) begin
    n_s5++;
    if (s5_async) n_async++; else n_sync++;
    check(q5.size() > 0, "s5 frame expected");
    if (q5.size() > 0) check(fw5 == q5.pop_front(), "s5 fine times");
    check(cy5 == 66, "s5 frame length");
  end

  // ---- reference values ----
  // wait until the trigger instant ($time + ofs) is clear of every edge
  task automatic align(longint ofs = 100);
    logic [31:0] d;
    forever begin
      d = dll_state($time + ofs, ok);
      if (ok && edge_dist($time + ofs) > 2) break;
      #3;
    end
  endtask

  function automatic logic [COARSE_W-1:0] cnt_at(longint t, bit neg);
    return COARSE_W'(edges_upto(t, neg) - edges_upto(t_rel, neg));
  endfunction

  function automatic logic [31:0] fine_at(longint t);
    bit okk;
    if (reset_dll) return '0;
    return dll_state(t, okk);
  endfunction

  task automatic lead(ref hit_word_t x, input logic [ADDR_W-1:0] a);
    longint t = $time + 100;
    x.fine_rise = fine_at(t);
    x.crs_rise_pos = cnt_at(t, 1'b0);
    x.crs_rise_neg = cnt_at(t, 1'b1);
    x.addr = a;
    if (x.crs_rise_pos != x.crs_rise_neg) n_crs_diff++; else n_crs_same++;
  endtask

  task automatic trail(ref hit_word_t x);
    longint t = $time + 100;
    x.fine_fall = fine_at(t);
    x.crs_fall_pos = cnt_at(t, 1'b0);
    x.crs_fall_neg = cnt_at(t, 1'b1);
  endtask

  // one s1 pixel hit, time over threshold tot ps
  task automatic s1_hit(int p, int tot);
    hit_word_t x;
    int c = p % N_DATA, seg = p / N_DATA;
    align();
    lead(x, ADDR_W'(1) << seg);
    s1_rx_data[c] = 1'b1; s1_rx_addr[seg] = 1'b1;
    #(tot);
    align();
    trail(x);
    q1[c].push_back(x);
    s1_rx_data[c] = 1'b0; s1_rx_addr[seg] = 1'b0;
  endtask

  task automatic s2_hit_all(int tot);
    hit_word_t x;
    align();
    lead(x, '0);
    s2_rx_data = '1;
    #(tot);
    align();
    trail(x);
    for (int c = 0; c < N_DATA; c++) q2[c].push_back(x);
    s2_rx_data = '0;
  endtask

  task automatic s5_hit(int gap);
    align(0);
    w5[63:32] = fine_at($time);
    s5_tdr = 1'b1; #2500 s5_tdr = 1'b0;
    #(gap);
    align(0);
    w5[31:0] = fine_at($time);
    q5.push_back(w5);
    s5_tdf = 1'b1; #2500 s5_tdf = 1'b0;
  endtask

  task automatic load_masks();
    m1 = {13'($urandom()), $urandom()};
    m2 = 9'($urandom());
    for (int i = N_PIX - 1; i >= 0; i--) begin
      s1_cal_data = m1[i];
      if (i < N_DATA) s2_cal_data = m2[i];
      #5000;
      s1_cal_clk = 1'b1;
      if (i < N_DATA) s2_cal_clk = 1'b1;
      #5000;
      s1_cal_clk = 1'b0; s2_cal_clk = 1'b0;
    end
    check(s1_cal_mask == m1, "s1 calibration mask");
    check(s2_cal_mask == m2, "s2 calibration mask");
    n_mask++;
  endtask

  function automatic int pending();
    int n = q5.size();
    for (int c = 0; c < N_DATA; c++) n += q1[c].size() + q2[c].size();
    return n;
  endfunction

  initial begin
    #100 reset_cnt = 1'b1; s5_rst = 1'b1;
    #(T0_PS + 4 * PERIOD_PS + 300);
    reset_dll = 1'b0; reset_cnt = 1'b0; s5_rst = 1'b0;
    t_rel = $time;
    #(4 * PERIOD_PS);
    load_masks();
    // synchronous read-out: every s1 pixel
    for (int p = 0; p < N_PIX; p++) begin
      #($urandom_range(100, 10000));
      s1_hit(p, $urandom_range(5000, 60000));
      while (pending() != 0) #1000;
    end
    // back-to-back on line 0: pixel 9 hits while pixel 0 is being sent
    s1_hit(0, 10000);
    #(100 * PERIOD_PS);
    s1_hit(9, 10000);
    while (pending() != 0) #1000;
    // s2: all lines at once; s5 hits
    s2_hit_all(20000);
    for (int i = 0; i < 4; i++) begin
      s5_hit($urandom_range(1000, 30000));
      while (q5.size() != 0) #1000;
    end
    while (pending() != 0) #1000;
    #20000;
    // asynchronous read-out with stopped clocks
    async_mode = 1'b1; s5_async = 1'b1;
    for (int i = 0; i < 3; i++) begin
      wait (rd == 1'b0); run = 1'b0;
      wait (rd5 == 1'b0); run5 = 1'b0;
      s1_hit(5 + 9 * i, 20000);
      s2_hit_all(15000);
      s5_hit(8000);
      #5000;
      if (s1_sout[5] && s2_sout == '1 && s5_sout) n_flag++;
      check(s1_sout[5] && s2_sout == '1 && s5_sout, "asynchronous hit flags");
      run = 1'b1; run5 = 1'b1;
      while (pending() != 0) #1000;
      #20000;
    end
    async_mode = 1'b0; s5_async = 1'b0;
    // hit while Reset DLL is held
    reset_dll = 1'b1;
    #5000;
    s1_hit(44, 12000);
    n_dll_rst++;
    while (pending() != 0) #1000;
    reset_dll = 1'b0;
    load_masks();
    #20000;
    check(n_s1 == N_PIX + 2 + 3 + 1, "s1 frame count");
    check(n_s2 == 4 * N_DATA, "s2 frame count");
    check(n_s5 == 7, "s5 frame count");
    check(n_sync > 0, "synchronous frames happened");
    check(n_async > 0, "asynchronous frames happened");
    check(n_flag > 0, "asynchronous flags happened");
    check(n_b2b > 0, "back-to-back frame happened");
    check(n_crs_diff > 0, "coarse counters differed at a capture");
    check(n_crs_same > 0, "coarse counters agreed at a capture");
    check(n_mask > 0, "mask download happened");
    check(n_dll_rst > 0, "hit during Reset DLL happened");
    $display("mechanisms: s1=%0d s2=%0d s5=%0d sync=%0d async=%0d flag=%0d b2b=%0d crs_diff=%0d crs_same=%0d mask=%0d dll_rst=%0d",
             n_s1, n_s2, n_s5, n_sync, n_async, n_flag, n_b2b, n_crs_diff, n_crs_same, n_mask, n_dll_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200 * 1000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
