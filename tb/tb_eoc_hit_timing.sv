// tb_eoc_hit_timing: time measurement through the 45-pixel column end of
// column, decoded the way an off-line analysis would decode the read-out.
//
// Hits of random pixels arrive at random times with random time over
// threshold. From each serial frame alone (plus the known clock start) the
// testbench reconstructs:
//   pixel   = data line + 9 * (index of the set address bit)
//   phase   = (j + 0.5) * T/32, where tap j is '1' and tap j+1 is '0' (the
//             last rising clock edge lies between them)
//   edge    = time of the last rising clock edge, from the rising-edge
//             counter when the phase is in [T/4, 3T/4), otherwise from the
//             falling-edge counter, which is then half a period away from
//             its own edge (the fine time selects the counter)
//   time    = edge + phase, for the leading and for the trailing edge.
// Each leading/trailing time must match the true edge time plus the 100 ps
// trigger delay within half a bin plus 2 ps, and the time over threshold
// within one bin. Both coarse counters must have been chosen at least once.
// The RMS error is printed.
module tb_eoc_hit_timing;
  timeunit 1ps; timeprecision 1ps;
  import eoc_pkg::*;
  import tb_eoc_util_pkg::*;

  localparam int     N_HITS = 150;
  localparam real    BIN    = real'(PERIOD_PS) / N_TAPS;

  logic              clk = 1'b0, reset_cnt = 1'b0, reset_dll = 1'b1, rd = 1'b0;
  logic [N_DATA-1:0] rx_data = '0, sout;
  logic [ADDR_W-1:0] rx_addr = '0;
  int                checks = 0, failures = 0, frames = 0, use_pos = 0, use_neg = 0;
  longint            t_rel, r0, f0;
  longint            t_lead [N_DATA], t_trail [N_DATA];
  int                pix [N_DATA];
  real               sq_err = 0.0, max_err = 0.0;

  eoc_column dut (.clk320(clk), .reset_cnt(reset_cnt), .reset_dll(reset_dll),
    .async_mode(1'b0), .rx_data(rx_data), .rx_addr(rx_addr),
    .rd_clk({N_DATA{rd}}), .sout(sout));

  initial begin
    #(T0_PS);
    forever begin
      clk = 1'b1; #(HIGH_PS);
      clk = 1'b0; #(PERIOD_PS - HIGH_PS);
    end
  end
  initial begin #500; forever #1562 rd = ~rd; end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // off-line decoding of one edge: DLL pattern and the two counters
  function automatic real decode(logic [31:0] taps, logic [31:0] cp, logic [31:0] cn);
    int  j = -1;
    real phase, edge_t;
    for (int k = 0; k < 31; k++) if (taps[k] && !taps[k+1]) j = k;
    if (j < 0) j = 31;
    phase = (j + 0.5) * BIN;
    if (phase >= PERIOD_PS / 4.0 && phase < 3.0 * PERIOD_PS / 4.0) begin
      use_pos++;
      edge_t = real'(r0) + real'(longint'(cp) - 1) * PERIOD_PS;
    end else begin
      use_neg++;
      edge_t = real'(f0) + real'(longint'(cn) - 1) * PERIOD_PS;
      edge_t += (phase >= PERIOD_PS / 2.0) ? -(PERIOD_PS - HIGH_PS) : real'(PERIOD_PS - HIGH_PS);
    end
    return edge_t + phase;
  endfunction

  for (genvar c = 0; c < N_DATA; c++) begin : g_rx
    logic fv;
    hit_word_t fw;
    int o, cy;
    bit b;
    tb_serial_rx #(.DATA_W(HIT_WORD_W)) rx (.rd_clk(rd), .sout(sout[c]), .frame_valid(fv),
      .frame_word(fw), .frame_ones(o), .frame_cycles(cy), .frame_b2b(b));
    always @(posedge rd) if (fv) begin
      real tl, tt, el, et;
      int  seg = -1;
      frames++;
      for (int a = 0; a < ADDR_W; a++) if (fw.addr[a]) seg = a;
      check($countones(fw.addr) == 1 && c + N_DATA * seg == pix[c], "pixel identity");
      tl = decode(fw.fine_rise, fw.crs_rise_pos, fw.crs_rise_neg);
      tt = decode(fw.fine_fall, fw.crs_fall_pos, fw.crs_fall_neg);
      el = tl - real'(t_lead[c] + 100);
      et = tt - real'(t_trail[c] + 100);
      sq_err += el * el + et * et;
      if (el > max_err) max_err = el;
      if (-el > max_err) max_err = -el;
      if (et > max_err) max_err = et;
      if (-et > max_err) max_err = -et;
      check(el <= BIN / 2 + 2.0 && -el <= BIN / 2 + 2.0, "leading edge time");
      check(et <= BIN / 2 + 2.0 && -et <= BIN / 2 + 2.0, "trailing edge time");
      check((tt - tl) - real'(t_trail[c] - t_lead[c]) <= BIN + 2.0 &&
            real'(t_trail[c] - t_lead[c]) - (tt - tl) <= BIN + 2.0, "time over threshold");
      if (el > BIN / 2 + 2.0 || -el > BIN / 2 + 2.0) $display("  lead err %f taps %b", el, fw.fine_rise);
    end
  end

  initial begin
    #100 reset_cnt = 1'b1;
    #(T0_PS + 4 * PERIOD_PS + 300);
    reset_dll = 1'b0;
    reset_cnt = 1'b0;
    t_rel = $time;
    // first counted rising and falling edges after the reset release
    r0 = T0_PS + PERIOD_PS * edges_upto(t_rel, 1'b0);
    f0 = T0_PS + HIGH_PS + PERIOD_PS * edges_upto(t_rel, 1'b1);
    #(4 * PERIOD_PS);
    for (int h = 0; h < N_HITS; h++) begin
      int p = $urandom_range(0, N_PIX - 1);
      int c = p % N_DATA, seg = p / N_DATA;
      #($urandom_range(100, 20000));
      pix[c] = p;
      t_lead[c] = $time;
      rx_data[c] = 1'b1; rx_addr[seg] = 1'b1;
      #($urandom_range(3000, 50000));
      t_trail[c] = $time;
      rx_data[c] = 1'b0; rx_addr[seg] = 1'b0;
      wait (frames == h + 1);
    end
    check(use_pos > 0 && use_neg > 0, "both coarse counters selected");
    $display("decoded %0d hits: rms error %0.1f ps, max %0.1f ps, bin %0.1f ps, counters used pos=%0d neg=%0d",
             frames, $sqrt(sq_err / (2.0 * frames)), max_err, BIN, use_pos, use_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N_HITS * 1000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
