// tb_ldpc_chip -- end-to-end test of the test chip at its default (full)
// size.
//
// Part 1 runs the on-chip BER tester: the AWGN generators feed the decoder
// while the code rate and the noise level change every few frames. Every
// frame the decoder accepts is recorded by tag (its LLRs, its rate); every
// decoded frame is compared with the behavioural reference (ldpc_ref_pkg):
// decisions, iteration count, early-termination flag. The error collector's
// counters must equal the sums of frames, frame errors, information-bit
// errors and iterations formed here from the decoded frames.
// Part 2 feeds external frames through the ext_valid/ext_ready handshake
// and checks them the same way; then the statistics are cleared.
// Mechanisms counted (each must occur): early termination, stop at the
// iteration limit, two frames in flight, out-of-order completion, rate
// change, generator stall while the decoder is busy, AWGN and external
// sources, split and full-weight check node modes, statistics clear.
module tb_ldpc_chip;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  rate_e        rate;
  logic [4:0]   max_iter;
  logic         et_en;
  logic         src_awgn;
  logic [4:0]   awgn_mean;
  logic [7:0]   awgn_scale;
  logic         stats_clear;
  logic         ext_valid;
  logic         ext_ready;
  msg_t         ext_llr [N];
  logic         dec_valid;
  logic [7:0]   dec_tag;
  rate_e        dec_rate;
  logic [4:0]   dec_iters;
  logic         dec_et;
  logic [N-1:0] dec_bits;
  logic [31:0]  stat_frames, stat_frame_errs, stat_bit_errs, stat_iter_sum;

  ldpc_chip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int NAWGN = 24;
  localparam int NEXT  = 4;

  int  t_llr  [256][N];
  int  t_rate [256];
  int  n_acc = 0, n_out = 0;
  int  e_frames = 0, e_ferr = 0, e_berr = 0, e_iter = 0;
  int  last_tag = -1;
  int  m_et = 0, m_max = 0, m_both = 0, m_ooo = 0, m_rate = 0, m_stall = 0;
  int  m_awgn = 0, m_ext = 0, m_split = 0, m_full = 0, m_clear = 0;

  function automatic int sm2i(msg_t m);
    return m[4] ? -int'(m[3:0]) : int'(m[3:0]);
  endfunction

  // record every frame the decoder accepts
  always @(posedge clk) if (rst_n) begin
    if (dut.dec_in_valid && dut.dec_in_ready) begin
      int tg;
      tg = int'(dut.tag);
      for (int v = 0; v < N; v++) t_llr[tg][v] = sm2i(dut.dec_in_llr[v]);
      t_rate[tg] = int'(rate);
      if (n_acc > 0 && t_rate[tg] != t_rate[(tg + 255) % 256]) m_rate++;
      if (src_awgn) m_awgn++; else m_ext++;
      n_acc++;
    end
    if (dut.u_dec.u_ctrl.active == 2'b11) m_both++;
    if (src_awgn && dut.afull && !dut.dec_in_ready) m_stall++;
    if (dut.u_dec.u_ctrl.c3.valid) begin
      if (dut.u_dec.s3_cfg.full) m_full++; else m_split++;
    end
  end

  // check every decoded frame
  always @(posedge clk) if (rst_n && dec_valid) begin
    int f, riters, mism, ierr;
    bit rbits [N];
    bit ret;
    f = int'(dec_tag);
    ref_decode(t_llr[f], t_rate[f], int'(max_iter), et_en, 1, rbits, riters, ret);
    mism = 0;
    ierr = 0;
    for (int v = 0; v < N; v++) begin
      if (rbits[v] != dec_bits[v]) mism++;
      if (v < KBITS[t_rate[f]] && dec_bits[v]) ierr++;
    end
    checks++;
    if (mism != 0 || int'(dec_iters) != riters || dec_et != ret || int'(dec_rate) != t_rate[f]) begin
      failures++;
      $display("FAIL frame %0d: %0d bits differ, iters %0d/%0d, et %0d/%0d", f, mism, dec_iters, riters, dec_et, ret);
    end
    e_frames++; e_iter += riters; e_berr += ierr; if (ierr > 0) e_ferr++;
    if (ret) m_et++; else m_max++;
    if (f < last_tag) m_ooo++;
    last_tag = f;
    n_out++;
  end

  task automatic check_stats(string what);
    checks++;
    if (int'(stat_frames) != e_frames || int'(stat_frame_errs) != e_ferr ||
        int'(stat_bit_errs) != e_berr || int'(stat_iter_sum) != e_iter) begin
      failures++;
      $display("FAIL stats %s: %0d %0d %0d %0d expected %0d %0d %0d %0d", what,
               stat_frames, stat_frame_errs, stat_bit_errs, stat_iter_sum,
               e_frames, e_ferr, e_berr, e_iter);
    end
  endtask

  initial begin
    rate = RATE_1_2; max_iter = 5'd15; et_en = 1; src_awgn = 0;
    awgn_mean = 5'd6; awgn_scale = 8'd28; stats_clear = 0; ext_valid = 0;
    foreach (ext_llr[i]) ext_llr[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- part 1: on-chip AWGN source ----
    @(negedge clk);
    src_awgn = 1;
    while (n_acc < NAWGN) begin
      @(negedge clk);
      rate       = rate_e'((n_acc / 3) % 4);
      awgn_scale = (n_acc % 4 == 1) ? 8'd60 : 8'd24;     // some frames very noisy
    end
    src_awgn = 0;
    wait (n_out == n_acc);
    repeat (2) @(negedge clk);
    check_stats("awgn");
    $display("BER tester: %0d frames, %0d frame errors, %0d bit errors, %0d iterations",
             stat_frames, stat_frame_errs, stat_bit_errs, stat_iter_sum);

    // ---- part 2: external frames ----
    for (int f = 0; f < NEXT; f++) begin
      @(negedge clk);
      rate = rate_e'(f % 4);
      for (int v = 0; v < N; v++) begin
        int x;
        x = 5 + int'($urandom_range(0, 12)) - 6;
        ext_llr[v] = {x < 0, 4'(x < 0 ? -x : x)};
      end
      ext_valid = 1;
      #1;
      while (!ext_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      ext_valid = 0;
    end
    wait (n_out == n_acc);
    repeat (2) @(negedge clk);
    check_stats("ext");
    stats_clear = 1;
    @(negedge clk);
    stats_clear = 0;
    e_frames = 0; e_ferr = 0; e_berr = 0; e_iter = 0;
    @(negedge clk);
    check_stats("clear");
    m_clear++;

    $display("mechanisms: et=%0d max=%0d both=%0d ooo=%0d rate=%0d stall=%0d awgn=%0d ext=%0d split=%0d full=%0d clear=%0d",
             m_et, m_max, m_both, m_ooo, m_rate, m_stall, m_awgn, m_ext, m_split, m_full, m_clear);
    checks++; if (m_et == 0)    begin failures++; $display("FAIL no early termination"); end
    checks++; if (m_max == 0)   begin failures++; $display("FAIL no iteration-limit stop"); end
    checks++; if (m_both == 0)  begin failures++; $display("FAIL never two frames"); end
    checks++; if (m_ooo == 0)   begin failures++; $display("FAIL never out of order"); end
    checks++; if (m_rate == 0)  begin failures++; $display("FAIL no rate change"); end
    checks++; if (m_stall == 0) begin failures++; $display("FAIL generators never stalled"); end
    checks++; if (m_awgn == 0 || m_ext == 0) begin failures++; $display("FAIL a source unused"); end
    checks++; if (m_split == 0 || m_full == 0) begin failures++; $display("FAIL a CN mode unused"); end
    checks++; if (n_out != NAWGN + NEXT) begin failures++; $display("FAIL %0d frames out", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
