// tb_ldpc_decoder -- self-checking test of the decoder core at full size.
//
// Frames of noisy LLRs for the all-zero codeword, for random nonzero
// codewords, and some purely random frames, of all four code rates, are fed
// back to back. Each decoded frame
// is compared, matched by tag, with the behavioural reference
// (ldpc_ref_pkg): all 672 decision bits, the iteration count and the early
// termination flag. Timing checks: a frame leaves 8*iters+1 .. 8*iters+8
// cycles after it was accepted, and a continuous stream with a fixed
// iteration count M completes two frames per 8*M cycles.
// Mechanisms counted: early termination, max-iteration stop, both frame
// slots busy at once, out-of-order completion, rate change between
// consecutive frames, and loading into a retiring slot.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int NF = 28;

  logic        clk = 0, rst_n = 0;
  logic        in_valid;
  logic        in_ready;
  rate_e       in_rate;
  logic [7:0]  in_tag;
  msg_t        in_llr [N];
  logic [4:0]  max_iter;
  logic        et_en;
  logic        out_valid;
  logic [7:0]  out_tag;
  rate_e       out_rate;
  logic [4:0]  out_iters;
  logic        out_et;
  logic [N-1:0] out_bits;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // frame store
  int  f_llr   [NF][N];
  int  f_rate  [NF];
  int  f_max   [NF];
  bit  f_et    [NF];
  int  f_acc_cycle [NF];
  bit  f_done  [NF];
  int  n_out = 0;
  int  last_out_tag = -1;

  // mechanism counters
  int m_et = 0, m_max = 0, m_both = 0, m_ooo = 0, m_rate_sw = 0, m_retire_load = 0;
  int m_split = 0, m_full = 0;

  function automatic int gauss(int sd16);
    // approximately N(0, (sd16/16)^2) from 4 uniforms
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 255));
    s -= 510;
    return (s * sd16) / (148 * 16);
  endfunction

  function automatic msg_t to_sm(int v);
    int a;
    a = (v < 0) ? -v : v;
    if (a > 15) a = 15;
    return {v < 0 && a != 0, 4'(a)};
  endfunction

  // cw_en: send a random nonzero codeword of the rate instead of all zeros
  task automatic make_frame(int f, int rate, int mean, int sd16, bit rnd, bit cw_en = 0);
    bit cw [N];
    f_rate[f] = rate;
    if (cw_en) random_codeword(rate, cw);
    else foreach (cw[v]) cw[v] = 0;
    for (int v = 0; v < N; v++) begin
      int x;
      if (rnd) x = int'($urandom_range(0, 30)) - 15;
      else     x = (cw[v] ? -mean : mean) + gauss(sd16);
      if (x > 15) x = 15;
      if (x < -15) x = -15;
      f_llr[f][v] = x;
    end
  endtask

  // drive frames
  int next_f = 0;
  int stream_start_cycle = 0, stream_end_cycle = 0;
  localparam int STREAM_FIRST = 16;   // frames 16.. are the fixed-iteration stream
  localparam int STREAM_M     = 4;

  initial begin
    in_valid = 0; in_rate = RATE_1_2; in_tag = 0; max_iter = 5'd15; et_en = 1;
    foreach (in_llr[i]) in_llr[i] = '0;
    for (int f = 0; f < NF; f++) begin
      int rate;
      rate = f % 4;
      if (f < STREAM_FIRST) begin
        f_max[f] = 15; f_et[f] = 1;
        if (f % 5 == 3)      make_frame(f, rate, 0, 0, 1);      // random: max iterations
        else if (f % 2 == 0) make_frame(f, rate, 6, 16*5, 0);   // noisy
        else                 make_frame(f, rate, 7, 16*3, 0, 1); // mild, nonzero codeword
      end else begin
        f_max[f] = STREAM_M; f_et[f] = 0;
        make_frame(f, (f / 2) % 4, 6, 16*5, 0);
      end
      f_done[f] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (next_f < NF) begin
      // settle max_iter/et_en for the stream phase once everything drained
      if (next_f == STREAM_FIRST) begin
        @(negedge clk);
        in_valid = 0;
        wait (n_out == STREAM_FIRST);
        @(negedge clk);
        max_iter = 5'(STREAM_M); et_en = 0;
        stream_start_cycle = cycle;
      end
      @(negedge clk);
      in_valid = 1;
      in_rate  = rate_e'(f_rate[next_f]);
      in_tag   = 8'(next_f);
      for (int v = 0; v < N; v++) in_llr[v] = to_sm(f_llr[next_f][v]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      // accepted at this edge
      f_acc_cycle[next_f] = cycle;
      if (next_f > 0 && f_rate[next_f] != f_rate[next_f-1]) m_rate_sw++;
      if (dut.u_ctrl.retire) m_retire_load++;
      next_f++;
    end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.active == 2'b11) m_both++;
      if (dut.u_ctrl.c3.valid) begin
        if (dut.s3_cfg.full) m_full++; else m_split++;
      end
    end
    if (rst_n && out_valid) begin
      int f;
      bit rbits [N];
      int riters;
      bit ret;
      int mism;
      f = int'(out_tag);
      ref_decode(f_llr[f], f_rate[f], f_max[f], f_et[f], 1, rbits, riters, ret);
      mism = 0;
      for (int v = 0; v < N; v++) if (rbits[v] != out_bits[v]) mism++;
      checks++;
      if (mism != 0) begin
        failures++;
        $display("FAIL frame %0d: %0d decision bits differ from reference", f, mism);
      end
      checks++;
      if (int'(out_iters) != riters || out_et != ret) begin
        failures++;
        $display("FAIL frame %0d: iters %0d et %0d, reference %0d %0d", f, out_iters, out_et, riters, ret);
      end
      checks++;
      if (int'(out_rate) != f_rate[f]) begin
        failures++;
        $display("FAIL frame %0d: rate %0d", f, out_rate);
      end
      // latency: 8 cycles per iteration plus at most one window of waiting
      checks++;
      if (cycle - f_acc_cycle[f] < 8*riters + 1 || cycle - f_acc_cycle[f] > 8*riters + 8) begin
        failures++;
        $display("FAIL frame %0d: latency %0d for %0d iterations", f, cycle - f_acc_cycle[f], riters);
      end
      if (ret) m_et++; else m_max++;
      if (f < last_out_tag) m_ooo++;
      last_out_tag = f;
      f_done[f] = 1;
      n_out++;
      stream_end_cycle = cycle;
    end
  end

  initial begin
    wait (n_out == NF);
    repeat (2) @(posedge clk);
    // throughput: (NF-STREAM_FIRST) frames at M iterations, 2 frames / 8M cycles
    checks++;
    if (stream_end_cycle - stream_start_cycle > (NF - STREAM_FIRST) * 4 * STREAM_M + 24) begin
      failures++;
      $display("FAIL stream took %0d cycles", stream_end_cycle - stream_start_cycle);
    end
    $display("stream of %0d frames at %0d iterations: %0d cycles",
             NF - STREAM_FIRST, STREAM_M, stream_end_cycle - stream_start_cycle);
    $display("mechanisms: et=%0d max=%0d both_slots=%0d out_of_order=%0d rate_switch=%0d retire_load=%0d split=%0d full=%0d",
             m_et, m_max, m_both, m_ooo, m_rate_sw, m_retire_load, m_split, m_full);
    checks++; if (m_et == 0)          begin failures++; $display("FAIL no early termination"); end
    checks++; if (m_max == 0)         begin failures++; $display("FAIL no max-iteration stop"); end
    checks++; if (m_both == 0)        begin failures++; $display("FAIL never two frames"); end
    checks++; if (m_ooo == 0)         begin failures++; $display("FAIL never out of order"); end
    checks++; if (m_rate_sw == 0)     begin failures++; $display("FAIL no rate switch"); end
    checks++; if (m_retire_load == 0) begin failures++; $display("FAIL no load at retirement"); end
    checks++; if (m_split == 0 || m_full == 0) begin failures++; $display("FAIL CN modes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
