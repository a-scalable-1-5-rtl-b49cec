// tb_ldpc_ber -- error-rate workload of the test chip at its default size.
//
// The chip's own BER tester (four AWGN generators and the error collector)
// measures each code rate at Eb/N0 = 5.0 dB, and rate 1/2 also at 1.0 dB,
// with early termination on and an iteration limit of 15. The generator
// settings follow from the channel: for BPSK over AWGN with code rate R,
// sigma^2 = 1 / (2 R Eb/N0), and the channel LLR 2y/sigma^2 has mean
// 2/sigma^2 and standard deviation 2/sigma. The LLRs are scaled so that
// the mean is 8 LSB; the standard deviation is then 8*sigma LSB, and the
// generator's scale input is 8*sigma*1024/147.8 (147.8 is the standard
// deviation of its raw noise).
//   rate   Eb/N0  sigma   scale
//   1/2    5.0    0.562   31
//   5/8    5.0    0.503   28
//   3/4    5.0    0.459   25
//   13/16  5.0    0.441   24
//   1/2    1.0    0.891   49
// Expected behaviour of a decoder of this kind: at 5.0 dB every rate is
// past its waterfall (bit error rate far below what a few hundred frames
// can resolve, so no frame errors here) and needs only a few iterations on
// average (about 3 to 4); at 1.0 dB rate 1/2 is before its waterfall: the
// bit error rate is a few percent and nearly every frame runs to the limit.
// The error collector's counters are also checked against counts formed
// here from the decoded frames.
module tb_ldpc_ber;
  import ldpc_pkg::*;

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
  int n_acc = 0, n_out = 0;
  int e_frames = 0, e_ferr = 0, e_berr = 0, e_iter = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.dec_in_valid && dut.dec_in_ready) n_acc++;
    if (dec_valid) begin
      int ierr;
      ierr = 0;
      for (int v = 0; v < N; v++)
        if (v < KBITS[int'(dec_rate)] && dec_bits[v]) ierr++;
      e_frames++; e_iter += int'(dec_iters); e_berr += ierr;
      if (ierr > 0) e_ferr++;
      n_out++;
    end
  end

  task automatic run_point(rate_e r, int scale, int nframes, string ebno,
                           real it_lo, real it_hi, real ber_lo, real ber_hi);
    real ber, avg_it;
    int  start;
    @(negedge clk);
    rate = r; awgn_scale = 8'(scale);
    stats_clear = 1;
    @(negedge clk);
    stats_clear = 0;
    e_frames = 0; e_ferr = 0; e_berr = 0; e_iter = 0;
    start = n_acc;
    src_awgn = 1;
    while (n_acc - start < nframes) @(negedge clk);
    src_awgn = 0;
    wait (n_out == n_acc);
    repeat (2) @(negedge clk);
    ber    = real'(stat_bit_errs) / (real'(stat_frames) * real'(KBITS[int'(r)]));
    avg_it = real'(stat_iter_sum) / real'(stat_frames);
    $display("rate %s Eb/N0 %s dB: %0d frames, %0d frame errors, %0d bit errors, BER %e, average iterations %0.2f",
             r.name(), ebno, stat_frames, stat_frame_errs, stat_bit_errs, ber, avg_it);
    checks++;
    if (int'(stat_frames) != e_frames || int'(stat_frame_errs) != e_ferr ||
        int'(stat_bit_errs) != e_berr || int'(stat_iter_sum) != e_iter) begin
      failures++;
      $display("FAIL counters %0d %0d %0d %0d, decoded frames give %0d %0d %0d %0d",
               stat_frames, stat_frame_errs, stat_bit_errs, stat_iter_sum,
               e_frames, e_ferr, e_berr, e_iter);
    end
    checks++;
    if (avg_it < it_lo || avg_it > it_hi) begin
      failures++;
      $display("FAIL average iterations %0.2f outside %0.2f..%0.2f", avg_it, it_lo, it_hi);
    end
    checks++;
    if (ber < ber_lo || ber > ber_hi) begin
      failures++;
      $display("FAIL BER %e outside %e..%e", ber, ber_lo, ber_hi);
    end
  endtask

  initial begin
    rate = RATE_1_2; max_iter = 5'd15; et_en = 1; src_awgn = 0;
    awgn_mean = 5'd8; awgn_scale = 8'd31; stats_clear = 0; ext_valid = 0;
    foreach (ext_llr[i]) ext_llr[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_point(RATE_1_2,   31, 120, "5.0", 2.0, 5.5, 0.0, 0.0);
    run_point(RATE_5_8,   28, 120, "5.0", 2.0, 5.5, 0.0, 0.0);
    run_point(RATE_3_4,   25, 120, "5.0", 2.0, 5.5, 0.0, 0.0);
    run_point(RATE_13_16, 24, 120, "5.0", 2.0, 5.5, 0.0, 0.0);
    run_point(RATE_1_2,   49,  40, "1.0", 13.0, 15.0, 5.0e-3, 0.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
