// tb_error_collector -- frames with a known number of wrong information bits
// (and wrong parity bits, which must not count) are fed in; the counters
// must match the sums kept here. Also checks clear.
module tb_error_collector;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear, dec_valid;
  rate_e dec_rate;
  logic [4:0] dec_iters;
  logic [N-1:0] dec_bits, ref_bits;
  logic [31:0] frames, frame_errs, bit_errs, iter_sum;
  int checks = 0, failures = 0;
  int e_frames = 0, e_ferr = 0, e_berr = 0, e_iter = 0;

  error_collector dut (.*);
  always #5 clk = ~clk;

  task automatic check_counts();
    checks++;
    if (int'(frames) != e_frames || int'(frame_errs) != e_ferr ||
        int'(bit_errs) != e_berr || int'(iter_sum) != e_iter) begin
      failures++;
      $display("FAIL counts %0d %0d %0d %0d expected %0d %0d %0d %0d",
               frames, frame_errs, bit_errs, iter_sum, e_frames, e_ferr, e_berr, e_iter);
    end
  endtask

  initial begin
    clear = 0; dec_valid = 0; dec_rate = RATE_1_2; dec_iters = 0;
    dec_bits = '0; ref_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int k, nerr;
      @(negedge clk);
      dec_rate  = rate_e'($urandom_range(0, 3));
      k         = KBITS[dec_rate];
      dec_iters = 5'($urandom_range(1, 15));
      for (int v = 0; v < N; v++) ref_bits[v] = 1'($urandom);
      dec_bits = ref_bits;
      nerr = (t % 3 == 0) ? 0 : $urandom_range(1, 20);
      for (int e = 0; e < nerr; e++) dec_bits[e * 7 % k] = ~ref_bits[e * 7 % k];
      dec_bits[N-1] = ~dec_bits[N-1];          // parity bit: ignored
      dec_valid = 1;
      e_frames++; e_iter += int'(dec_iters); e_berr += nerr; if (nerr > 0) e_ferr++;
      @(negedge clk);
      dec_valid = 0;
      check_counts();
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    e_frames = 0; e_ferr = 0; e_berr = 0; e_iter = 0;
    check_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
