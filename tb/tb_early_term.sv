// tb_early_term -- the all-zero word must pass for every rate; flipping any
// single bit must fail (every block column is used by some row); random
// words must give the result of a parity check computed row by row.
// Random nonzero codewords of each rate (from the reference package) must
// pass for their own rate and match the row-by-row check for every rate.
module tb_early_term;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic [N-1:0] hd;
  rate_e        rate;
  logic         pass;
  int checks = 0, failures = 0;

  early_term dut (.hd, .rate, .pass);

  initial begin
    for (int r = 0; r < NRATE; r++) begin
      rate = rate_e'(r);
      hd = '0;
      #1;
      checks++;
      if (!pass) begin failures++; $display("FAIL zero word rate %0d", r); end
      for (int t = 0; t < 60; t++) begin
        hd = '0;
        hd[$urandom_range(0, N-1)] = 1'b1;
        #1;
        checks++;
        if (pass) begin failures++; $display("FAIL single flip passes rate %0d", r); end
      end
      for (int t = 0; t < 20; t++) begin
        bit b [N];
        for (int v = 0; v < N; v++) begin
          hd[v] = ($urandom_range(0, 99) < 2);
          b[v] = hd[v];
        end
        #1;
        checks++;
        if (pass != parity_ok(b, r)) begin failures++; $display("FAIL random word rate %0d", r); end
      end
      // random nonzero codewords: must pass for their own rate, and for
      // the other rates give the row-by-row parity result
      for (int t = 0; t < 8; t++) begin
        bit cw [N];
        random_codeword(r, cw);
        checks++;
        if (!parity_ok(cw, r)) begin failures++; $display("FAIL generated word is no codeword, rate %0d", r); end
        for (int q = 0; q < NRATE; q++) begin
          rate = rate_e'(q);
          for (int v = 0; v < N; v++) hd[v] = cw[v];
          #1;
          checks++;
          if (pass != parity_ok(cw, q)) begin failures++; $display("FAIL codeword of rate %0d checked as rate %0d", r, q); end
        end
        rate = rate_e'(r);
        #1;
        checks++;
        if (!pass) begin failures++; $display("FAIL codeword of rate %0d rejected", r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
