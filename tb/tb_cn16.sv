// tb_cn16 -- random test of the reconfigurable check node in both modes.
// Expected values: top result over inputs 0..7, bottom over 8..15, full
// result over all 16, computed by sorting; output c must carry the full
// result in full mode, else the top or bottom result per col_lower[c].
module tb_cn16;
  import ldpc_pkg::*;
  msg_t          in [NB];
  logic          full;
  logic [NB-1:0] col_lower;
  cmin_t         out [NB];
  int checks = 0, failures = 0;
  int n_full = 0, n_split = 0;

  cn16 dut (.in, .full, .col_lower, .out);

  function automatic cmin_t ref_cn(int lo, int hi);
    int m [$];
    bit s;
    s = 0;
    for (int i = lo; i <= hi; i++) begin
      m.push_back(int'(in[i][3:0]));
      s ^= in[i][4];
    end
    m.sort();
    return '{sign: s, min1: 4'(m[0]), min2: 4'(m[1])};
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      cmin_t rt, rb, ra, e;
      foreach (in[i]) in[i] = msg_t'($urandom);
      full      = 1'($urandom);
      col_lower = NB'($urandom);
      #1;
      rt = ref_cn(0, 7); rb = ref_cn(8, 15); ra = ref_cn(0, 15);
      if (full) n_full++; else n_split++;
      for (int c = 0; c < NB; c++) begin
        e = full ? ra : (col_lower[c] ? rb : rt);
        checks++;
        if (out[c] != e) begin
          failures++;
          $display("FAIL t=%0d c=%0d", t, c);
        end
      end
    end
    checks++;
    if (n_full == 0 || n_split == 0) failures++;
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
