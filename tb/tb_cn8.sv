// tb_cn8 -- random test of the 8-input check node against a sorting
// reference: sign = XOR of signs, min1/min2 = two smallest magnitudes.
module tb_cn8;
  import ldpc_pkg::*;
  msg_t  in [8];
  cmin_t out;
  int checks = 0, failures = 0;

  cn8 dut (.in, .out);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mags [8];
      bit s;
      s = 0;
      for (int i = 0; i < 8; i++) begin
        in[i] = msg_t'($urandom);
        if (t % 3 == 0) in[i][3:0] = 4'($urandom_range(0, 3));   // many ties
        mags[i] = int'(in[i][3:0]);
        s ^= in[i][4];
      end
      mags.sort();
      #1;
      checks++;
      if (out.sign != s || int'(out.min1) != mags[0] || int'(out.min2) != mags[1]) begin
        failures++;
        $display("FAIL t=%0d got %0d/%0d/%0d expected %0d/%0d/%0d", t, out.sign, out.min1, out.min2, s, mags[0], mags[1]);
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
