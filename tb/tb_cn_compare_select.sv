// tb_cn_compare_select -- random test: merging the {sign,min1,min2} of two
// groups of magnitudes must equal the result for the joined group.
module tb_cn_compare_select;
  import ldpc_pkg::*;
  cmin_t top, bottom, both;
  int checks = 0, failures = 0;

  cn_compare_select dut (.top, .bottom, .both);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a [2], b [2], all [4];
      a[0] = $urandom_range(0, 15); a[1] = $urandom_range(0, 15);
      b[0] = $urandom_range(0, 15); b[1] = $urandom_range(0, 15);
      if (t % 4 == 0) b[0] = a[0];
      a.sort(); b.sort();
      all = '{a[0], a[1], b[0], b[1]};
      all.sort();
      top    = '{sign: 1'($urandom), min1: 4'(a[0]), min2: 4'(a[1])};
      bottom = '{sign: 1'($urandom), min1: 4'(b[0]), min2: 4'(b[1])};
      #1;
      checks++;
      if (both.sign != (top.sign ^ bottom.sign) || int'(both.min1) != all[0] ||
          int'(both.min2) != all[1]) begin
        failures++;
        $display("FAIL t=%0d", t);
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
