// tb_cng -- checks the check node group with every layer slot of every
// rate. Random V2C messages are applied; one cycle later, for each check
// row k and each block column c used by the slot, the C2V must be the
// min-sum result {sign, min1, min2} over the V2C of all columns in the same
// base row (both base rows together only in a full slot), computed here
// directly from the base matrix.
module tb_cng;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  msg_t       v2c [NB][Z];
  layer_cfg_t cfg;
  cmin_t      c2v [NB][Z];
  int checks = 0, failures = 0;

  cng dut (.clk, .rst_n, .v2c, .cfg, .c2v);
  always #5 clk = ~clk;

  initial begin
    foreach (v2c[c, k]) v2c[c][k] = '0;
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
    for (int r = 0; r < NRATE; r++)
    for (int sl = 0; sl < NSLOT; sl++) begin
      @(negedge clk);
      foreach (v2c[c, k]) v2c[c][k] = msg_t'($urandom);
      cfg = get_cfg(rate_e'(r), 2'(sl));
      @(negedge clk);
      for (int h = 0; h < 2; h++) begin
        int row;
        row = SLOT_ROWS[r][sl][h];
        if (row < 0) continue;
        for (int k = 0; k < Z; k++) begin
          int m [$];
          bit s;
          m.delete();
          s = 0;
          for (int c = 0; c < NB; c++) if (BASE[r][row][c] >= 0) begin
            m.push_back(int'(v2c[c][k][3:0]));
            s ^= v2c[c][k][4];
          end
          m.sort();
          for (int c = 0; c < NB; c++) if (BASE[r][row][c] >= 0) begin
            checks++;
            if (c2v[c][k].sign != s || int'(c2v[c][k].min1) != m[0] ||
                int'(c2v[c][k].min2) != m[1]) begin
              failures++;
              $display("FAIL rate %0d slot %0d row %0d k %0d col %0d", r, sl, row, k, c);
            end
          end
        end
      end
    end
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
