// tb_c2v_shifter -- random test: one cycle after in and shift, VN j must
// receive in[(j-shift) mod 42], i.e. VN (k+shift) mod 42 gets check row k.
module tb_c2v_shifter;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  cmin_t in [Z];
  logic [SHIFT_W-1:0] shift;
  cmin_t out [Z];
  cmin_t exp_q [Z];
  int checks = 0, failures = 0;

  c2v_shifter dut (.clk, .rst_n, .in, .shift, .out);
  always #5 clk = ~clk;

  initial begin
    foreach (in[i]) in[i] = '0;
    shift = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      foreach (in[i]) in[i] = cmin_t'($urandom);
      shift = SHIFT_W'(t % Z);
      for (int k = 0; k < Z; k++) exp_q[(k + int'(shift)) % Z] = in[k];
      @(negedge clk);
      for (int j = 0; j < Z; j++) begin
        checks++;
        if (out[j] != exp_q[j]) begin
          failures++;
          $display("FAIL shift %0d j %0d", t % Z, j);
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
