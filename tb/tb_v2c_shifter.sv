// tb_v2c_shifter -- random test: one cycle after in and shift, out[k] must
// equal in[(k+shift) mod 42]. Every shift value 0..41 is used.
module tb_v2c_shifter;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  msg_t in [Z];
  logic [SHIFT_W-1:0] shift;
  msg_t out [Z];
  msg_t exp_q [Z];
  int checks = 0, failures = 0;

  v2c_shifter dut (.clk, .rst_n, .in, .shift, .out);
  always #5 clk = ~clk;

  initial begin
    foreach (in[i]) in[i] = '0;
    shift = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      foreach (in[i]) in[i] = msg_t'($urandom);
      shift = SHIFT_W'(t % Z);
      for (int k = 0; k < Z; k++) exp_q[k] = in[(k + int'(shift)) % Z];
      @(negedge clk);
      for (int k = 0; k < Z; k++) begin
        checks++;
        if (out[k] != exp_q[k]) begin
          failures++;
          $display("FAIL shift %0d k %0d", t % Z, k);
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
