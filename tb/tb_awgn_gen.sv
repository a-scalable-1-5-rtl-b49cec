// tb_awgn_gen -- statistics of the generated LLRs: with mean 6 and scale 28
// the sample mean must lie near 6 and the standard deviation near 4 LSB;
// lanes must differ; the output must hold while en is 0; and each output
// must equal the formula applied to the lane's xorshift state.
module tb_awgn_gen;
  import ldpc_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst_n = 0, en;
  logic [4:0] mean;
  logic [7:0] scale;
  msg_t llr [LANES];
  int checks = 0, failures = 0;

  awgn_gen #(.LANES(LANES)) dut (.clk, .rst_n, .en, .mean, .scale, .llr);
  always #5 clk = ~clk;

  function automatic int sm2i(msg_t m);
    return m[4] ? -int'(m[3:0]) : int'(m[3:0]);
  endfunction

  initial begin
    real sum, sq, mu, sd;
    int n, same;
    logic [31:0] st;
    msg_t hold [LANES];
    en = 0; mean = 5'd6; scale = 8'd28;
    repeat (2) @(posedge clk);
    rst_n = 1;
    sum = 0; sq = 0; n = 0; same = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      st = dut.state[0];
      en = 1;
      @(negedge clk);
      en = 0;
      begin
        int s, e;
        s = int'(st[7:0]) + int'(st[15:8]) + int'(st[23:16]) + int'(st[31:24]) - 510;
        e = 6 + ((s * 28) >>> 10);
        if (e > 15) e = 15;
        if (e < -15) e = -15;
        checks++;
        if (sm2i(llr[0]) != e) begin failures++; $display("FAIL formula t=%0d", t); end
      end
      for (int l = 0; l < LANES; l++) begin
        sum += sm2i(llr[l]); sq += sm2i(llr[l]) * sm2i(llr[l]); n++;
      end
      if (llr[0] == llr[1]) same++;
      hold = llr;
      @(negedge clk);
      checks++;
      if (hold != llr) begin failures++; $display("FAIL output changed without en"); end
    end
    mu = sum / n;
    sd = $sqrt(sq / n - mu * mu);
    $display("mean %f sd %f", mu, sd);
    checks++; if (mu < 5.5 || mu > 6.5) begin failures++; $display("FAIL mean"); end
    checks++; if (sd < 3.3 || sd > 4.7) begin failures++; $display("FAIL sd"); end
    checks++; if (same > 300) begin failures++; $display("FAIL lanes correlated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
