// tb_vng -- checks that all 42 VNs of a group work on their own data with
// the shared controls: random priors are loaded into both frames, the first
// V2C of each frame must equal its priors, and one accumulation step with a
// compressed C2V must give, VN by VN, the sign of prior + marginalized C2V
// (min2 where the VN's V2C bits 2:1 match min1 bits 2:1, offset 1). A
// slot with the column unused (s5_conn = 0) must leave the frame unchanged.
module tb_vng;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_en, ld_frame;
  msg_t ld_llr [Z];
  logic s1_frame, s1_first_iter;
  msg_t v2c [Z];
  logic s5_en, s5_frame, s5_first_layer, s5_conn;
  cmin_t c2v_in [Z];
  logic hd_next [Z];
  int checks = 0, failures = 0;
  int pri [2][Z];

  vng dut (.*);
  always #5 clk = ~clk;

  function automatic int sm2i(msg_t m);
    return m[4] ? -int'(m[3:0]) : int'(m[3:0]);
  endfunction

  initial begin
    ld_en = 0; ld_frame = 0; s1_frame = 0; s1_first_iter = 1;
    s5_en = 0; s5_frame = 0; s5_first_layer = 0; s5_conn = 0;
    foreach (ld_llr[i]) ld_llr[i] = '0;
    foreach (c2v_in[i]) c2v_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      ld_en = 1; ld_frame = 1'(f);
      for (int i = 0; i < Z; i++) begin
        ld_llr[i] = msg_t'($urandom);
        pri[f][i] = sm2i(ld_llr[i]);
      end
    end
    @(negedge clk);
    ld_en = 0;
    // hard decisions of both frames without accumulation
    for (int f = 0; f < 2; f++) begin
      s5_frame = 1'(f); #1;
      for (int i = 0; i < Z; i++) begin
        checks++;
        if (hd_next[i] != (pri[f][i] < 0)) begin failures++; $display("FAIL hd f%0d i%0d", f, i); end
      end
    end
    // stage 1 of frame 0, first iteration
    s1_frame = 0; s1_first_iter = 1;
    @(negedge clk);
    for (int i = 0; i < Z; i++) begin
      checks++;
      if (sm2i(v2c[i]) != pri[0][i]) begin failures++; $display("FAIL v2c i%0d", i); end
    end
    s1_frame = 1;                     // keep the other frame's V2C flowing
    repeat (3) @(negedge clk);
    // stage 5 of frame 0, four cycles after its stage 1
    s5_en = 1; s5_frame = 0; s5_first_layer = 1; s5_conn = 1;
    for (int i = 0; i < Z; i++) begin
      c2v_in[i].sign = 1'($urandom);
      c2v_in[i].min1 = 4'($urandom_range(0, 15));
      c2v_in[i].min2 = 4'($urandom_range(int'(c2v_in[i].min1), 15));
    end
    #1;
    for (int i = 0; i < Z; i++) begin
      int a, sel, mag, c, sum;
      a   = pri[0][i] < 0 ? -pri[0][i] : pri[0][i];
      sel = (((a >> 1) & 3) == ((int'(c2v_in[i].min1) >> 1) & 3)) ? int'(c2v_in[i].min2) : int'(c2v_in[i].min1);
      mag = sel > 1 ? sel - 1 : 0;
      c   = (c2v_in[i].sign ^ (pri[0][i] < 0)) ? -mag : mag;
      sum = pri[0][i] + c;
      checks++;
      if (hd_next[i] != (sum < 0)) begin failures++; $display("FAIL acc i%0d", i); end
    end
    // frame 1, column unused in this slot: unchanged
    @(negedge clk);
    s5_frame = 1; s5_conn = 0; #1;
    for (int i = 0; i < Z; i++) begin
      checks++;
      if (hd_next[i] != (pri[1][i] < 0)) begin failures++; $display("FAIL unused i%0d", i); end
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
