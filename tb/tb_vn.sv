// tb_vn -- random cycle-by-cycle test of one variable node against an
// integer model of its two stages. Inputs (loads, stage-1 and stage-5
// controls, compressed C2V) are random each cycle; the registered V2C and
// the combinational hard decision are compared every cycle. The model keeps
// the V2C and C2V history as 4-deep queues of integers.
module tb_vn;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_en, ld_frame;
  msg_t ld_llr;
  logic s1_frame, s1_first_iter;
  msg_t v2c;
  logic s5_en, s5_frame, s5_first_layer, s5_conn;
  cmin_t c2v_in;
  logic hd_next;
  int checks = 0, failures = 0;
  int n_min2 = 0, n_sat = 0;

  vn #(.BETA(1)) dut (.*);
  always #5 clk = ~clk;

  // model state
  int m_prior [2], m_acc [2];
  int m_v2c_hist [4];    // V2C values pushed 1..4 cycles ago ([3] oldest)
  int m_c2v_hist [4];    // C2V values pushed 1..4 cycles ago
  int m_v2c_q;

  function automatic int sm2i(msg_t m);
    return m[4] ? -int'(m[3:0]) : int'(m[3:0]);
  endfunction
  function automatic int clip(int v, int m);
    return v > m ? m : (v < -m ? -m : v);
  endfunction
  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    ld_en = 0; ld_frame = 0; ld_llr = 0; s1_frame = 0; s1_first_iter = 1;
    s5_en = 0; s5_frame = 0; s5_first_layer = 0; s5_conn = 0; c2v_in = '0;
    m_prior = '{0, 0}; m_acc = '{0, 0}; m_v2c_hist = '{0, 0, 0, 0};
    m_c2v_hist = '{0, 0, 0, 0}; m_v2c_q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int old, v2c_new, st, sel, mag, c2v, base, sum, hd;
      @(negedge clk);
      // compare registered output with the model
      checks++;
      if (sm2i(v2c) != m_v2c_q) begin
        failures++;
        $display("FAIL t=%0d v2c %0d expected %0d", t, sm2i(v2c), m_v2c_q);
      end
      // new random inputs
      ld_en          = ($urandom_range(0, 9) == 0);
      ld_frame       = 1'($urandom);
      ld_llr         = msg_t'($urandom);
      s1_frame       = 1'($urandom);
      s1_first_iter  = ($urandom_range(0, 4) == 0);
      s5_en          = ($urandom_range(0, 3) != 0);
      s5_frame       = 1'($urandom);
      s5_first_layer = ($urandom_range(0, 3) == 0);
      s5_conn        = ($urandom_range(0, 4) != 0);
      c2v_in.sign    = 1'($urandom);
      c2v_in.min1    = 4'($urandom_range(0, 10));
      c2v_in.min2    = 4'($urandom_range(int'(c2v_in.min1), 15));
      #1;
      // stage 1 model: stored C2V keeps sign and magnitude bits 3:2
      old = s1_first_iter ? 0 : m_c2v_hist[3];
      old = (old < 0) ? -(absi(old) & 12) : (absi(old) & 12);
      v2c_new = clip(m_acc[s1_frame] - old, 15);
      if (absi(m_acc[s1_frame] - old) > 15) n_sat++;
      // stage 5 model: marginalize with the V2C of 4 cycles ago
      st  = m_v2c_hist[3];
      sel = (((absi(st) >> 1) & 3) == ((int'(c2v_in.min1) >> 1) & 3)) ? int'(c2v_in.min2) : int'(c2v_in.min1);
      if (sel == int'(c2v_in.min2) && c2v_in.min1 != c2v_in.min2) n_min2++;
      mag = sel > 1 ? sel - 1 : 0;
      c2v = s5_conn ? (((c2v_in.sign ^ (st < 0)) != 0) ? -mag : mag) : 0;
      base = s5_first_layer ? m_prior[s5_frame] : m_acc[s5_frame];
      sum  = clip(base + c2v, 63);
      hd   = s5_en ? (sum < 0) : (m_acc[s5_frame] < 0);
      checks++;
      if (hd_next != 1'(hd)) begin
        failures++;
        $display("FAIL t=%0d hd_next", t);
      end
      // clock edge: update model
      @(posedge clk);
      m_v2c_q = v2c_new;
      for (int i = 3; i > 0; i--) begin
        m_v2c_hist[i] = m_v2c_hist[i-1];
        m_c2v_hist[i] = m_c2v_hist[i-1];
      end
      m_v2c_hist[0] = v2c_new;
      m_c2v_hist[0] = c2v;
      if (s5_en) m_acc[s5_frame] = sum;
      if (ld_en) begin
        m_prior[ld_frame] = sm2i(ld_llr);
        m_acc[ld_frame]   = sm2i(ld_llr);
      end
    end
    $display("min2 chosen %0d times, V2C saturated %0d times", n_min2, n_sat);
    checks++;
    if (n_min2 == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
