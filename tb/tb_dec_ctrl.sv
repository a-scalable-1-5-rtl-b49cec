// tb_dec_ctrl -- checks the pipeline schedule. Frames with chosen rates,
// tags and (for some) a forced early-termination iteration are offered
// whenever the controller is ready. Checked every cycle: stage 1 only issues
// frame (cycle/4) mod 2 in its window; stage 5 repeats stage 1 four cycles
// later with first_layer on slot 0; stage 3 uses the configuration of the
// frame's rate and the slot issued two cycles earlier. Per frame: 4 slots
// per iteration, the iteration count (max_iter or the forced ET iteration),
// tag, rate, and a latency of 8*iters+1..8*iters+8 cycles.
module tb_dec_ctrl;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  rate_e in_rate;
  logic [7:0] in_tag;
  logic ld_en, ld_frame;
  logic [4:0] max_iter;
  logic et_en;
  logic s1_valid, s1_frame, s1_first_iter;
  layer_cfg_t s2_cfg, s3_cfg, s4_cfg, s5_cfg;
  logic s5_en, s5_frame, s5_first_layer;
  rate_e s5_rate;
  logic et_pass, retire;
  logic out_valid;
  logic [7:0] out_tag;
  rate_e out_rate;
  logic [4:0] out_iters;
  logic out_et;
  int checks = 0, failures = 0;

  dec_ctrl dut (.*);
  always #5 clk = ~clk;

  localparam int NF = 12;
  int n = 0;                      // cycles since reset release
  int slot_tag [2];
  int f_rate [NF], f_et_it [NF], f_acc [NF], f_issued [NF], f_iter_seen [NF];
  bit h_valid [$];
  int h_frame [$];
  int n_out = 0;

  initial begin
    for (int f = 0; f < NF; f++) begin
      f_rate[f]  = f % 4;
      f_et_it[f] = (f % 3 == 1) ? 1 + f % 4 : 0;   // 0: run to max_iter
      f_issued[f] = 0;
    end
    in_valid = 0; in_rate = RATE_1_2; in_tag = 0; max_iter = 5'd3; et_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      in_valid = 1; in_rate = rate_e'(f_rate[f]); in_tag = 8'(f);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      begin
        int lf;
        lf = int'(ld_frame);
        @(posedge clk);
        f_acc[f] = n;
        slot_tag[lf] = f;
      end
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
  end

  // forced early termination: et_pass follows the frame in stage 5
  // (driven at the falling edge from the stage-5 frame and its iteration)
  always @(negedge clk) begin
    int f;
    f = slot_tag[s5_frame];
    et_pass <= s5_en && f_et_it[f] != 0 && (int'(dut.f_iter[s5_frame]) + 1 == f_et_it[f]);
  end

  always @(negedge clk) if (rst_n) begin
    // stage 1
    if (s1_valid) begin
      checks++;
      if (s1_frame != 1'((n >> 2) & 1)) begin failures++; $display("FAIL s1 frame at %0d", n); end
      f_issued[slot_tag[s1_frame]]++;
    end
    h_valid.push_front(s1_valid);
    h_frame.push_front(int'(s1_frame));
    if (h_valid.size() > 5) begin
      // stage 5 is stage 1 four cycles later
      checks++;
      if (s5_en != h_valid[4] || (s5_en && (int'(s5_frame) != h_frame[4] ||
          s5_first_layer != ((n - 4) % 4 == 0)))) begin
        failures++; $display("FAIL s5 at %0d", n);
      end
      // stage 3 configuration
      if (h_valid[2]) begin
        checks++;
        if (s3_cfg != get_cfg(rate_e'(f_rate[slot_tag[h_frame[2]]]), 2'((n - 2) % 4))) begin
          failures++; $display("FAIL s3 cfg at %0d", n);
        end
      end
      void'(h_valid.pop_back());
      void'(h_frame.pop_back());
    end
    if (out_valid) begin
      int f, it;
      f  = int'(out_tag);
      it = (f_et_it[f] != 0 && f_et_it[f] < 3) ? f_et_it[f] : 3;
      checks++;
      if (int'(out_iters) != it || out_et != (f_et_it[f] != 0 && f_et_it[f] <= 3) ||
          int'(out_rate) != f_rate[f] || f_issued[f] != 4 * it ||
          n - f_acc[f] < 8 * it + 1 || n - f_acc[f] > 8 * it + 8) begin
        failures++;
        $display("FAIL frame %0d: iters %0d et %0d issued %0d latency %0d", f, out_iters, out_et, f_issued[f], n - f_acc[f]);
      end
      n_out++;
    end
  end
  always @(posedge clk) if (rst_n) n <= n + 1;

  initial begin
    wait (n_out == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
