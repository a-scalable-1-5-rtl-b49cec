// ldpc_decoder -- IEEE 802.11ad LDPC decoder core (672-bit frames, code
// rates 1/2, 5/8, 3/4 and 13/16).
//
// All 672 variable nodes are instantiated (16 VNGs of 42 VNs, one per block
// column); the 42 check nodes of the CNG process one layer slot per cycle.
// The five pipeline stages are
//   1 V2C calculation   (vn, registered V2C)
//   2 V2C routing       (v2c_shifter per block column)
//   3 C2V calculation   (cng: shuffle + reconfigurable CN)
//   4 C2V routing       (c2v_shifter per block column)
//   5 V2C accumulation  (vn: marginalization, accumulation)
// and dec_ctrl interleaves two frames so that every stage is busy in every
// cycle. The iteration schedule is flooding: the V2C messages of iteration
// i are all formed from the posteriors of iteration i-1. early_term checks
// the hard decisions after each iteration.
//
// Interface: a frame (672 5-bit sign-magnitude LLRs, index c*42+i = bit i
// of block column c, positive = bit 0) is accepted when in_valid and
// in_ready are both 1. Its decision bits appear with out_valid for one
// cycle, with the frame's tag, rate, iteration count and whether early
// termination stopped it. Frames can finish out of order.
// Timing: a frame accepted into an idle decoder at cycle t starts its first
// window at the next phase boundary of its slot, and leaves 8*iters + 5
// cycles after that window starts.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned BETA  = 1,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  rate_e            in_rate,
  input  logic [TAG_W-1:0] in_tag,
  input  msg_t             in_llr [N],
  input  logic [4:0]       max_iter,
  input  logic             et_en,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output rate_e            out_rate,
  output logic [4:0]       out_iters,
  output logic             out_et,
  output logic [N-1:0]     out_bits
);

  logic       ld_en, ld_frame;
  logic       s1_frame, s1_first_iter;
  layer_cfg_t s2_cfg, s3_cfg, s4_cfg, s5_cfg;
  logic       s5_en, s5_frame, s5_first_layer;
  rate_e      s5_rate;
  logic       et_pass, retire;

  msg_t       v2c_vn  [NB][Z];   // stage 1 -> 2
  msg_t       v2c_cn  [NB][Z];   // stage 2 -> 3
  cmin_t      c2v_cn  [NB][Z];   // stage 3 -> 4
  cmin_t      c2v_vn  [NB][Z];   // stage 4 -> 5
  logic       hd_next [NB][Z];
  logic [N-1:0] hd_vec;

  dec_ctrl #(.TAG_W(TAG_W)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_rate, .in_tag, .ld_en, .ld_frame,
    .max_iter, .et_en,
    .s1_valid(), .s1_frame, .s1_first_iter,
    .s2_cfg, .s3_cfg, .s4_cfg,
    .s5_en, .s5_frame, .s5_first_layer, .s5_cfg, .s5_rate,
    .et_pass, .retire,
    .out_valid, .out_tag, .out_rate, .out_iters, .out_et
  );

  for (genvar c = 0; c < NB; c++) begin : g_col
    msg_t ld_llr [Z];
    for (genvar i = 0; i < Z; i++) begin : g_bit
      assign ld_llr[i]        = in_llr[c*Z + i];
      assign hd_vec[c*Z + i]  = hd_next[c][i];
    end

    vng #(.BETA(BETA)) u_vng (
      .clk, .rst_n,
      .ld_en, .ld_frame, .ld_llr,
      .s1_frame, .s1_first_iter, .v2c(v2c_vn[c]),
      .s5_en, .s5_frame, .s5_first_layer, .s5_conn(s5_cfg.col_valid[c]),
      .c2v_in(c2v_vn[c]), .hd_next(hd_next[c])
    );

    v2c_shifter u_v2c_sh (
      .clk, .rst_n, .in(v2c_vn[c]), .shift(s2_cfg.col_shift[c]), .out(v2c_cn[c])
    );

    c2v_shifter u_c2v_sh (
      .clk, .rst_n, .in(c2v_cn[c]), .shift(s4_cfg.col_shift[c]), .out(c2v_vn[c])
    );
  end

  cng u_cng (.clk, .rst_n, .v2c(v2c_cn), .cfg(s3_cfg), .c2v(c2v_cn));

  early_term u_et (.hd(hd_vec), .rate(s5_rate), .pass(et_pass));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_bits <= '0;
    else if (retire) out_bits <= hd_vec;
  end

endmodule
