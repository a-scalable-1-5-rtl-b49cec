// vng -- variable node group: the 42 VNs of one block column.
//
// All VNs of a group share their controls, because a layer slot uses a
// block column either for all 42 of its bits or for none. The group only
// fans the controls out; each VN keeps its own messages and state (see vn).
// Ports are arrays indexed by the position of the VN within the column.
// The grouping follows the VNG1..VNG16 blocks of the decoder architecture.
module vng
  import ldpc_pkg::*;
#(
  parameter int unsigned BETA = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld_en,
  input  logic  ld_frame,
  input  msg_t  ld_llr  [Z],
  input  logic  s1_frame,
  input  logic  s1_first_iter,
  output msg_t  v2c     [Z],
  input  logic  s5_en,
  input  logic  s5_frame,
  input  logic  s5_first_layer,
  input  logic  s5_conn,
  input  cmin_t c2v_in  [Z],
  output logic  hd_next [Z]
);

  for (genvar i = 0; i < Z; i++) begin : g_vn
    vn #(.BETA(BETA)) u_vn (
      .clk, .rst_n,
      .ld_en, .ld_frame, .ld_llr(ld_llr[i]),
      .s1_frame, .s1_first_iter, .v2c(v2c[i]),
      .s5_en, .s5_frame, .s5_first_layer, .s5_conn,
      .c2v_in(c2v_in[i]), .hd_next(hd_next[i])
    );
  end

endmodule
