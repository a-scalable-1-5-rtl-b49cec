// cng -- check node group (pipeline stage 3, "C2V calculation").
//
// 42 reconfigurable check nodes, one per row of the 42x42 submatrices, each
// behind its own shuffler. CN k takes element k of each of the 16 V2C
// shifter outputs and returns one compressed message per block column. All
// CNs share the layer configuration of the slot in stage 3. The outputs are
// registered: out is valid one cycle after v2c.
// Arrays are indexed [block column][check row]. The group of 42 CNs with a
// shuffle in front is from the architecture; the register placement follows
// the five-stage pipeline.
module cng
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  msg_t       v2c [NB][Z],
  input  layer_cfg_t cfg,
  output cmin_t      c2v [NB][Z]
);

  cmin_t c2v_d [NB][Z];

  for (genvar k = 0; k < Z; k++) begin : g_cn
    msg_t  col  [NB];
    msg_t  slot [NB];
    cmin_t res  [NB];
    for (genvar c = 0; c < NB; c++) begin : g_col
      assign col[c]      = v2c[c][k];
      assign c2v_d[c][k] = res[c];
    end
    cn_shuffle u_shuf (
      .col(col), .slot_col(cfg.slot_col), .slot_valid(cfg.slot_valid),
      .slot(slot)
    );
    cn16 u_cn (.in(slot), .full(cfg.full), .col_lower(cfg.col_lower), .out(res));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c2v <= '{default: '0};
    else        c2v <= c2v_d;
  end

endmodule
