// c2v_shifter -- inverse cyclic shifter from the 42 check nodes back to one
// VNG (pipeline stage 4, "C2V routing").
//
// It undoes the V2C shift: VN j of the block column receives the compressed
// C2V {sign, min1, min2} of check row (j - s) mod 42. The result is
// registered: out is valid one cycle after in and shift.
// The shifter's place in the pipeline is from the architecture; the
// barrel-shifter form is a design choice.
module c2v_shifter
  import ldpc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cmin_t              in  [Z],
  input  logic [SHIFT_W-1:0] shift,
  output cmin_t              out [Z]
);

  cmin_t rot [Z];
  always_comb begin
    for (int j = 0; j < Z; j++) begin
      int idx;
      idx = j - int'(shift);
      if (idx < 0) idx += Z;
      rot[j] = in[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '{default: '0};
    else        out <= rot;
  end

endmodule
