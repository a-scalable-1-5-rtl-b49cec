// v2c_shifter -- cyclic shifter from one VNG to the 42 check nodes
// (pipeline stage 2, "V2C routing").
//
// A submatrix with shift value s connects check row k to bit (k+s) mod 42
// of the block column, so output k takes input (k+s) mod 42. The shift
// value comes from the layer configuration of the slot in stage 2. The
// result is registered: out is valid one cycle after in and shift.
// The shifter's place in the pipeline is from the architecture; the
// barrel-shifter form is a design choice.
module v2c_shifter
  import ldpc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  msg_t               in  [Z],
  input  logic [SHIFT_W-1:0] shift,
  output msg_t               out [Z]
);

  msg_t rot [Z];
  always_comb begin
    for (int k = 0; k < Z; k++) begin
      int idx;
      idx = k + int'(shift);
      if (idx >= Z) idx -= Z;
      rot[k] = in[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '{default: '0};
    else        out <= rot;
  end

endmodule
