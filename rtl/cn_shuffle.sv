// cn_shuffle -- input shuffler of one check node.
//
// Input k of the 16-input CN takes the V2C of block column slot_col[k];
// inputs 0..7 feed the top 8-input CN and 8..15 the bottom one. A
// slot_valid of 0 drives the neutral message (sign 0, magnitude 15).
// slot_col and slot_valid come from the constant layer configuration table
// (ldpc_pkg), which wires input k to column 2k (top) or 2(k-8)+1 (bottom)
// wherever the code allows, so that most inputs are fixed wires and only
// the few columns that break the alternating pattern of the combined rows
// need a multiplexer. Purely combinational.
// From the description: upper-layer messages to the top 8 inputs, lower to
// the bottom 8, no order needed for a full-weight layer, and mostly fixed
// wiring. The default wiring and the table-driven selection are design
// choices.
module cn_shuffle
  import ldpc_pkg::*;
(
  input  msg_t          col  [NB],
  input  logic [NB-1:0][3:0] slot_col,
  input  logic [NB-1:0] slot_valid,
  output msg_t          slot [NB]
);

  always_comb begin
    for (int k = 0; k < NB; k++)
      slot[k] = slot_valid[k] ? col[slot_col[k]] : {1'b0, 4'hf};
  end

endmodule
