// cn16 -- reconfigurable check node: one 16-input CN or two 8-input CNs.
//
// Shuffled inputs 0..7 go to the top cn8 and 8..15 to the bottom cn8. A
// compare-select stage merges the two results into the 16-input result.
// Output multiplexers then choose, for each block column c, the message it
// receives: the merged result when the slot is a full-weight layer (full),
// otherwise the top result for a column of the upper row and the bottom
// result for a column of the lower row (col_lower[c]). Purely
// combinational. The structure follows the reconfigurable CN of the
// description; only the coding of the mux selects is a design choice.
module cn16
  import ldpc_pkg::*;
(
  input  msg_t          in   [NB],
  input  logic          full,
  input  logic [NB-1:0] col_lower,
  output cmin_t         out  [NB]
);

  msg_t  in_top [8];
  msg_t  in_bot [8];
  cmin_t r_top, r_bot, r_both;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      in_top[i] = in[i];
      in_bot[i] = in[i+8];
    end
  end

  cn8 u_top (.in(in_top), .out(r_top));
  cn8 u_bot (.in(in_bot), .out(r_bot));
  cn_compare_select u_cs (.top(r_top), .bottom(r_bot), .both(r_both));

  always_comb begin
    for (int c = 0; c < NB; c++)
      out[c] = full ? r_both : (col_lower[c] ? r_bot : r_top);
  end

endmodule
