// cn_compare_select -- joins the results of the two 8-input check nodes
// into the result of one 16-input check node.
//
// sign = sign_top XOR sign_bottom; min1 is the smaller of the two min1;
// min2 is the smaller of the other half's min1 and the winning half's min2.
// Purely combinational. The block is from the description; the equations
// are the standard two-minimum merge.
module cn_compare_select
  import ldpc_pkg::*;
(
  input  cmin_t top,
  input  cmin_t bottom,
  output cmin_t both
);

  always_comb begin
    both.sign = top.sign ^ bottom.sign;
    if (top.min1 <= bottom.min1) begin
      both.min1 = top.min1;
      both.min2 = (bottom.min1 < top.min2) ? bottom.min1 : top.min2;
    end else begin
      both.min1 = bottom.min1;
      both.min2 = (top.min1 < bottom.min2) ? top.min1 : bottom.min2;
    end
  end

endmodule
