// cn8 -- 8-input min-sum check node core.
//
// From eight 5-bit sign-magnitude V2C messages it forms the compressed
// check-to-variable result: the XOR of all signs and the smallest (min1)
// and second smallest (min2) magnitude; equal smallest values give
// min1 = min2. Each VN later picks min1 or min2 and its own sign itself.
// Unused inputs must be driven with a neutral message (sign 0, magnitude
// 15). Purely combinational. The 8-input CN and its {sign, min1, min2}
// output are from the description; the linear min search is a design
// choice.
module cn8
  import ldpc_pkg::*;
(
  input  msg_t  in [8],
  output cmin_t out
);

  always_comb begin
    out.sign = 1'b0;
    out.min1 = 4'hf;
    out.min2 = 4'hf;
    for (int i = 0; i < 8; i++) begin
      out.sign ^= in[i][4];
      if (in[i][3:0] < out.min1) begin
        out.min2 = out.min1;
        out.min1 = in[i][3:0];
      end else if (in[i][3:0] < out.min2) begin
        out.min2 = in[i][3:0];
      end
    end
  end

endmodule
