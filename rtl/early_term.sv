// early_term -- early termination check.
//
// Decoding of a frame can stop once its hard decisions satisfy every parity
// check of the code. This block evaluates all parity checks of the frame's
// code rate at once: for base row b, check row z and each non-empty block
// column c with shift s, bit c*42 + (z+s) mod 42 of hd takes part. pass is
// 1 when every check has even parity. Purely combinational; the decoder
// feeds it the signs of the accumulators as they are written in the last
// layer slot of an iteration.
// The function is from the description; evaluating all checks of all
// four rates in parallel and selecting by rate is a design choice.
module early_term
  import ldpc_pkg::*;
(
  input  logic [N-1:0] hd,     // bit c*Z+i: VN i of block column c
  input  rate_e        rate,
  output logic         pass
);

  // Parity of check row z of base row b of rate r.
  function automatic logic row_parity(logic [N-1:0] bits, int r, int b, int z);
    logic p;
    p = 1'b0;
    for (int c = 0; c < NB; c++)
      if (BASE[r][b][c] >= 0) p ^= bits[c*Z + (z + BASE[r][b][c]) % Z];
    return p;
  endfunction

  logic [NRATE-1:0][MAXROWS-1:0][Z-1:0] chk;
  logic [NRATE-1:0]                     ok;

  for (genvar r = 0; r < NRATE; r++) begin : g_rate
    for (genvar b = 0; b < MAXROWS; b++) begin : g_row
      for (genvar z = 0; z < Z; z++) begin : g_chk
        assign chk[r][b][z] = row_parity(hd, r, b, z);
      end
    end
    assign ok[r] = ~|chk[r];
  end

  assign pass = ok[rate];

endmodule
