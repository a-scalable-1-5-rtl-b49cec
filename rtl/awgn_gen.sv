// awgn_gen -- test-support generator of noisy channel LLRs.
//
// Each of LANES lanes produces one 5-bit sign-magnitude LLR per enabled
// cycle for a transmitted all-zero codeword (BPSK symbol +1):
//   llr = sat15( mean + (noise * scale) >>> 10 )
// noise is approximately Gaussian with zero mean and a standard deviation of
// about 147.8: the centred sum of the four bytes of a 32-bit xorshift
// random word (Irwin-Hall distribution of four uniform variables). With
// scale = 28 the LLR noise has a standard deviation of about 4 LSB. mean
// and scale set the signal-to-noise ratio. Each lane has its own xorshift
// state, seeded from SEED and the lane number; the states advance only when
// en is 1. Output llr is registered (valid one cycle after en).
// The description only names four on-chip AWGN generators used to measure
// error rates; the whole method here is a design choice.
module awgn_gen
  import ldpc_pkg::*;
#(
  parameter int unsigned LANES = 42,
  parameter logic [31:0] SEED  = 32'h1234_5678
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [4:0] mean,      // LLR of a noiseless +1 symbol, 0..15
  input  logic [7:0] scale,
  output msg_t       llr [LANES]
);

  logic [31:0] state [LANES];

  function automatic logic [31:0] xorshift32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] lane_seed(int unsigned lane);
    logic [31:0] s;
    s = SEED ^ (32'(lane) * 32'h9E37_79B9);
    return (s == 32'd0) ? 32'h1 : s;
  endfunction

  msg_t llr_d [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [10:0] noise;
      logic signed [19:0] prod;
      logic signed [9:0]  v;
      noise = 11'(state[l][7:0]) + 11'(state[l][15:8]) +
              11'(state[l][23:16]) + 11'(state[l][31:24]) - 11'sd510;
      prod  = 20'(noise) * $signed({12'd0, scale});
      v     = 10'($signed({5'd0, mean})) + 10'(prod >>> 10);
      if (v > 10'sd63)  v = 10'sd63;
      if (v < -10'sd63) v = -10'sd63;
      llr_d[l] = int2sm(8'(v));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        state[l] <= lane_seed(l);
        llr[l]   <= '0;
      end
    end else if (en) begin
      for (int l = 0; l < LANES; l++) begin
        llr[l]   <= llr_d[l];
        state[l] <= xorshift32(state[l]);
      end
    end
  end

endmodule
