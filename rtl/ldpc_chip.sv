// ldpc_chip -- test chip: LDPC decoder core with an on-chip BER tester.
//
// The decoder core (ldpc_decoder) takes frames either from the chip inputs
// (src_awgn = 0) or from four AWGN generators in the periphery
// (src_awgn = 1). Each generator has 42 lanes, so the four together deliver
// 168 LLRs per cycle and a frame of 672 LLRs is assembled in four cycles,
// faster than the decoder consumes frames (at least 8 cycles per frame).
// The generators model the all-zero codeword, so the error collector
// compares every decoded frame with zeros and counts frames, frame errors,
// bit errors and iterations; BER, FER and the average number of iterations
// follow from these counters. The decoder's decisions also leave the chip.
//
// Interface: ext_valid/ext_ready is a valid-ready handshake for external
// frames; ext_ready is 0 while src_awgn is 1. Frames are tagged with a
// running 8-bit count. Configuration inputs (rate, max_iter, et_en, noise
// mean and scale) should be changed only while no frame is in flight.
// From the description: the decoder plus four AWGN generators and an error
// collector in the periphery. Own choices: lane count, frame assembly,
// source selection and the all-zero test codeword.
module ldpc_chip
  import ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // configuration
  input  rate_e        rate,
  input  logic [4:0]   max_iter,
  input  logic         et_en,
  input  logic         src_awgn,
  input  logic [4:0]   awgn_mean,
  input  logic [7:0]   awgn_scale,
  input  logic         stats_clear,
  // external frame input
  input  logic         ext_valid,
  output logic         ext_ready,
  input  msg_t         ext_llr [N],
  // decoded frames
  output logic         dec_valid,
  output logic [7:0]   dec_tag,
  output rate_e        dec_rate,
  output logic [4:0]   dec_iters,
  output logic         dec_et,
  output logic [N-1:0] dec_bits,
  // statistics
  output logic [31:0]  stat_frames,
  output logic [31:0]  stat_frame_errs,
  output logic [31:0]  stat_bit_errs,
  output logic [31:0]  stat_iter_sum
);

  localparam int NGEN  = 4;
  localparam int LANES = 42;
  localparam int NBLK  = N / (NGEN * LANES);   // 4 cycles per frame

  // ---------------- AWGN generators and frame assembly ----------------
  msg_t       gen_llr [NGEN][LANES];
  logic       gen_en, gen_vld;
  msg_t       abuf [N];
  logic [1:0] acnt;
  logic       afull;

  for (genvar g = 0; g < NGEN; g++) begin : g_awgn
    awgn_gen #(.LANES(LANES), .SEED(32'h1234_5678 + 32'(g) * 32'h0101_0101)) u_awgn (
      .clk, .rst_n, .en(gen_en), .mean(awgn_mean), .scale(awgn_scale),
      .llr(gen_llr[g])
    );
  end

  assign gen_en = src_awgn && !afull;

  // ---------------- decoder core ----------------
  logic       dec_in_valid, dec_in_ready;
  msg_t       dec_in_llr [N];
  logic [7:0] tag;

  always_comb begin
    dec_in_valid = src_awgn ? afull : ext_valid;
    ext_ready    = !src_awgn && dec_in_ready;
    for (int i = 0; i < N; i++) dec_in_llr[i] = src_awgn ? abuf[i] : ext_llr[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_vld <= 1'b0;
      acnt    <= '0;
      afull   <= 1'b0;
      abuf    <= '{default: '0};
      tag     <= '0;
    end else begin
      gen_vld <= gen_en;
      if (gen_vld && !afull) begin
        for (int g = 0; g < NGEN; g++)
          for (int l = 0; l < LANES; l++)
            abuf[int'(acnt)*NGEN*LANES + g*LANES + l] <= gen_llr[g][l];
        acnt <= acnt + 2'd1;
        if (int'(acnt) == NBLK - 1) afull <= 1'b1;
      end
      if (src_awgn && dec_in_valid && dec_in_ready) begin
        afull <= 1'b0;
        acnt  <= '0;
      end
      if (dec_in_valid && dec_in_ready) tag <= tag + 8'd1;
    end
  end

  ldpc_decoder #(.TAG_W(8)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_rate(rate),
    .in_tag(tag), .in_llr(dec_in_llr), .max_iter, .et_en,
    .out_valid(dec_valid), .out_tag(dec_tag), .out_rate(dec_rate),
    .out_iters(dec_iters), .out_et(dec_et), .out_bits(dec_bits)
  );

  // ---------------- error collector ----------------
  error_collector #(.CNT_W(32)) u_errs (
    .clk, .rst_n, .clear(stats_clear),
    .dec_valid, .dec_rate, .dec_iters, .dec_bits, .ref_bits('0),
    .frames(stat_frames), .frame_errs(stat_frame_errs),
    .bit_errs(stat_bit_errs), .iter_sum(stat_iter_sum)
  );

endmodule
