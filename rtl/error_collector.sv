// error_collector -- bit, frame and iteration statistics of decoded frames.
//
// For each decoded frame (dec_valid) it compares the information bits, the
// first K columns of the frame (K = 336, 420, 504, 546 for rates 1/2, 5/8,
// 3/4, 13/16), with the transmitted codeword ref_bits and accumulates:
// frames decoded, frames with at least one bit error, bit errors, and the
// sum of the iteration counts. BER = bit_errs / (frames*K), FER =
// frame_errs / frames, average iterations = iter_sum / frames. clear resets
// all counters. Counters saturate at their maximum. Counts are updated one
// cycle after dec_valid.
// The description names an error collector measuring BER, FER and the
// average number of iterations; its structure here is a design choice.
module error_collector
  import ldpc_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             dec_valid,
  input  rate_e            dec_rate,
  input  logic [4:0]       dec_iters,
  input  logic [N-1:0]     dec_bits,
  input  logic [N-1:0]     ref_bits,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] frame_errs,
  output logic [CNT_W-1:0] bit_errs,
  output logic [CNT_W-1:0] iter_sum
);

  logic [9:0] nerr;
  always_comb begin
    nerr = '0;
    for (int i = 0; i < N; i++)
      if (i < KBITS[dec_rate] && (dec_bits[i] != ref_bits[i])) nerr += 10'd1;
  end

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frames <= '0; frame_errs <= '0; bit_errs <= '0; iter_sum <= '0;
    end else if (clear) begin
      frames <= '0; frame_errs <= '0; bit_errs <= '0; iter_sum <= '0;
    end else if (dec_valid) begin
      frames     <= sat_add(frames, 1);
      frame_errs <= sat_add(frame_errs, CNT_W'(nerr != 0));
      bit_errs   <= sat_add(bit_errs, CNT_W'(nerr));
      iter_sum   <= sat_add(iter_sum, CNT_W'(dec_iters));
    end
  end

endmodule
