// vn -- variable node with reduced marginalization.
//
// One VN holds one code bit for two frames in flight (F1/F2): a 5-bit prior
// and a 7-bit accumulation register per frame. It takes part in two pipeline
// stages of the decoder:
//
//   stage 1 (V2C calculation): V2C = acc[s1_frame] - C2V_old, where C2V_old
//     is the message this VN received from the same layer one iteration
//     earlier, read from a 4-stage shift register that keeps only its sign
//     and magnitude bits 3:2 (the two LSBs are removed and re-inserted as
//     zeros). The V2C is saturated to 5-bit sign-magnitude and registered
//     (output v2c). Its sign and magnitude bits 2:1 (bits [4,2:1]) are pushed
//     into a second 4-stage shift register.
//   stage 5 (V2C accumulation, four cycles later): the compressed C2V
//     {sign, min1, min2} from the CN is marginalized with the stored V2C
//     bits: the sign is XORed with the stored V2C sign, and min2 is chosen
//     when the stored magnitude bits equal min1 bits 2:1, else min1. An
//     offset BETA is subtracted (offset min-sum). The C2V is added to the
//     accumulator, which restarts from the prior on the first layer slot of
//     an iteration (flooding schedule).
//
// Both shift registers advance every cycle. Because the two frames use the
// pipeline in alternating 4-cycle windows, four stages serve both frames:
// the V2C pushed in stage 1 is read back in stage 5 four cycles later, and
// the C2V pushed in stage 5 is read back by stage 1 of the same frame and
// layer four cycles after that (the other frame's window lies between).
//
// From the description: the stage split, F1/F2 accumulation registers and
// priors, the 4-stage shift registers, the stored bit fields [4,2:1] and
// [4:2], the "=" compare, the min1/min2 mux and the -BETA block. Own
// choices: BETA = 1, saturating arithmetic, the first-iteration zeroing of
// C2V_old, and comparing against min1 bits 2:1 (the same bits that are
// stored from the V2C).
//
// Interface: ld_en loads ld_llr as prior and accumulator of frame ld_frame
// (takes priority over accumulation). s5_conn = 0 means the VN's block
// column is empty in this slot: nothing is added. hd_next is the sign of
// the stage-5 frame's accumulator after this cycle's update.
module vn
  import ldpc_pkg::*;
#(
  parameter int unsigned BETA = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // frame load
  input  logic  ld_en,
  input  logic  ld_frame,
  input  msg_t  ld_llr,
  // stage 1
  input  logic  s1_frame,
  input  logic  s1_first_iter,
  output msg_t  v2c,
  // stage 5
  input  logic  s5_en,
  input  logic  s5_frame,
  input  logic  s5_first_layer,
  input  logic  s5_conn,
  input  cmin_t c2v_in,
  output logic  hd_next
);

  msg_t                     prior [2];
  logic signed [ACC_W-1:0]  acc   [2];
  logic [2:0]               v2c_sr [4];   // {sign, mag[2:1]} of V2C
  logic [2:0]               c2v_sr [4];   // {sign, mag[3:2]} of C2V

  // ---------------- stage 1: V2C calculation ----------------
  msg_t c2v_old;
  msg_t v2c_d;
  always_comb begin
    c2v_old = s1_first_iter ? '0 : {c2v_sr[3], 2'b00};   // insert zeros
    v2c_d   = int2sm((ACC_W+1)'(acc[s1_frame]) - (ACC_W+1)'(sm2int(c2v_old)));
  end

  // ---------------- stage 5: C2V marginalization and accumulation -------
  logic [2:0]              v2c_st;
  logic [3:0]              mag_sel, mag;
  msg_t                    c2v;
  logic signed [ACC_W-1:0] acc_base, acc_sum;
  always_comb begin
    v2c_st  = v2c_sr[3];
    mag_sel = (v2c_st[1:0] == c2v_in.min1[2:1]) ? c2v_in.min2 : c2v_in.min1;
    mag     = (mag_sel > 4'(BETA)) ? mag_sel - 4'(BETA) : 4'd0;
    c2v     = s5_conn ? {c2v_in.sign ^ v2c_st[2], mag} : '0;
    acc_base = s5_first_layer ? ACC_W'(sm2int(prior[s5_frame])) : acc[s5_frame];
    acc_sum  = sat_acc((ACC_W+1)'(acc_base) + (ACC_W+1)'(sm2int(c2v)));
    hd_next  = s5_en ? acc_sum[ACC_W-1] : acc[s5_frame][ACC_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prior  <= '{default: '0};
      acc    <= '{default: '0};
      v2c_sr <= '{default: '0};
      c2v_sr <= '{default: '0};
      v2c    <= '0;
    end else begin
      v2c       <= v2c_d;
      v2c_sr[0] <= {v2c_d[4], v2c_d[2:1]};
      c2v_sr[0] <= {c2v[4], c2v[3:2]};
      for (int i = 1; i < 4; i++) begin
        v2c_sr[i] <= v2c_sr[i-1];
        c2v_sr[i] <= c2v_sr[i-1];
      end
      if (s5_en) acc[s5_frame] <= acc_sum;
      if (ld_en) begin
        prior[ld_frame] <= ld_llr;
        acc[ld_frame]   <= ACC_W'(sm2int(ld_llr));
      end
    end
  end

endmodule
