// dec_ctrl -- schedule of the five-stage decoder pipeline.
//
// Two frames (slots F1 = 0 and F2 = 1) share the pipeline. A free-running
// 3-bit phase counter gives each frame an alternating 4-cycle window: in
// phase p, frame p[2] issues layer slot p[1:0] into stage 1. Stage 5 of a
// layer falls in the same cycle as stage 1 of the same layer of the other
// frame, so the pipeline has no bubbles, and a frame's accumulators are
// complete (all four slots of the iteration accumulated) exactly when its
// next window begins. One iteration of a frame therefore takes 8 cycles and
// the decoder finishes 2 frames per 8*iterations cycles.
//
// The control word of each issued slot (frame, layer slot, code rate) moves
// with the data through stages 2..5 and selects the layer configuration
// each stage uses. At stage 5 of the last slot, the iteration count of the
// frame is advanced and the frame retires when it reached max_iter or, with
// et_en, when the early termination check passes. A new frame is accepted
// (in_valid & in_ready) into the retiring slot in that same cycle, or into
// an empty slot at any time; it starts with the next window of its slot.
//
// From the description: five stages, two interleaved frames, flooding
// iterations, early termination. Own choices: the phase counter, the
// handshake, a per-frame rate, the tag, and the empty fourth slot of the
// 3-layer rate-13/16 code.
module dec_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // frame input
  input  logic             in_valid,
  output logic             in_ready,
  input  rate_e            in_rate,
  input  logic [TAG_W-1:0] in_tag,
  output logic             ld_en,
  output logic             ld_frame,
  // configuration
  input  logic [4:0]       max_iter,
  input  logic             et_en,
  // stage 1
  output logic             s1_valid,
  output logic             s1_frame,
  output logic             s1_first_iter,
  // stages 2..4
  output layer_cfg_t       s2_cfg,
  output layer_cfg_t       s3_cfg,
  output layer_cfg_t       s4_cfg,
  // stage 5
  output logic             s5_en,
  output logic             s5_frame,
  output logic             s5_first_layer,
  output layer_cfg_t       s5_cfg,
  output rate_e            s5_rate,
  input  logic             et_pass,
  output logic             retire,
  // frame output (valid in the cycle after retire)
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output rate_e            out_rate,
  output logic [4:0]       out_iters,
  output logic             out_et
);

  typedef struct packed {
    logic       valid;
    logic       frame;
    logic [1:0] layer;
    rate_e      rate;
  } stage_ctl_t;

  logic [2:0]       phase;
  logic [1:0]       active, run;
  rate_e            f_rate [2];
  logic [TAG_W-1:0] f_tag  [2];
  logic [4:0]       f_iter [2];
  stage_ctl_t       c1, c2, c3, c4, c5;

  // ---------------- stage 1 issue ----------------
  always_comb begin
    c1.frame = phase[2];
    c1.layer = phase[1:0];
    c1.rate  = f_rate[phase[2]];
    c1.valid = (phase[1:0] == 2'd0) ? active[phase[2]] : run[phase[2]];
  end
  assign s1_valid      = c1.valid;
  assign s1_frame      = c1.frame;
  assign s1_first_iter = (f_iter[c1.frame] == 5'd0);

  assign s2_cfg = get_cfg(c2.rate, c2.layer);
  assign s3_cfg = get_cfg(c3.rate, c3.layer);
  assign s4_cfg = get_cfg(c4.rate, c4.layer);
  assign s5_cfg = get_cfg(c5.rate, c5.layer);

  // ---------------- stage 5 and retirement ----------------
  logic [4:0] iter_next;
  logic       last, done_max, done_et;
  always_comb begin
    s5_en          = c5.valid;
    s5_frame       = c5.frame;
    s5_first_layer = (c5.layer == 2'd0);
    s5_rate        = c5.rate;
    last           = c5.valid && (c5.layer == 2'(NSLOT-1));
    iter_next      = f_iter[c5.frame] + 5'd1;
    done_max       = (iter_next >= max_iter);
    done_et        = et_en && et_pass;
    retire         = last && (done_max || done_et);
  end

  // ---------------- frame loading ----------------
  always_comb begin
    in_ready = retire || !active[0] || !active[1];
    ld_en    = in_valid && in_ready;
    if (retire)          ld_frame = c5.frame;
    else if (!active[0]) ld_frame = 1'b0;
    else                 ld_frame = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      active    <= '0;
      run       <= '0;
      f_rate    <= '{default: RATE_1_2};
      f_tag     <= '{default: '0};
      f_iter    <= '{default: '0};
      c2        <= '0;
      c3        <= '0;
      c4        <= '0;
      c5        <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_rate  <= RATE_1_2;
      out_iters <= '0;
      out_et    <= 1'b0;
    end else begin
      phase <= phase + 3'd1;
      if (phase[1:0] == 2'd0) run[phase[2]] <= active[phase[2]];
      c2 <= c1;
      c3 <= c2;
      c4 <= c3;
      c5 <= c4;
      out_valid <= retire;
      if (last) f_iter[c5.frame] <= iter_next;
      if (retire) begin
        active[c5.frame] <= 1'b0;
        out_tag   <= f_tag[c5.frame];
        out_rate  <= c5.rate;
        out_iters <= iter_next;
        out_et    <= done_et;
      end
      if (ld_en) begin
        active[ld_frame] <= 1'b1;
        f_rate[ld_frame] <= in_rate;
        f_tag[ld_frame]  <= in_tag;
        f_iter[ld_frame] <= '0;
      end
    end
  end

  // A frame must never be loaded into a slot that still has work in flight.
  a_load_free : assert property (@(posedge clk) disable iff (!rst_n)
    ld_en |-> (!active[ld_frame] || (retire && ld_frame == c5.frame)));

endmodule
