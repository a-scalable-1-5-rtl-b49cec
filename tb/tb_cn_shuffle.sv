// tb_cn_shuffle -- checks the shuffler with the configuration of every
// layer slot of every code rate. Block column c carries a message that
// encodes c. Expected, from the base matrix rows of the slot: in a split
// slot the top 8 inputs hold exactly the upper-row columns and the bottom 8
// exactly the lower-row columns; in a full slot all 16 inputs together hold
// exactly the row's columns; every other input is neutral (magnitude 15).
module tb_cn_shuffle;
  import ldpc_pkg::*;
  msg_t          col  [NB];
  logic [NB-1:0][3:0] slot_col;
  logic [NB-1:0] slot_valid;
  msg_t          slot [NB];
  int checks = 0, failures = 0;
  int n_moved = 0;

  cn_shuffle dut (.col, .slot_col, .slot_valid, .slot);

  initial begin
    for (int c = 0; c < NB; c++) col[c] = {1'b1, 4'(c)};   // sign 1 marks a real message
    for (int r = 0; r < NRATE; r++) begin
      for (int sl = 0; sl < NSLOT; sl++) begin
        layer_cfg_t cfg;
        int up, lo;
        int want_top [$], want_bot [$], got_top [$], got_bot [$];
        want_top.delete(); want_bot.delete(); got_top.delete(); got_bot.delete();
        cfg = get_cfg(rate_e'(r), 2'(sl));
        slot_col   = cfg.slot_col;
        slot_valid = cfg.slot_valid;
        #1;
        up = SLOT_ROWS[r][sl][0];
        lo = SLOT_ROWS[r][sl][1];
        for (int c = 0; c < NB; c++) begin
          if (up >= 0 && BASE[r][up][c] >= 0) want_top.push_back(c);
          if (lo >= 0 && BASE[r][lo][c] >= 0) want_bot.push_back(c);
        end
        for (int k = 0; k < NB; k++) begin
          if (slot[k][4]) begin
            if (k < 8 || lo < 0) got_top.push_back(int'(slot[k][3:0]));
            else                 got_bot.push_back(int'(slot[k][3:0]));
            if (k < 8 && int'(slot[k][3:0]) != 2*k) n_moved++;
          end else begin
            checks++;
            if (slot[k] != {1'b0, 4'hf}) begin
              failures++;
              $display("FAIL rate %0d slot %0d input %0d not neutral", r, sl, k);
            end
          end
        end
        want_top.sort(); want_bot.sort(); got_top.sort(); got_bot.sort();
        checks++;
        if (want_top != got_top || want_bot != got_bot) begin
          failures++;
          $display("FAIL rate %0d slot %0d: wrong columns", r, sl);
        end
      end
    end
    // at least one column must leave its default wire in a split slot
    checks++;
    if (n_moved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
