// ldpc_pkg -- shared types, constants and code tables of the IEEE 802.11ad
// LDPC decoder.
//
// The code is quasi-cyclic: a base matrix of up to 8 rows by 16 block
// columns, each entry a 42x42 cyclically shifted identity (shift value) or
// empty (-1). The block length is 16*42 = 672 for all four code rates.
//
// Messages are 5-bit sign-magnitude values: bit 4 is the sign (1 = negative
// LLR = bit 1 more likely), bits 3:0 the magnitude, 0..15. The check node
// sends each VN a compressed message {sign, min1, min2}; the VN selects
// min1 or min2 itself (reduced marginalization).
//
// The decoder processes one "layer slot" per cycle and four slots per
// iteration. A slot is either one full-weight base row, processed by a
// 16-input CN, or two non-overlapping base rows ("upper" and "lower"),
// processed by the two 8-input halves of the CN. The per-slot hardware
// configuration (layer_cfg_t) is computed here at elaboration time from the
// base matrices and stored as a constant table indexed by {rate, slot}.
//
// The rate-1/2 base matrix and its pairing of rows (0,2) (1,3) (4,6) (5,7)
// follow the printed matrix of the design description. The rate-5/8, 3/4
// and 13/16 base matrices are those of the IEEE 802.11ad standard; their
// values were not printed in the description. Which rows are paired, and
// the empty fourth slot of the 3-row rate-13/16 code, are design choices.
package ldpc_pkg;

  localparam int Z        = 42;        // submatrix size = CNs in the CNG
  localparam int NB       = 16;        // block columns = VNGs
  localparam int N        = NB * Z;    // 672 VNs
  localparam int NSLOT    = 4;         // layer slots per iteration
  localparam int NRATE    = 4;
  localparam int MAXROWS  = 8;
  localparam int MSG_W    = 5;
  localparam int ACC_W    = 7;
  localparam int SHIFT_W  = 6;

  typedef logic [MSG_W-1:0] msg_t;     // {sign, mag[3:0]}

  typedef struct packed {
    logic       sign;                  // XOR of all input signs
    logic [3:0] min1;                  // smallest input magnitude
    logic [3:0] min2;                  // second smallest
  } cmin_t;

  typedef enum logic [1:0] {
    RATE_1_2   = 2'd0,
    RATE_5_8   = 2'd1,
    RATE_3_4   = 2'd2,
    RATE_13_16 = 2'd3
  } rate_e;

  // Hardware configuration of one layer slot.
  typedef struct packed {
    logic                         full;        // 1: one 16-input CN
    logic [NB-1:0]                col_valid;   // block column used in slot
    logic [NB-1:0]                col_lower;   // column belongs to lower row
    logic [NB-1:0][SHIFT_W-1:0]   col_shift;   // cyclic shift of column
    logic [NB-1:0][3:0]           slot_col;    // CN input -> block column
    logic [NB-1:0]                slot_valid;  // CN input carries a message
  } layer_cfg_t;

  typedef layer_cfg_t [NRATE*NSLOT-1:0] cfg_table_t;

  // Base matrices, -1 = empty submatrix. Unused rows are all -1.
  localparam int BASE [NRATE][MAXROWS][NB] = '{
    // rate 1/2
    '{'{40,-1,38,-1,13,-1, 5,-1,18,-1,-1,-1,-1,-1,-1,-1},
      '{34,-1,35,-1,27,-1,-1,30, 2, 1,-1,-1,-1,-1,-1,-1},
      '{-1,36,-1,31,-1, 7,-1,34,-1,10,41,-1,-1,-1,-1,-1},
      '{-1,27,-1,18,-1,12,20,-1,-1,-1,15, 6,-1,-1,-1,-1},
      '{35,-1,41,-1,40,-1,39,-1,28,-1,-1, 3,28,-1,-1,-1},
      '{29,-1, 0,-1,-1,22,-1, 4,-1,28,-1,27,-1,23,-1,-1},
      '{-1,31,-1,23,-1,21,-1,20,-1,-1,12,-1,-1, 0,13,-1},
      '{-1,22,-1,34,31,-1,14,-1, 4,-1,-1,-1,13,-1,22,24}},
    // rate 5/8
    '{'{20,36,34,31,20, 7,41,34,-1,10,41,-1,-1,-1,-1,-1},
      '{30,27,-1,18,-1,12,20,14, 2,25,15, 6,-1,-1,-1,-1},
      '{35,-1,41,-1,40,-1,39,-1,28,-1,-1, 3,28,-1,-1,-1},
      '{29,-1, 0,-1,-1,22,-1, 4,-1,28,-1,27,24,23,-1,-1},
      '{-1,31,-1,23,-1,21,-1,20,-1, 9,12,-1,-1, 0,13,-1},
      '{-1,22,-1,34,31,-1,14,-1, 4,-1,-1,-1,-1,-1,22,24},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1}},
    // rate 3/4
    '{'{35,19,41,22,40,41,39, 6,28,18,17, 3,28,-1,-1,-1},
      '{29,30, 0, 8,33,22,17, 4,27,28,20,27,24,23,-1,-1},
      '{37,31,18,23,11,21, 6,20,32, 9,12,29,-1, 0,13,-1},
      '{25,22, 4,34,31, 3,14,15, 4,-1,14,18,13,13,22,24},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1}},
    // rate 13/16
    '{'{29,30, 0, 8,33,22,17, 4,27,28,20,27,24,23,-1,-1},
      '{37,31,18,23,11,21, 6,20,32, 9,12,29,10, 0,13,-1},
      '{25,22, 4,34,31, 3,14,15, 4, 2,14,18,13,13,22,24},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
      '{-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1}}
  };

  localparam int NROWS [NRATE] = '{8, 6, 4, 3};

  // Base rows processed in each slot: {upper, lower}; lower = -1 for a
  // full-weight slot, both -1 for an empty slot.
  localparam int SLOT_ROWS [NRATE][NSLOT][2] = '{
    '{'{0, 2}, '{1, 3}, '{4, 6}, '{5, 7}},
    '{'{0,-1}, '{1,-1}, '{2, 4}, '{3, 5}},
    '{'{0,-1}, '{1,-1}, '{2,-1}, '{3,-1}},
    '{'{0,-1}, '{1,-1}, '{2,-1}, '{-1,-1}}
  };

  // Information bits per frame (the first K columns are systematic).
  localparam int KBITS [NRATE] = '{336, 420, 504, 546};

  // CN input s is wired by default to block column DEF_COL(s): inputs
  // 0..7 (the top 8-input CN) to the even columns, 8..15 (the bottom
  // 8-input CN) to the odd columns.
  function automatic int def_col(int s);
    return (s < 8) ? 2 * s : 2 * (s - 8) + 1;
  endfunction

  function automatic layer_cfg_t make_cfg(int r, int sl);
    layer_cfg_t c;
    int up, lo, row;
    bit used [NB];
    c = '0;
    up = SLOT_ROWS[r][sl][0];
    lo = SLOT_ROWS[r][sl][1];
    c.full = (lo < 0);
    for (int k = 0; k < NB; k++) begin
      used[k] = 1'b0;
      c.slot_col[k] = 4'(def_col(k));
    end
    for (int col = 0; col < NB; col++) begin
      row = -1;
      if (up >= 0 && BASE[r][up][col] >= 0) row = up;
      if (lo >= 0 && BASE[r][lo][col] >= 0) begin
        row = lo;
        c.col_lower[col] = 1'b1;
      end
      if (row >= 0) begin
        c.col_valid[col] = 1'b1;
        c.col_shift[col] = SHIFT_W'(BASE[r][row][col]);
      end
    end
    if (c.full) begin
      // Input order does not matter to a 16-input CN: default wiring.
      for (int k = 0; k < NB; k++)
        c.slot_valid[k] = c.col_valid[def_col(k)];
    end else begin
      // Upper-row columns go to inputs 0..7, lower-row columns to 8..15.
      // First keep every column on its default input, then move the rest
      // to the free inputs of the correct half.
      for (int k = 0; k < NB; k++) begin
        int dc;
        dc = def_col(k);
        if (c.col_valid[dc] && (c.col_lower[dc] == (k >= 8))) begin
          c.slot_valid[k] = 1'b1;
          used[dc] = 1'b1;
        end
      end
      for (int col = 0; col < NB; col++) begin
        if (c.col_valid[col] && !used[col]) begin
          for (int k = 0; k < NB; k++) begin
            if (!used[col] && !c.slot_valid[k] &&
                ((k >= 8) == c.col_lower[col])) begin
              c.slot_valid[k] = 1'b1;
              c.slot_col[k]   = 4'(col);
              used[col]       = 1'b1;
            end
          end
        end
      end
    end
    return c;
  endfunction

  function automatic cfg_table_t build_cfg_table();
    cfg_table_t t;
    for (int r = 0; r < NRATE; r++)
      for (int sl = 0; sl < NSLOT; sl++)
        t[r*NSLOT + sl] = make_cfg(r, sl);
    return t;
  endfunction

  localparam cfg_table_t CFG_TABLE = build_cfg_table();

  function automatic layer_cfg_t get_cfg(rate_e r, logic [1:0] sl);
    return CFG_TABLE[{r, sl}];
  endfunction

  // Sign-magnitude message to two's complement.
  function automatic logic signed [ACC_W-1:0] sm2int(msg_t m);
    logic signed [ACC_W-1:0] v;
    v = ACC_W'(m[3:0]);
    return m[4] ? -v : v;
  endfunction

  // Two's complement value to a saturated sign-magnitude message.
  function automatic msg_t int2sm(logic signed [ACC_W:0] v);
    logic [ACC_W:0] a;
    a = v[ACC_W] ? -v : v;
    if (a > 15) a = 15;
    return {v[ACC_W] && (a != 0), a[3:0]};
  endfunction

  // Saturating accumulator addition.
  function automatic logic signed [ACC_W-1:0] sat_acc(logic signed [ACC_W:0] v);
    localparam logic signed [ACC_W:0] MAXV = (1 <<< (ACC_W - 1)) - 1;
    if (v > MAXV) return MAXV[ACC_W-1:0];
    if (v < -MAXV) return -MAXV[ACC_W-1:0];
    return v[ACC_W-1:0];
  endfunction

endpackage
