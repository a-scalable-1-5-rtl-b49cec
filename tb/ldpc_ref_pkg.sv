// ldpc_ref_pkg -- bit-exact behavioural reference of the decoding algorithm,
// written at the level of check rows and code bits, without the pipeline,
// shifters or shuffles of the RTL. Testbenches compare the RTL against it.
//
// Algorithm (flooding, offset min-sum, reduced marginalization):
//   for each iteration, for each layer slot s = 0..3 in turn:
//     V2C(v) = sat5( post_prev(v) - C2Vold(s,v) ), C2Vold keeps the sign and
//              magnitude bits 3:2 only (zero in the first iteration)
//     for each check row: sign = XOR of V2C signs, min1/min2 of magnitudes
//     C2V(v) = (sign ^ sign(V2C(v)),
//               max(0, (V2C(v) mag bits 2:1 == min1 bits 2:1 ? min2 : min1) - beta))
//     post_new(v) = sat7(post_new(v) + C2V(v)), post_new starting at the prior
//   hard decision = post < 0; stop at max_iter or when all checks hold.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  typedef int llr_arr_t [N];

  function automatic int sat(int v, int m);
    return (v > m) ? m : ((v < -m) ? -m : v);
  endfunction

  function automatic bit parity_ok(bit hd [N], int r);
    for (int b = 0; b < MAXROWS; b++)
      for (int z = 0; z < Z; z++) begin
        bit p = 0;
        for (int c = 0; c < NB; c++)
          if (BASE[r][b][c] >= 0) p ^= hd[c*Z + (z + BASE[r][b][c]) % Z];
        if (p) return 0;
      end
    return 1;
  endfunction

  // Random codeword of rate r: the parity-check matrix is brought to reduced
  // row echelon form over GF(2); the bits of the non-pivot columns are
  // chosen at random and each pivot bit is the parity of its row over them.
  function automatic void random_codeword(int r, output bit cw [N]);
    logic [N-1:0] h [MAXROWS*Z];
    logic [N-1:0] x;
    int piv [MAXROWS*Z];
    int m, rank;
    m = NROWS[r] * Z;
    for (int b = 0; b < NROWS[r]; b++)
      for (int z = 0; z < Z; z++) begin
        h[b*Z + z] = '0;
        for (int c = 0; c < NB; c++)
          if (BASE[r][b][c] >= 0) h[b*Z + z][c*Z + (z + BASE[r][b][c]) % Z] = 1'b1;
      end
    rank = 0;
    for (int c = 0; c < N && rank < m; c++) begin
      int p;
      p = -1;
      for (int i = rank; i < m; i++) if (h[i][c]) begin p = i; break; end
      if (p < 0) continue;
      if (p != rank) begin x = h[p]; h[p] = h[rank]; h[rank] = x; end
      for (int i = 0; i < m; i++) if (i != rank && h[i][c]) h[i] ^= h[rank];
      piv[rank] = c;
      rank++;
    end
    x = '0;
    for (int v = 0; v < N; v++) x[v] = 1'($urandom_range(0, 1));
    for (int i = 0; i < rank; i++) x[piv[i]] = 1'b0;
    for (int i = 0; i < rank; i++) x[piv[i]] = ^(h[i] & x);
    for (int v = 0; v < N; v++) cw[v] = x[v];
  endfunction

  // llr: signed integer LLRs in -15..15 (sign-magnitude on the wire).
  task automatic ref_decode(input llr_arr_t llr, input int r, input int max_iter,
                            input bit et_en, input int beta,
                            output bit bits [N], output int iters, output bit et);
    int post [N];
    int post_new [N];
    int c2v_old [NSLOT][N];   // approximated stored C2V, as integer
    int v2c [N];
    int c2v_tmp [N];
    int mx;
    mx = (max_iter < 1) ? 1 : max_iter;
    foreach (post[v]) post[v] = llr[v];
    iters = 0;
    et = 0;
    forever begin
      foreach (post_new[v]) post_new[v] = llr[v];
      for (int s = 0; s < NSLOT; s++) begin
        foreach (v2c[v]) begin
          v2c[v] = sat(post[v] - ((iters == 0) ? 0 : c2v_old[s][v]), 15);
          c2v_tmp[v] = 0;
        end
        for (int h = 0; h < 2; h++) begin
          int row;
          row = SLOT_ROWS[r][s][h];
          if (row < 0) continue;
          for (int z = 0; z < Z; z++) begin
            bit sgn;
            int m1, m2;
            sgn = 0; m1 = 15; m2 = 15;
            for (int c = 0; c < NB; c++) begin
              int v, m;
              if (BASE[r][row][c] < 0) continue;
              v = c*Z + (z + BASE[r][row][c]) % Z;
              sgn ^= (v2c[v] < 0);
              m = (v2c[v] < 0) ? -v2c[v] : v2c[v];
              if (m < m1) begin m2 = m1; m1 = m; end
              else if (m < m2) m2 = m;
            end
            for (int c = 0; c < NB; c++) begin
              int v, m, sel, mag;
              bit sv;
              if (BASE[r][row][c] < 0) continue;
              v = c*Z + (z + BASE[r][row][c]) % Z;
              sv = (v2c[v] < 0);
              m = sv ? -v2c[v] : v2c[v];
              sel = (((m >> 1) & 3) == ((m1 >> 1) & 3)) ? m2 : m1;
              mag = (sel > beta) ? sel - beta : 0;
              c2v_tmp[v] = (sgn ^ sv) ? -mag : mag;
            end
          end
        end
        foreach (post_new[v]) begin
          int a;
          post_new[v] = sat(post_new[v] + c2v_tmp[v], 63);
          a = (c2v_tmp[v] < 0) ? -c2v_tmp[v] : c2v_tmp[v];
          c2v_old[s][v] = (c2v_tmp[v] < 0) ? -(a & 12) : (a & 12);
        end
      end
      post = post_new;
      iters++;
      foreach (bits[v]) bits[v] = (post[v] < 0);
      if (et_en && parity_ok(bits, r)) begin
        et = 1;
        break;
      end
      if (iters >= mx) break;
    end
  endtask

endpackage
