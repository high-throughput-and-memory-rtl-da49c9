// ldpc_ref_pkg: edge-level reference model of the decoder, for testbenches.
//
// It decodes with the flooding schedule directly on the parity-check matrix:
// every iteration first updates all variable nodes, then all check nodes,
// keeping one message per edge. It shares no code with the RTL: the number
// formats (4-bit sign-magnitude messages, 6-bit symmetric saturation of the
// extrinsic value, scaling by 3/4 with truncation and saturation to 3 bits)
// and the code definition (row of column x in sub-matrix (r,j) =
// ((58r+7)x + 53r + 11 - j) mod P) are written out again here from the
// design description. Check rows scan their edges in block-column order,
// keeping the first index on ties and starting from minima of 7.
package ldpc_ref_pkg;

  typedef struct {
    int n_iter;        // check updates done
    int n_min2;        // edges that receive the second minimum
    int n_ext_sat;     // extrinsic values saturated to 6 bits
    int n_scale_sat;   // scaled magnitudes clipped to 7
    int n_neg_r;       // negative check-to-variable messages
  } ref_stats_t;

  function automatic int row_of(int r, int x, int j, int p);
    return (((58 * r + 7) * x + 53 * r + 11 - j) % p + p) % p;
  endfunction

  // llr[v], v = j*P + x, integers in -7..7. dec[v] = 1 for a negative total
  // in the last iteration's variable update.
  function automatic void decode(input int p, input int c, input int t, input int iters,
                                 input int llr[], output bit dec[], inout ref_stats_t st);
    int n;
    int rmsg[][];      // check-to-variable value per [block row][variable]
    int lmag[][];      // variable-to-check magnitude
    bit lsgn[][];      // variable-to-check sign
    int col_of[][][];  // [r][q][j] -> variable of row q, block column j
    n = p * t;
    dec = new[n];
    rmsg = new[c]; lmag = new[c]; lsgn = new[c]; col_of = new[c];
    for (int r = 0; r < c; r++) begin
      rmsg[r] = new[n]; lmag[r] = new[n]; lsgn[r] = new[n];
      col_of[r] = new[p];
      for (int q = 0; q < p; q++) col_of[r][q] = new[t];
      for (int v = 0; v < n; v++) rmsg[r][v] = 0;
      for (int j = 0; j < t; j++)
        for (int x = 0; x < p; x++)
          col_of[r][row_of(r, x, j, p)][j] = j * p + x;
    end
    for (int it = 0; it < iters; it++) begin
      // variable nodes
      for (int v = 0; v < n; v++) begin
        int total;
        total = llr[v];
        for (int r = 0; r < c; r++) total += rmsg[r][v];
        dec[v] = (total < 0);
        for (int r = 0; r < c; r++) begin
          int e, m5, m3;
          e = total - rmsg[r][v];
          if (e > 31)  begin e = 31;  st.n_ext_sat++; end
          if (e < -31) begin e = -31; st.n_ext_sat++; end
          m5 = (e < 0) ? -e : e;
          m3 = (m5 * 3) / 4;
          if (m3 > 7) begin m3 = 7; st.n_scale_sat++; end
          lmag[r][v] = m3;
          lsgn[r][v] = (e < 0);
        end
      end
      // check nodes (not needed after the last variable update)
      if (it == iters - 1) break;
      for (int r = 0; r < c; r++) begin
        for (int q = 0; q < p; q++) begin
          int m1, m2, idx;
          bit s;
          m1 = 7; m2 = 7; idx = 0; s = 0;
          for (int j = 0; j < t; j++) begin
            int v, m;
            v = col_of[r][q][j];
            m = lmag[r][v];
            s ^= lsgn[r][v];
            if (m < m1) begin m2 = m1; m1 = m; idx = j; end
            else if (m < m2) m2 = m;
          end
          for (int j = 0; j < t; j++) begin
            int v, m;
            v = col_of[r][q][j];
            m = (idx == j) ? m2 : m1;
            if (idx == j) st.n_min2++;
            if ((s ^ lsgn[r][v]) && m != 0) st.n_neg_r++;
            rmsg[r][v] = (s ^ lsgn[r][v]) ? -m : m;
          end
        end
      end
      st.n_iter++;
    end
  endfunction

endpackage
