// smd_tb_pkg: reference model for the testbenches of the structure measure
// distance array. It computes edit distances the direct way, with absolute
// matrix values D[i][j] = min(D[i-1][j] + C, D[i][j-1] + C,
// D[i-1][j-1] + Sub[i][j]), D[i][0] = i*C, D[0][j] = j*C, so that it shares
// nothing with the incremental form used by the hardware.
package smd_tb_pkg;

  localparam int MAXN = 40;  // longest input sequence the testbenches use
  localparam int MAXM = 16;  // longest reference sequence

  typedef int mat_t [MAXN+1][MAXM+1];
  typedef int col_t [MAXN+1];

  // Full matrix of the input (n rows) against the reference rotated by r
  // places. sub[i][c] (1-based) is the cost of input node i against
  // unrotated reference node c.
  function automatic mat_t edit_matrix(mat_t sub, int n, int m, int r, int c);
    mat_t d;
    for (int i = 0; i <= n; i++) d[i][0] = i * c;
    for (int j = 0; j <= m; j++) d[0][j] = j * c;
    for (int i = 1; i <= n; i++) begin
      for (int j = 1; j <= m; j++) begin
        int best;
        best = d[i-1][j-1] + sub[i][((j - 1 + r) % m) + 1];
        if (d[i-1][j] + c < best) best = d[i-1][j] + c;
        if (d[i][j-1] + c < best) best = d[i][j-1] + c;
        d[i][j] = best;
      end
    end
    return d;
  endfunction

  // Differences down the last column: col[i] = D[i][m] - D[i-1][m]
  function automatic col_t last_col_diffs(mat_t sub, int n, int m, int r, int c);
    mat_t d;
    col_t col;
    d = edit_matrix(sub, n, m, r, c);
    col[0] = 0;
    for (int i = 1; i <= n; i++) col[i] = d[i][m] - d[i-1][m];
    return col;
  endfunction

  function automatic int distance(mat_t sub, int n, int m, int r, int c);
    mat_t d;
    d = edit_matrix(sub, n, m, r, c);
    return d[n][m];
  endfunction

  // ------------------------------------------------------------------
  // Row stream shared by the array, core and top testbenches: input
  // sequences of random length, back to back or separated by idle slots.
  // Row t of the stream is presented in clock t. For every valid row the
  // expected last-column difference of every rotation is stored, and for
  // every sequence its expected distances.
  localparam int MAXROWS = 4096;
  localparam int MAXSEQ  = 1024;

  int st_rows;                       // rows in the stream
  int st_sub   [MAXROWS][MAXM];      // unrotated Sub row, 0-based columns
  bit st_valid [MAXROWS];
  bit st_init  [MAXROWS];
  int st_exp   [MAXROWS][MAXM];      // expected ivc of rotation r
  int st_nseq;                       // sequences in the stream
  int sq_start [MAXSEQ];             // row index of a sequence's first row
  int sq_len   [MAXSEQ];
  int sq_dist  [MAXSEQ][MAXM];       // expected distance per rotation

  // m: reference length, c: indel cost, rows: stream length,
  // max_len: longest sequence, gap_pct: chance of an idle slot between
  // sequences, fixed_len: when above 0, every sequence has that length
  function automatic void gen_stream(int m, int c, int rows, int max_len,
                                     int gap_pct, int fixed_len = 0);
    mat_t sub;
    col_t col;
    int   t, n;
    t = 0;
    st_nseq = 0;
    while (1) begin
      n = (fixed_len > 0) ? fixed_len : 1 + int'($urandom_range(max_len - 1));
      if (t + n + m + 2 > rows || st_nseq == MAXSEQ) break;
      for (int i = 1; i <= n; i++)
        for (int j = 1; j <= m; j++) sub[i][j] = int'($urandom_range(7));
      sq_start[st_nseq] = t;
      sq_len[st_nseq]   = n;
      for (int r = 0; r < m; r++) begin
        col = last_col_diffs(sub, n, m, r, c);
        sq_dist[st_nseq][r] = distance(sub, n, m, r, c);
        for (int i = 1; i <= n; i++) st_exp[t + i - 1][r] = col[i];
      end
      for (int i = 1; i <= n; i++) begin
        for (int j = 0; j < m; j++) st_sub[t + i - 1][j] = sub[i][j + 1];
        st_valid[t + i - 1] = 1'b1;
        st_init[t + i - 1]  = (i == 1);
      end
      t += n;
      st_nseq++;
      if (int'($urandom_range(99)) < gap_pct) begin
        int g;
        g = 1 + int'($urandom_range(2));
        for (int k = 0; k < g && t < rows; k++) begin
          for (int j = 0; j < m; j++) st_sub[t][j] = int'($urandom_range(7));
          st_valid[t] = 1'b0;
          st_init[t]  = 1'b0;
          t++;
        end
      end
    end
    // trailing idle slots close the last sequence and flush the pipeline
    while (t < rows) begin
      for (int j = 0; j < m; j++) st_sub[t][j] = 0;
      st_valid[t] = 1'b0;
      st_init[t]  = 1'b0;
      t++;
    end
    st_rows = rows;
  endfunction

endpackage
