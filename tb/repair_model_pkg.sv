// repair_model_pkg: reference model of the tagged / modified tagged repair,
// used by the testbenches to predict the tags, the verdict and the repair
// time from a known defect map. It works on plain integer arrays and shares
// no code with the RTL.
//
// dm[r] holds the defect bits of physical row r (bit c = column c defective).
// Cells a spare row lacks (under the spare columns) are never looked at.
package repair_model_pkg;

  typedef bit [63:0] rowbits_t;

  // Places exactly m stuck-at defects on distinct existing cells of the
  // (2^n+rsp) x (n+csp) fabric (spare rows lack the spare columns' cells);
  // val gives each defect's stuck value.
  function automatic void inject(int n, int csp, int rsp, int m,
                                 ref rowbits_t mask[], ref rowbits_t val[]);
    int cells[$];
    int rows = (1 << n) + rsp, cols = n + csp;
    mask = new[rows];
    val = new[rows];
    for (int r = 0; r < rows; r++) begin
      mask[r] = '0;
      val[r] = '0;
      for (int c = 0; c < cols; c++)
        if (!(r >= (1 << n) && c >= n)) cells.push_back(r * cols + c);
    end
    cells.shuffle();
    for (int i = 0; i < m && i < cells.size(); i++) begin
      mask[cells[i] / cols][cells[i] % cols] = 1'b1;
      val[cells[i] / cols][cells[i] % cols] = 1'($urandom_range(1, 0));
    end
  endfunction

  class repair_model;
    int n, csp, rsp, halves, hr, rows, cols;
    bit rt[];           // row tags
    bit ct[2][];        // column tags per half
    bit mem[];          // half served by a spare row
    int rcnt[2][];      // row defect counts over each half's columns
    bit ok;
    int rrep_cycles;    // cycles of the row replacement phase
    int col_repl;
    int row_repl[2];

    function new(int n_, int csp_, int rsp_, bit split);
      n = n_; csp = csp_; rsp = rsp_;
      halves = split ? 2 : 1;
      rows = (1 << n) + rsp;
      cols = n + csp;
      hr = (1 << n) / halves;
      rt = new[rows];
      mem = new[rsp];
      for (int h = 0; h < 2; h++) begin
        ct[h] = new[cols];
        rcnt[h] = new[rows];
      end
    endfunction

    function int half_of(int p);
      if (halves == 1) return 0;
      if (p < hr) return 0;
      if (p < 2 * hr) return 1;
      return mem[p - 2 * hr];
    endfunction

    // Whether column c is read for row r when r serves half h: spare rows
    // are read through the own columns, own rows through their half's tags.
    function bit used(int r, int c, int h);
      if (r >= (1 << n)) return c < n;
      return ct[h][c];
    endfunction

    function void run(rowbits_t dm[]);
      int cnt[];
      int w, wc, s, sfree;
      cnt = new[cols];
      col_repl = 0; row_repl[0] = 0; row_repl[1] = 0;
      for (int r = 0; r < rows; r++) rt[r] = (r < (1 << n));
      for (int h = 0; h < 2; h++) for (int c = 0; c < cols; c++) ct[h][c] = (c < n);
      for (int i = 0; i < rsp; i++) mem[i] = 0;
      // column stage per half
      for (int h = 0; h < halves; h++) begin
        for (int c = 0; c < cols; c++) begin
          cnt[c] = 0;
          for (int r = h * hr; r < (h + 1) * hr; r++) cnt[c] += dm[r][c];
        end
        for (int sc = 0; sc < csp; sc++) begin
          w = 0; wc = 0;
          for (int c = 0; c < cols; c++) if (ct[h][c] && cnt[c] > wc) begin w = c; wc = cnt[c]; end
          if (cnt[n + sc] < wc) begin ct[h][w] = 0; ct[h][n + sc] = 1; col_repl++; end
        end
      end
      // row counts
      for (int h = 0; h < halves; h++)
        for (int r = 0; r < rows; r++) begin
          rcnt[h][r] = 0;
          for (int c = 0; c < cols; c++) rcnt[h][r] += (dm[r][c] && used(r, c, h));
        end
      // row stage: spares handed out upper half first
      rrep_cycles = 0;
      sfree = 0;
      for (int h = 0; h < halves; h++) begin
        s = (h == 0) ? 0 : sfree;
        forever begin
          rrep_cycles++;
          w = 0; wc = 0;
          for (int p = 0; p < rows; p++)
            if (rt[p] && half_of(p) == h && rcnt[h][p] > wc) begin w = p; wc = rcnt[h][p]; end
          if (s >= rsp || wc == 0) break;
          if (rcnt[h][(1 << n) + s] < wc) begin
            rt[w] = 0; rt[(1 << n) + s] = 1; mem[s] = h[0]; sfree = s + 1; row_repl[h]++;
          end
          s++;
        end
      end
      ok = 1;
      for (int p = 0; p < rows; p++) if (rt[p] && rcnt[half_of(p)][p] != 0) ok = 0;
    endfunction

    // Whether tags rt/ct pick only defect-free cells of dm, with the rows
    // taken in the order [upper own rows][spare rows][lower own rows] and
    // the first 2^(n-1) selected rows using the upper half's column tags.
    function bit tags_clean(bit trt[], bit tct[2][], rowbits_t dm[]);
      int order[$];
      int nsel = 0, h, nc;
      bit clean = 1;
      for (int k = 0; k < hr; k++) order.push_back(k);
      for (int k = 0; k < rsp; k++) order.push_back((1 << n) + k);
      for (int k = hr; k < (1 << n); k++) order.push_back(k);
      foreach (order[i]) if (trt[order[i]]) begin
        h = (halves == 2 && nsel >= hr) ? 1 : 0;
        for (int c = 0; c < cols; c++)
          if ((order[i] >= (1 << n) ? (c < n) : tct[h][c]) && dm[order[i]][c]) clean = 0;
        nsel++;
      end
      for (int hh = 0; hh < halves; hh++) begin
        nc = 0;
        for (int c = 0; c < cols; c++) nc += tct[hh][c];
        if (nc != n) clean = 0;
      end
      return clean && nsel == (1 << n);
    endfunction

    // Cycles from the clock edge that accepts start to the edge that sets done.
    function int repair_cycles();
      return 2 + halves * (4 * hr + csp) + 4 * rows + rrep_cycles + 1;
    endfunction
  endclass

endpackage
