// tb_lut_access: checks the tag-to-address mapping of the modified scheme.
// For random legal tag sets (2^N selected rows, with the upper half's rows
// and the spares it uses ahead of the lower half's, and N selected columns in
// each half) it checks, for every LUT address, the physical row chosen, the
// bits gathered from a random fabric row and the row image scattered for a
// write (own rows through their half's tagged columns, spare rows through
// the N own columns), against lists built from the tags in the testbench.
`timescale 1ns/1ps
module tb_lut_access;
  localparam int N = 4, CSP = 4, RSP = 16;
  localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
  localparam int RW = $clog2(ROWS);
  localparam int HR = (1 << N) / 2;

  logic [ROWS-1:0] row_tag;
  logic [1:0][COLS-1:0] col_tag;
  logic [N-1:0] addr, wdata, dout;
  logic [COLS-1:0] fab_rdata, wrow;
  logic [RW-1:0] prow;
  logic prow_valid;
  int checks = 0, failures = 0;

  lut_access #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(1'b1)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pick k distinct random members of list.
  function automatic void pick(ref int list[$], input int k);
    list.shuffle();
    while (list.size() > k) void'(list.pop_back());
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_trial();
    begin
      int d0, d1;
      int up[$], lo[$], sp[$], sel[$], cols[2][$], tmp[$];
      logic [COLS-1:0] exp_w;
      logic [N-1:0] exp_d;
      // rows: drop d0 upper and d1 lower own rows, use d0+d1 spares in order
      d0 = $urandom_range(HR, 0);
      d1 = $urandom_range(HR, 0);
      if (d0 + d1 > RSP) d1 = RSP - d0;
      for (int r = 0; r < HR; r++) up.push_back(r);
      for (int r = HR; r < 2 * HR; r++) lo.push_back(r);
      pick(up, HR - d0); up.sort();
      pick(lo, HR - d1); lo.sort();
      for (int s = 0; s < RSP; s++) tmp.push_back(s);
      pick(tmp, d0 + d1); tmp.sort();
      foreach (tmp[i]) sp.push_back((1 << N) + tmp[i]);
      row_tag = '0;
      foreach (up[i]) row_tag[up[i]] = 1'b1;
      foreach (lo[i]) row_tag[lo[i]] = 1'b1;
      foreach (sp[i]) row_tag[sp[i]] = 1'b1;
      // expected order: upper own, spares, lower own
      sel = {up, sp, lo};
      col_tag = '0;
      for (int h = 0; h < 2; h++) begin
        tmp.delete();
        for (int c = 0; c < COLS; c++) tmp.push_back(c);
        pick(tmp, N); tmp.sort();
        cols[h] = tmp;
        foreach (tmp[i]) col_tag[h][tmp[i]] = 1'b1;
      end
      for (int a = 0; a < (1 << N); a++) begin
        int h;
        h = a / HR;
        addr = N'(a);
        wdata = N'($urandom);
        fab_rdata = COLS'($urandom);
        #1;
        check(prow_valid && int'(prow) == sel[a], $sformatf("addr %0d -> row %0d expected %0d", a, prow, sel[a]));
        exp_w = '0;
        for (int j = 0; j < N; j++) begin
          int c;
          c = (sel[a] >= (1 << N)) ? j : cols[h][j];  // spare rows: own columns
          exp_d[j] = fab_rdata[c];
          exp_w[c] = wdata[j];
        end
        check(dout == exp_d, $sformatf("addr %0d dout %b expected %b", a, dout, exp_d));
        check(wrow == exp_w, $sformatf("addr %0d wrow %b expected %b", a, wrow, exp_w));
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) one_trial();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
