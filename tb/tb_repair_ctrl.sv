// tb_repair_ctrl: checks the repair engine of both schemes (modified, SPLIT=1,
// and plain, SPLIT=0) on a 2^4 x 4 LUT with 100% spares. Each trial injects
// random stuck-at defects at a random rate (0..25%), runs a repair and
// compares the resulting row/column tags, the ok verdict, the replacement
// counts and the repair time in cycles with the reference model. It also
// checks the verdict against the defect map directly: ok must be 1 exactly
// when every selected cell of the chosen rows and columns is defect-free, and
// exactly 2^N rows and N columns per half must be selected.
`timescale 1ns/1ps
module tb_repair_ctrl;
  import repair_model_pkg::*;

  localparam int N = 4, CSP = 4, RSP = 16;
  localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
  localparam int RW = $clog2(ROWS), CW = $clog2(COLS);
  localparam int TRIALS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ROWS-1:0][COLS-1:0] dmask, dval;
  int checks = 0, failures = 0;

  // Two complete engines: g=1 modified, g=0 plain.
  logic start[2], busy[2], done[2], ok[2];
  logic [ROWS-1:0] row_tag[2];
  logic [1:0][COLS-1:0] col_tag[2];
  logic [7:0] col_repl[2];
  logic [1:0][7:0] row_repl[2];

  for (genvar g = 0; g < 2; g++) begin : g_eng
    localparam bit SP = (g == 1);
    localparam int H = SP ? 2 : 1;
    logic fwe; logic [RW-1:0] frow; logic [COLS-1:0] fwd, frd;
    logic tinit, rsw, csw, chalf; logic [RW-1:0] rclr, rset; logic [CW-1:0] cclr, cset;
    logic [ROWS-1:0] rt; logic [H-1:0][COLS-1:0] ct;
    logic [H-1:0][7:0] rr;
    nano_fabric #(.N(N), .CSP(CSP), .RSP(RSP)) u_fab (
      .clk, .we(fwe), .row(frow), .wdata(fwd), .rdata(frd),
      .defect_mask(dmask), .defect_val(dval));
    tag_bank #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(SP)) u_tags (
      .clk, .rst_n, .init(tinit), .row_swap(rsw), .row_clr(rclr), .row_set(rset),
      .col_swap(csw), .col_half(chalf), .col_clr(cclr), .col_set(cset),
      .row_tag(rt), .col_tag(ct));
    repair_ctrl #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(SP)) u_dut (
      .clk, .rst_n, .start(start[g]), .busy(busy[g]), .done(done[g]), .ok(ok[g]),
      .fab_we(fwe), .fab_row(frow), .fab_wdata(fwd), .fab_rdata(frd),
      .tag_init(tinit), .row_swap(rsw), .row_clr(rclr), .row_set(rset),
      .col_swap(csw), .col_half(chalf), .col_clr(cclr), .col_set(cset),
      .row_tag(rt), .col_tag(ct), .col_repl(col_repl[g]), .row_repl(rr));
    assign row_tag[g] = rt;
    always_comb begin
      col_tag[g] = '0;
      row_repl[g] = '0;
      for (int h = 0; h < H; h++) begin
        col_tag[g][h] = ct[h];
        row_repl[g][h] = rr[h];
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Rank-order half of each selected row, computed from the tags alone.
  task automatic verify(int g, rowbits_t dm[], repair_model m);
    int halves = (g == 1) ? 2 : 1;
    int hr = (1 << N) / halves;
    int order[$];
    int rank, nsel, ncol;
    bit clean;
    // tags equal model
    for (int r = 0; r < ROWS; r++) check(row_tag[g][r] == m.rt[r], $sformatf("g%0d row tag %0d", g, r));
    for (int h = 0; h < halves; h++)
      for (int c = 0; c < COLS; c++) check(col_tag[g][h][c] == m.ct[h][c], $sformatf("g%0d col tag h%0d c%0d", g, h, c));
    check(ok[g] == m.ok, $sformatf("g%0d ok %0d vs model %0d", g, ok[g], m.ok));
    check(col_repl[g] == 8'(m.col_repl), $sformatf("g%0d col_repl", g));
    for (int h = 0; h < halves; h++) check(row_repl[g][h] == 8'(m.row_repl[h]), $sformatf("g%0d row_repl h%0d", g, h));
    // structural truth from the defect map
    for (int k = 0; k < hr; k++) order.push_back(k);
    for (int k = 0; k < RSP; k++) order.push_back((1 << N) + k);
    for (int k = hr; k < (1 << N); k++) order.push_back(k);
    nsel = 0; clean = 1;
    foreach (order[i]) if (row_tag[g][order[i]]) begin
      int h;
      h = (halves == 2 && nsel >= hr) ? 1 : 0;
      for (int c = 0; c < COLS; c++) if ((order[i] >= (1 << N) ? (c < N) : col_tag[g][h][c]) && dm[order[i]][c]) clean = 0;
      nsel++;
    end
    check(nsel == (1 << N), $sformatf("g%0d selected rows %0d", g, nsel));
    for (int h = 0; h < halves; h++) begin
      ncol = $countones(col_tag[g][h]);
      check(ncol == N, $sformatf("g%0d selected cols h%0d = %0d", g, h, ncol));
    end
    check(ok[g] == clean, $sformatf("g%0d ok=%0d but LUT clean=%0d", g, ok[g], clean));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rowbits_t dm[];
    repair_model m[2];
    int cyc[2], rate;
    int nok[2], nswap;
    bit seen[2];
    dm = new[ROWS];
    m[0] = new(N, CSP, RSP, 0);
    m[1] = new(N, CSP, RSP, 1);
    nok = '{0, 0}; nswap = 0;
    start = '{0, 0};
    dmask = '0; dval = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < TRIALS; t++) begin
      rate = (t == 0) ? 0 : $urandom_range(25, 1);
      for (int r = 0; r < ROWS; r++) begin
        dm[r] = '0;
        for (int c = 0; c < COLS; c++) begin
          dmask[r][c] = ($urandom_range(99, 0) < rate);
          dval[r][c]  = $urandom_range(1, 0);
          dm[r][c] = dmask[r][c];
        end
      end
      m[0].run(dm);
      m[1].run(dm);
      @(negedge clk);
      start = '{1, 1};
      @(negedge clk);
      start = '{0, 0};
      cyc = '{1, 1};
      seen = '{0, 0};
      while (!(seen[0] && seen[1])) begin
        @(negedge clk);
        for (int g = 0; g < 2; g++) if (!seen[g]) begin
          cyc[g]++;
          seen[g] = done[g];
        end
      end
      for (int g = 0; g < 2; g++) begin
        verify(g, dm, m[g]);
        check(cyc[g] == m[g].repair_cycles(),
              $sformatf("g%0d repair took %0d cycles, expected %0d", g, cyc[g], m[g].repair_cycles()));
        nok[g] += ok[g];
      end
      nswap += col_repl[1] + row_repl[1][0] + row_repl[1][1];
    end
    check(nswap > 0, "no replacement ever happened");
    $display("repaired: modified %0d/%0d, plain %0d/%0d", nok[1], TRIALS, nok[0], TRIALS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
