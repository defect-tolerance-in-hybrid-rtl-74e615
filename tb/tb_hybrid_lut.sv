// tb_hybrid_lut: end-to-end test of the repairable LUT tile, 2^4 x 4 with
// 100% spares, in both schemes side by side: the default (modified tagged
// repair) and plain tagged repair (SPLIT=0). Each trial places an exact
// number of stuck-at defects at random (defect rate 0..22% of the 192 nano
// cells), repairs both tiles, and then:
//  * compares repair_ok, the replacement counts and the repair time with the
//    reference model;
//  * checks repair_ok against the defect map and the tags directly;
//  * for a repaired tile, programs a random truth table through cfg_*, reads
//    every address back through lut_in/lut_out and compares; for a tile that
//    could not be repaired, checks that lut_ready stays low.
// It counts how often each mechanism occurred (column replacement, spare row
// given to the upper half, to the lower half, repair failure, LUT
// programmed and evaluated on a defective fabric) and fails if one never did.
`timescale 1ns/1ps
module tb_hybrid_lut;
  import repair_model_pkg::*;

  localparam int N = 4, CSP = 4, RSP = 16;
  localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
  localparam int AREA = ROWS * COLS - RSP * CSP;
  localparam int TRIALS = 150;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ROWS-1:0][COLS-1:0] dmask, dval;
  logic start;
  logic cfg_we;
  logic [N-1:0] cfg_addr, cfg_data, lut_in;

  logic busy[2], done[2], ok[2], ready[2];
  logic [N-1:0] lut_out[2];
  logic [ROWS-1:0] row_tag[2];
  logic [1:0][COLS-1:0] col_tag[2];
  logic [7:0] col_repl[2];
  logic [1:0][7:0] row_repl[2];
  logic cfg_we_g[2];

  // g = 1: default tile (modified scheme); g = 0: plain tagged repair.
  logic [0:0][COLS-1:0] ct0;
  logic [0:0][7:0] rr0;
  hybrid_lut u_mod (
    .clk, .rst_n, .repair_start(start), .repair_busy(busy[1]), .repair_done(done[1]),
    .repair_ok(ok[1]), .cfg_we(cfg_we_g[1]), .cfg_addr, .cfg_data, .lut_in,
    .lut_out(lut_out[1]), .lut_ready(ready[1]), .defect_mask(dmask), .defect_val(dval),
    .row_tag(row_tag[1]), .col_tag(col_tag[1]), .col_repl(col_repl[1]), .row_repl(row_repl[1]));
  hybrid_lut #(.SPLIT(1'b0)) u_pln (
    .clk, .rst_n, .repair_start(start), .repair_busy(busy[0]), .repair_done(done[0]),
    .repair_ok(ok[0]), .cfg_we(cfg_we_g[0]), .cfg_addr, .cfg_data, .lut_in,
    .lut_out(lut_out[0]), .lut_ready(ready[0]), .defect_mask(dmask), .defect_val(dval),
    .row_tag(row_tag[0]), .col_tag(ct0), .col_repl(col_repl[0]), .row_repl(rr0));
  assign col_tag[0] = {{COLS{1'b0}}, ct0[0]};
  assign row_repl[0] = {8'd0, rr0[0]};

  int checks = 0, failures = 0;
  int n_col_repl = 0, n_row_up = 0, n_row_lo = 0, n_fail = 0, n_eval_defective = 0,
      n_row_plain = 0, n_clean_no_repl = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Whether the tags of tile g pick only defect-free cells.
  function automatic bit tags_clean(int g, rowbits_t dm[]);
    int halves = g ? 2 : 1;
    int hr = (1 << N) / halves;
    int order[$];
    int nsel = 0, h;
    bit clean = 1;
    for (int k = 0; k < hr; k++) order.push_back(k);
    for (int k = 0; k < RSP; k++) order.push_back((1 << N) + k);
    for (int k = hr; k < (1 << N); k++) order.push_back(k);
    foreach (order[i]) if (row_tag[g][order[i]]) begin
      h = (halves == 2 && nsel >= hr) ? 1 : 0;
      for (int c = 0; c < COLS; c++) if ((order[i] >= (1 << N) ? (c < N) : col_tag[g][h][c]) && dm[order[i]][c]) clean = 0;
      nsel++;
    end
    return clean && nsel == (1 << N);
  endfunction

  task automatic program_and_eval(int g);
    logic [N-1:0] table_[1 << N];
    for (int a = 0; a < (1 << N); a++) begin
      table_[a] = N'($urandom);
      @(negedge clk);
      cfg_we_g[g] = 1; cfg_addr = N'(a); cfg_data = table_[a];
    end
    @(negedge clk);
    cfg_we_g[g] = 0;
    for (int a = 0; a < (1 << N); a++) begin
      lut_in = N'(a);
      #1;
      check(lut_out[g] == table_[a], $sformatf("tile %0d addr %0d out %h expected %h", g, a, lut_out[g], table_[a]));
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rowbits_t mask[], val[], dm[];
    repair_model m[2];
    int cyc[2], defects;
    bit seen[2];
    m[0] = new(N, CSP, RSP, 0);
    m[1] = new(N, CSP, RSP, 1);
    dm = new[ROWS];
    start = 0; cfg_we_g = '{0, 0}; cfg_addr = '0; cfg_data = '0; lut_in = '0;
    dmask = '0; dval = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TRIALS; t++) begin
      defects = (t == 0) ? 0 : $urandom_range(AREA * 22 / 100, 1);
      inject(N, CSP, RSP, defects, mask, val);
      for (int r = 0; r < ROWS; r++) begin
        dmask[r] = mask[r][COLS-1:0];
        dval[r] = val[r][COLS-1:0];
        dm[r] = mask[r];
      end
      m[0].run(dm);
      m[1].run(dm);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = '{1, 1};
      seen = '{0, 0};
      while (!(seen[0] && seen[1])) begin
        @(negedge clk);
        for (int g = 0; g < 2; g++) if (!seen[g]) begin cyc[g]++; seen[g] = done[g]; end
      end
      for (int g = 0; g < 2; g++) begin
        check(ok[g] == m[g].ok, $sformatf("t%0d tile %0d ok %0d model %0d", t, g, ok[g], m[g].ok));
        check(ok[g] == tags_clean(g, dm), $sformatf("t%0d tile %0d ok disagrees with defect map", t, g));
        check(ready[g] == ok[g], $sformatf("t%0d tile %0d lut_ready", t, g));
        check(col_repl[g] == 8'(m[g].col_repl), $sformatf("t%0d tile %0d col_repl", t, g));
        check(row_repl[g][0] == 8'(m[g].row_repl[0]) && row_repl[g][1] == 8'(m[g].row_repl[1]),
              $sformatf("t%0d tile %0d row_repl", t, g));
        check(cyc[g] == m[g].repair_cycles(), $sformatf("t%0d tile %0d %0d cycles, expected %0d", t, g, cyc[g], m[g].repair_cycles()));
        if (ok[g]) begin
          program_and_eval(g);
          if (defects > 0) n_eval_defective++;
        end else n_fail++;
      end
      n_col_repl += col_repl[1] + col_repl[0];
      n_row_up   += row_repl[1][0];
      n_row_lo   += row_repl[1][1];
      n_row_plain += row_repl[0][0];
      if (defects == 0 && col_repl[1] == 0 && row_repl[1] == '0) n_clean_no_repl++;
    end
    $display("mechanisms: col_repl=%0d row_repl_upper=%0d row_repl_lower=%0d row_repl_plain=%0d repair_fail=%0d eval_on_defective=%0d clean_untouched=%0d",
             n_col_repl, n_row_up, n_row_lo, n_row_plain, n_fail, n_eval_defective, n_clean_no_repl);
    check(n_col_repl > 0, "column replacement never happened");
    check(n_row_up > 0, "upper-half row replacement never happened");
    check(n_row_lo > 0, "lower-half row replacement never happened");
    check(n_row_plain > 0, "plain-scheme row replacement never happened");
    check(n_fail > 0, "repair failure never happened");
    check(n_eval_defective > 0, "no LUT evaluated on a defective fabric");
    check(n_clean_no_repl > 0, "defect-free fabric not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
