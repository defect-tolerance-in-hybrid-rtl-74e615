// tb_hybrid_lut_full: the LUT tile at its default size (2^4 x 4, 4 spare
// columns, 16 spare rows, modified tagged repair) taken through complete
// operations over a sweep of defect rates. For each rate from 0% to 20% of
// the 192 nano cells it places that many stuck-at defects at random, repairs,
// and, when the repair succeeds, programs a random truth table and reads all
// 16 entries back. Every run checks repair_ok against the reference model and
// against the defect map, the repair time, and every LUT entry. At the end it
// prints the failure rate (repairs that found no defect-free LUT) per defect
// rate and the targeted defect rate: the highest rate with no failure.
// A tile whose repair failed is programmed and read as well (the fabric stays
// writable), and the testbench reports how often the random table happened to
// read back correctly anyway because the stuck cells it met held the value
// the table wanted there; this is reported only, not checked.
`timescale 1ns/1ps
module tb_hybrid_lut_full;
  import repair_model_pkg::*;

  localparam int N = 4, CSP = 4, RSP = 16;
  localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
  localparam int AREA = ROWS * COLS - RSP * CSP;
  localparam int ITER = 200;     // repairs per defect rate
  localparam int MAXRATE = 20;   // percent

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ROWS-1:0][COLS-1:0] dmask, dval;
  logic start, busy, done, ok, ready, cfg_we;
  logic [N-1:0] cfg_addr, cfg_data, lut_in, lut_out;
  logic [ROWS-1:0] row_tag;
  logic [1:0][COLS-1:0] col_tag;
  logic [7:0] col_repl;
  logic [1:0][7:0] row_repl;

  hybrid_lut dut (
    .clk, .rst_n, .repair_start(start), .repair_busy(busy), .repair_done(done),
    .repair_ok(ok), .cfg_we, .cfg_addr, .cfg_data, .lut_in, .lut_out,
    .lut_ready(ready), .defect_mask(dmask), .defect_val(dval),
    .row_tag, .col_tag, .col_repl, .row_repl);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit tags_clean(rowbits_t dm[]);
    localparam int HR = (1 << N) / 2;
    int order[$];
    int nsel = 0, h;
    bit clean = 1;
    for (int k = 0; k < HR; k++) order.push_back(k);
    for (int k = 0; k < RSP; k++) order.push_back((1 << N) + k);
    for (int k = HR; k < (1 << N); k++) order.push_back(k);
    foreach (order[i]) if (row_tag[order[i]]) begin
      h = (nsel >= HR) ? 1 : 0;
      for (int c = 0; c < COLS; c++) if ((order[i] >= (1 << N) ? (c < N) : col_tag[h][c]) && dm[order[i]][c]) clean = 0;
      nsel++;
    end
    return clean && nsel == (1 << N);
  endfunction

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rowbits_t mask[], val[], dm[];
    repair_model m;
    logic [N-1:0] table_[1 << N];
    int cyc, defects, nfail, nlucky, target;
    m = new(N, CSP, RSP, 1);
    dm = new[ROWS];
    start = 0; cfg_we = 0; cfg_addr = '0; cfg_data = '0; lut_in = '0;
    dmask = '0; dval = '0;
    target = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rate = 0; rate <= MAXRATE; rate++) begin
      defects = (rate * AREA + 50) / 100;
      nfail = 0;
      nlucky = 0;
      for (int it = 0; it < ITER; it++) begin
        inject(N, CSP, RSP, defects, mask, val);
        for (int r = 0; r < ROWS; r++) begin
          dmask[r] = mask[r][COLS-1:0];
          dval[r] = val[r][COLS-1:0];
          dm[r] = mask[r];
        end
        m.run(dm);
        @(negedge clk);
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 1;
        do begin
          @(negedge clk);
          cyc++;
        end while (!done);
        check(ok == m.ok, $sformatf("rate %0d: ok %0d model %0d", rate, ok, m.ok));
        check(ok == tags_clean(dm), $sformatf("rate %0d: ok disagrees with defect map", rate));
        check(cyc == m.repair_cycles(), $sformatf("rate %0d: %0d cycles, expected %0d", rate, cyc, m.repair_cycles()));
        if (!ok) nfail++;
        begin
          bit works = 1;
          for (int a = 0; a < (1 << N); a++) begin
            table_[a] = N'($urandom);
            @(negedge clk);
            cfg_we = 1; cfg_addr = N'(a); cfg_data = table_[a];
          end
          @(negedge clk);
          cfg_we = 0;
          for (int a = 0; a < (1 << N); a++) begin
            lut_in = N'(a);
            #1;
            if (ok) check(lut_out == table_[a], $sformatf("rate %0d addr %0d out %h expected %h", rate, a, lut_out, table_[a]));
            else if (lut_out != table_[a]) works = 0;
          end
          if (!ok && works) nlucky++;
        end
      end
      $display("defect rate %2d%% (%0d defects): repair failed %0d/%0d, of these the random table still read back correctly %0d",
               rate, defects, nfail, ITER, nlucky);
      if (nfail == 0 && target == rate - 1) target = rate;
    end
    $display("targeted defect rate (no failure in %0d runs): %0d%%", ITER, target);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
