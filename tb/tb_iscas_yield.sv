// tb_iscas_yield: circuit-level failure probability for the ISCAS'85
// benchmark circuits mapped onto LUTs of sizes 2^2 x 2 to 2^6 x 6, using the
// LUT counts per circuit and size from the evaluation. The LUT contents and
// wiring of those circuits are not available, so the circuits are not built;
// a circuit is taken to work when every one of its LUTs is repaired.
//
// One modified-tagged-repair tile per LUT size (100% spare rows and columns)
// repairs ITER random defect maps at each defect rate from 0% to MAXRATE.
// Every repair's verdict is checked against the reference model and the
// defect map. From the measured per-size failure rates p_N the testbench
// prints, per circuit, the failure probability 1 - prod_N (1 - p_N)^count_N
// and the targeted defect rate (the highest rate up to which no LUT size the
// circuit uses ever failed). Those statistics are reported, not checked.
`timescale 1ns/1ps
module tb_iscas_yield;
  import repair_model_pkg::*;

  localparam int ITER = 200;
  localparam int MAXRATE = 20;
  localparam int NCIRC = 10;

  // LUT counts of sizes 2^2x2, 2^3x3, 2^4x4, 2^5x5, 2^6x6 per circuit.
  localparam logic [NCIRC-1:0][4:0][7:0] COUNTS = {
    {8'd6,  8'd18, 8'd16, 8'd20, 8'd30},   // C7552
    {8'd20, 8'd4,  8'd14, 8'd9,  8'd48},   // C6288
    {8'd8,  8'd8,  8'd12, 8'd8,  8'd25},   // C5315
    {8'd6,  8'd2,  8'd10, 8'd13, 8'd22},   // C3540
    {8'd2,  8'd4,  8'd5,  8'd3,  8'd9},    // C2670
    {8'd2,  8'd2,  8'd2,  8'd4,  8'd10},   // C1908
    {8'd5,  8'd0,  8'd4,  8'd5,  8'd5},    // C1335
    {8'd1,  8'd4,  8'd2,  8'd4,  8'd5},    // C880
    {8'd3,  8'd1,  8'd2,  8'd1,  8'd5},    // C432
    {8'd0,  8'd0,  8'd2,  8'd2,  8'd8}};   // C499
  string names[NCIRC] = '{"C499", "C432", "C880", "C1335", "C1908",
                          "C2670", "C3540", "C5315", "C6288", "C7552"};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;
  int nfail[5][MAXRATE + 1];

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar si = 0; si < 5; si++) begin : g_size
    localparam int N = si + 2, CSP = N, RSP = 1 << N;
    localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
    localparam int AREA = ROWS * COLS - RSP * CSP;
    logic [ROWS-1:0][COLS-1:0] dmask, dval;
    logic start, busy, done, ok, ready;
    logic [N-1:0] lut_out;
    logic [ROWS-1:0] row_tag;
    logic [1:0][COLS-1:0] col_tag;
    logic [7:0] col_repl;
    logic [1:0][7:0] row_repl;

    hybrid_lut #(.N(N), .CSP(CSP), .RSP(RSP)) u_tile (
      .clk, .rst_n, .repair_start(start), .repair_busy(busy), .repair_done(done),
      .repair_ok(ok), .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0), .lut_in('0),
      .lut_out, .lut_ready(ready), .defect_mask(dmask), .defect_val(dval),
      .row_tag, .col_tag, .col_repl, .row_repl);

    initial begin
      rowbits_t mask[], val[], dm[];
      repair_model m;
      bit trt[];
      bit tct[2][];
      int defects;
      m = new(N, CSP, RSP, 1);
      dm = new[ROWS];
      trt = new[ROWS];
      tct[0] = new[COLS];
      tct[1] = new[COLS];
      start = 0; dmask = '0; dval = '0;
      wait (rst_n);
      for (int rate = 0; rate <= MAXRATE; rate++) begin
        defects = (rate * AREA + 50) / 100;
        nfail[si][rate] = 0;
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
          do @(negedge clk); while (!done);
          for (int r = 0; r < ROWS; r++) trt[r] = row_tag[r];
          for (int h = 0; h < 2; h++)
            for (int c = 0; c < COLS; c++) tct[h][c] = col_tag[h][c];
          checks++;
          if (ok != m.ok || ok != m.tags_clean(trt, tct, dm)) begin
            failures++;
            $display("FAIL: 2^%0dx%0d rate %0d: ok=%0d model=%0d", N, N, rate, ok, m.ok);
          end
          if (!ok) nfail[si][rate]++;
        end
      end
      finished++;
    end
  end

  initial begin
    string line;
    real ps;
    int tgt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == 5);
    for (int si = 0; si < 5; si++) begin
      line = "";
      for (int rate = 0; rate <= MAXRATE; rate++) line = {line, $sformatf(" %0d", nfail[si][rate])};
      $display("2^%0dx%0d LUT, 100%% spares: failures in %0d repairs per rate 0..%0d%%:%s", si + 2, si + 2, ITER, MAXRATE, line);
    end
    for (int ci = 0; ci < NCIRC; ci++) begin
      line = "";
      tgt = -1;
      for (int rate = 0; rate <= MAXRATE; rate++) begin
        bit any;
        any = 0;
        ps = 1.0;
        for (int si = 0; si < 5; si++) begin
          int cnt;
          cnt = int'(COUNTS[ci][4 - si]);
          if (cnt > 0 && nfail[si][rate] > 0) any = 1;
          ps = ps * ((1.0 - real'(nfail[si][rate]) / ITER) ** cnt);
        end
        if (!any && tgt == rate - 1) tgt = rate;
        line = {line, $sformatf(" %.2f", 1.0 - ps)};
      end
      $display("%-6s targeted %0d%%, failure probability per rate 0..%0d%%:%s", names[ci], tgt, MAXRATE, line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
