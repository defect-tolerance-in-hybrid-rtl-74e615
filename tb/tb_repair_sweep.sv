// tb_repair_sweep: failure rate against defect rate for the LUT sizes and
// spare budgets of the evaluation: 2^3 x 3, 2^4 x 4 and 2^6 x 6 LUTs with 25%,
// 50% and 100% spare rows and columns (spare counts rounded to the nearest
// whole number) and a 2^5 x 5 LUT with 100% spares, each with plain tagged
// repair and modified tagged repair. All 20 tiles run side by side. For every defect rate from 0% to MAXRATE, ITER
// random defect maps with exactly round(rate * cells) stuck-at defects are
// repaired. Each repair's verdict is checked against the reference model and
// against the defect map. The testbench prints each configuration's failure
// counts and targeted defect rate (the highest rate up to which no repair
// failed); those statistics are reported, not checked.
`timescale 1ns/1ps
module tb_repair_sweep;
  import repair_model_pkg::*;

  localparam int ITER = 100;
  localparam int MAXRATE = 22;
  localparam int NCFG = 10;
  // {N, CSP, RSP, spare percentage}, entry 0 in the low bytes
  localparam logic [NCFG-1:0][3:0][7:0] CFG = {
    {8'd5, 8'd5, 8'd32, 8'd100},
    {8'd6, 8'd6, 8'd64, 8'd100}, {8'd6, 8'd3, 8'd32, 8'd50}, {8'd6, 8'd2, 8'd16, 8'd25},
    {8'd4, 8'd4, 8'd16, 8'd100}, {8'd4, 8'd2, 8'd8, 8'd50},  {8'd4, 8'd1, 8'd4, 8'd25},
    {8'd3, 8'd3, 8'd8, 8'd100},  {8'd3, 8'd2, 8'd4, 8'd50},  {8'd3, 8'd1, 8'd2, 8'd25}};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;
  int target[NCFG][2];

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar ci = 0; ci < NCFG; ci++) begin : g_cfg
    for (genvar sp = 0; sp < 2; sp++) begin : g_split
        localparam int N = int'(CFG[ci][3]), CSP = int'(CFG[ci][2]), RSP = int'(CFG[ci][1]);
        localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
        localparam int H = sp ? 2 : 1;
        localparam int AREA = ROWS * COLS - RSP * CSP;
        logic [ROWS-1:0][COLS-1:0] dmask, dval;
        logic start, busy, done, ok, ready;
        logic [N-1:0] lut_out;
        logic [ROWS-1:0] row_tag;
        logic [H-1:0][COLS-1:0] col_tag;
        logic [7:0] col_repl;
        logic [H-1:0][7:0] row_repl;

        hybrid_lut #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(sp == 1)) u_tile (
          .clk, .rst_n, .repair_start(start), .repair_busy(busy), .repair_done(done),
          .repair_ok(ok), .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0), .lut_in('0),
          .lut_out, .lut_ready(ready), .defect_mask(dmask), .defect_val(dval),
          .row_tag, .col_tag, .col_repl, .row_repl);

        initial begin
          rowbits_t mask[], val[], dm[];
          repair_model m;
          bit trt[];
          bit tct[2][];
          int nfail[MAXRATE + 1];
          int defects, tgt;
          string line;
          m = new(N, CSP, RSP, sp == 1);
          dm = new[ROWS];
          trt = new[ROWS];
          tct[0] = new[COLS];
          tct[1] = new[COLS];
          start = 0; dmask = '0; dval = '0;
          wait (rst_n);
          tgt = -1;
          for (int rate = 0; rate <= MAXRATE; rate++) begin
            defects = (rate * AREA + 50) / 100;
            nfail[rate] = 0;
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
                for (int c = 0; c < COLS; c++) tct[h][c] = (h < H) ? col_tag[h % H][c] : 1'b0;
              checks++;
              if (ok != m.ok || ok != m.tags_clean(trt, tct, dm)) begin
                failures++;
                $display("FAIL: 2^%0dx%0d csp=%0d rsp=%0d split=%0d: ok=%0d model=%0d",
                         N, N, CSP, RSP, sp, ok, m.ok);
              end
              if (!ok) nfail[rate]++;
            end
            if (nfail[rate] == 0 && tgt == rate - 1) tgt = rate;
          end
          line = "";
          for (int rate = 0; rate <= MAXRATE; rate++) line = {line, $sformatf(" %0d", nfail[rate])};
          $display("2^%0dx%0d spares %3d%% (csp=%0d rsp=%0d) %s: targeted %0d%%, failures per rate 0..%0d%%:%s",
                   N, N, CFG[ci][0], CSP, RSP, sp ? "modified" : "tagged  ", tgt, MAXRATE, line);
          target[ci][sp] = tgt;
          finished++;
        end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == NCFG * 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
