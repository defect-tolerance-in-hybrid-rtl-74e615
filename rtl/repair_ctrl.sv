// repair_ctrl: the repair engine of one hybrid nano/CMOS LUT. After `start`
// it tests the nano fabric, then rewrites the row and column tags so that the
// least defective rows and columns form the LUT, and finally reports whether
// the chosen rows and columns are free of defects (ok).
//
// Procedure (the order follows the document, the details are this design's):
//  1. Tags are initialised: own rows/columns 1, spares 0.
//  2. Column scan, once per half (twice for the modified scheme, SPLIT=1,
//     once for SPLIT=0). Every own row of the half is tested; each column
//     gets a defect count over those rows. Then each spare column in turn is
//     compared with the most defective selected column of that half and
//     replaces it if it has strictly fewer defects.
//  3. Row scan, a single stage. Every row is tested again and its defects
//     are counted over the columns selected for each half (for a spare row,
//     which only spans the own columns, over those N columns). Spare rows are
//     then handed out in order: first to the upper half, each spare replacing
//     the most defective selected upper-half row if it has strictly fewer
//     defects, until that half is clean or the spares run out; then the
//     spares after the last one the upper half took go to the lower half the
//     same way. So i spares serve the upper half and the rest the lower half.
//  4. ok = every selected row is clean over the columns it is read through.
// Testing a row takes four cycles: write all 0, read, write all 1, read; a
// cell that does not read back both values is defective. The missing cells
// of a spare row under the spare columns are never counted.
//
// Timing: with HR = 2^N/HALVES own rows per half, a repair takes
// 2 + HALVES*(4*HR + CSP) + 4*ROWS + R + 1 clock edges from the edge that
// accepts start to the edge that sets done, where R is the number of
// row-stage steps (one per spare row considered plus one per half; the lower
// half may reconsider spares the upper half skipped, so R <= 2*RSP + HALVES).
// `busy` is high throughout and `done` stays high from the end until the next
// start. The counters col_repl/row_repl count the replacements performed.
module repair_ctrl #(
  parameter int unsigned N     = 4,
  parameter int unsigned CSP   = 4,
  parameter int unsigned RSP   = 16,
  parameter bit          SPLIT = 1'b1,
  localparam int unsigned ROWS   = (1 << N) + RSP,
  localparam int unsigned COLS   = N + CSP,
  localparam int unsigned HALVES = SPLIT ? 2 : 1,
  localparam int unsigned RW     = $clog2(ROWS),
  localparam int unsigned CW     = $clog2(COLS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  output logic                           ok,
  // fabric port
  output logic                           fab_we,
  output logic [RW-1:0]                  fab_row,
  output logic [COLS-1:0]                fab_wdata,
  input  logic [COLS-1:0]                fab_rdata,
  // tag bank port
  output logic                           tag_init,
  output logic                           row_swap,
  output logic [RW-1:0]                  row_clr,
  output logic [RW-1:0]                  row_set,
  output logic                           col_swap,
  output logic                           col_half,
  output logic [CW-1:0]                  col_clr,
  output logic [CW-1:0]                  col_set,
  input  logic [ROWS-1:0]                row_tag,
  input  logic [HALVES-1:0][COLS-1:0]    col_tag,
  // statistics
  output logic [7:0]                     col_repl,
  output logic [HALVES-1:0][7:0]         row_repl
);

  localparam int unsigned HR   = (1 << N) / HALVES;
  localparam int unsigned CCW  = $clog2(HR + 1);    // column count width
  localparam int unsigned RCW  = $clog2(COLS + 1);  // row count width
  localparam int unsigned SW   = $clog2(RSP + 1);
  localparam int unsigned CSW  = $clog2(CSP + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_CTEST, S_CREP, S_RTEST, S_RREP, S_CHECK
  } state_t;

  state_t                       state;
  logic [1:0]                   step;
  logic [RW-1:0]                prow;
  logic                         h;
  logic [CSW-1:0]               cidx;     // spare column being considered
  logic [SW-1:0]                sidx;     // spare row being considered
  logic [SW-1:0]                sfree;    // first spare row the lower half may use
  logic [COLS-1:0]              d0;       // cells that failed the write-0 test
  logic [COLS-1:0][CCW-1:0]     col_cnt;
  logic [HALVES-1:0][ROWS-1:0][RCW-1:0] row_cnt;
  logic [RSP-1:0]               member;   // half a selected spare row serves

  logic [COLS-1:0]              dvec;     // defects of the row under test

  // Columns a row is read through: its half's tagged columns for an own
  // row, the N own columns for a spare row (it has no other cells).
  function automatic logic [COLS-1:0] rmask(logic [RW-1:0] p, logic [COLS-1:0] ct);
    logic [COLS-1:0] own;
    for (int unsigned c = 0; c < COLS; c++) own[c] = (c < N);
    return (int'(p) >= (1 << N)) ? own : ct;
  endfunction
  assign dvec = d0 | ~fab_rdata;

  // ---------------------------------------------------------------------
  // Most defective selected column of half h.
  logic [CW-1:0]  wcol;
  logic [CCW-1:0] wcol_cnt;
  always_comb begin
    wcol     = '0;
    wcol_cnt = '0;
    for (int unsigned c = 0; c < COLS; c++) begin
      if (col_tag[SPLIT ? h : 1'b0][c] && col_cnt[c] > wcol_cnt) begin
        wcol     = CW'(c);
        wcol_cnt = col_cnt[c];
      end
    end
  end

  logic [CW-1:0] scol;
  assign scol = CW'(N + int'(cidx));

  // ---------------------------------------------------------------------
  // Half a physical row belongs to while selected.
  function automatic logic row_half(int unsigned p, logic [RSP-1:0] mem);
    if (!SPLIT)          return 1'b0;
    else if (p < HR)     return 1'b0;
    else if (p < 2 * HR) return 1'b1;
    else                 return mem[p - 2 * HR];
  endfunction

  // Most defective selected row of half h.
  logic [RW-1:0]  wrow;
  logic [RCW-1:0] wrow_cnt;
  always_comb begin
    wrow     = '0;
    wrow_cnt = '0;
    for (int unsigned p = 0; p < ROWS; p++) begin
      if (row_tag[p] && row_half(p, member) == h &&
          row_cnt[SPLIT ? h : 1'b0][p] > wrow_cnt) begin
        wrow     = RW'(p);
        wrow_cnt = row_cnt[SPLIT ? h : 1'b0][p];
      end
    end
  end

  logic [RW-1:0] srow;
  assign srow = RW'((1 << N) + int'(sidx));

  // Final verdict: every selected row clean in its half.
  logic all_clean;
  always_comb begin
    all_clean = 1'b1;
    for (int unsigned p = 0; p < ROWS; p++) begin
      if (row_tag[p] && row_cnt[row_half(p, member)][p] != '0) all_clean = 1'b0;
    end
  end

  // ---------------------------------------------------------------------
  // Outputs to the fabric and tags.
  always_comb begin
    fab_we    = 1'b0;
    fab_wdata = '0;
    if (state == S_CTEST || state == S_RTEST) begin
      fab_we    = (step == 2'd0) || (step == 2'd2);
      fab_wdata = (step == 2'd2) ? '1 : '0;
    end
  end
  assign fab_row  = prow;
  assign tag_init = (state == S_INIT);
  assign busy     = (state != S_IDLE);

  always_comb begin
    col_swap = 1'b0;
    col_half = h;
    col_clr  = wcol;
    col_set  = scol;
    if (state == S_CREP && col_cnt[scol] < wcol_cnt) col_swap = 1'b1;
  end

  logic row_half_done;
  assign row_half_done = (int'(sidx) >= RSP) || (wrow_cnt == '0);

  always_comb begin
    row_swap = 1'b0;
    row_clr  = wrow;
    row_set  = srow;
    if (state == S_RREP && !row_half_done &&
        row_cnt[SPLIT ? h : 1'b0][srow] < wrow_cnt) row_swap = 1'b1;
  end

  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      prow     <= '0;
      h        <= 1'b0;
      cidx     <= '0;
      sidx     <= '0;
      sfree    <= '0;
      d0       <= '0;
      col_cnt  <= '0;
      row_cnt  <= '0;
      member   <= '0;
      done     <= 1'b0;
      ok       <= 1'b0;
      col_repl <= '0;
      row_repl <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_INIT;
            done     <= 1'b0;
            ok       <= 1'b0;
            col_repl <= '0;
            row_repl <= '0;
          end
        end

        S_INIT: begin
          state   <= S_CTEST;
          h       <= 1'b0;
          prow    <= '0;
          step    <= '0;
          col_cnt <= '0;
          member  <= '0;
          row_cnt <= '0;
        end

        S_CTEST: begin
          step <= step + 2'd1;
          if (step == 2'd1) d0 <= fab_rdata;
          if (step == 2'd3) begin
            for (int unsigned c = 0; c < COLS; c++)
              col_cnt[c] <= col_cnt[c] + CCW'(dvec[c]);
            if (int'(prow) == (int'(h) + 1) * HR - 1) begin
              state <= S_CREP;
              cidx  <= '0;
            end else begin
              prow <= prow + RW'(1);
            end
          end
        end

        S_CREP: begin
          if (col_swap) col_repl <= col_repl + 8'd1;
          if (int'(cidx) == CSP - 1) begin
            col_cnt <= '0;
            if (int'(h) == HALVES - 1) begin
              state <= S_RTEST;
              prow  <= '0;
              step  <= '0;
            end else begin
              h     <= 1'b1;
              state <= S_CTEST;
              prow  <= RW'(HR);
              step  <= '0;
            end
          end else begin
            cidx <= cidx + CSW'(1);
          end
        end

        S_RTEST: begin
          step <= step + 2'd1;
          if (step == 2'd1) d0 <= fab_rdata;
          if (step == 2'd3) begin
            for (int unsigned hh = 0; hh < HALVES; hh++)
              row_cnt[hh][prow] <= RCW'($countones(dvec & rmask(prow, col_tag[hh])));
            if (int'(prow) == ROWS - 1) begin
              state <= S_RREP;
              h     <= 1'b0;
              sidx  <= '0;
              sfree <= '0;
            end else begin
              prow <= prow + RW'(1);
            end
          end
        end

        S_RREP: begin
          if (row_half_done) begin
            if (int'(h) == HALVES - 1) begin
              state <= S_CHECK;
            end else begin
              h    <= 1'b1;
              sidx <= sfree;
            end
          end else begin
            if (row_swap) begin
              for (int unsigned s = 0; s < RSP; s++)
                if (s == int'(sidx)) member[s] <= h;
              sfree                 <= sidx + SW'(1);
              row_repl[SPLIT ? h : 1'b0] <= row_repl[SPLIT ? h : 1'b0] + 8'd1;
            end
            sidx <= sidx + SW'(1);
          end
        end

        S_CHECK: begin
          ok    <= all_clean;
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A new repair must not be requested while one is running.
  a_no_restart: assert property (@(posedge clk)
    busy |-> !start);

endmodule
