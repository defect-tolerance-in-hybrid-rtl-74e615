// tb_tag_bank: checks the tag bank of the modified scheme (two column-tag
// sets). After reset and after init the LUT's own rows/columns must be tagged
// 1 and the spares 0; then random row and column swaps (sometimes in the same
// cycle) are applied and the tags compared with a model after every cycle.
`timescale 1ns/1ps
module tb_tag_bank;
  localparam int N = 4, CSP = 4, RSP = 16;
  localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
  localparam int RW = $clog2(ROWS), CW = $clog2(COLS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, row_swap, col_swap, col_half;
  logic [RW-1:0] row_clr, row_set;
  logic [CW-1:0] col_clr, col_set;
  logic [ROWS-1:0] row_tag;
  logic [1:0][COLS-1:0] col_tag;
  logic [ROWS-1:0] mrow;
  logic [1:0][COLS-1:0] mcol;
  int checks = 0, failures = 0;

  tag_bank #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(1'b1)) dut (.*);

  task automatic model_init();
    for (int r = 0; r < ROWS; r++) mrow[r] = (r < (1 << N));
    for (int h = 0; h < 2; h++) for (int c = 0; c < COLS; c++) mcol[h][c] = (c < N);
  endtask

  task automatic compare(string what);
    checks++;
    if (row_tag !== mrow || col_tag !== mcol) begin
      failures++;
      $display("FAIL %s: rows %h/%h cols %h/%h", what, row_tag, mrow, col_tag, mcol);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; row_swap = 0; col_swap = 0; col_half = 0;
    row_clr = '0; row_set = '0; col_clr = '0; col_set = '0;
    model_init();
    #12 compare("reset");
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      init = ($urandom_range(49, 0) == 0);
      row_swap = $urandom_range(1, 0);
      col_swap = $urandom_range(1, 0);
      col_half = $urandom_range(1, 0);
      row_clr = RW'($urandom_range(ROWS - 1, 0));
      row_set = RW'($urandom_range(ROWS - 1, 0));
      col_clr = CW'($urandom_range(COLS - 1, 0));
      col_set = CW'($urandom_range(COLS - 1, 0));
      @(posedge clk);
      if (init) model_init();
      else begin
        if (row_swap) begin mrow[row_clr] = 1'b0; mrow[row_set] = 1'b1; end
        if (col_swap) begin mcol[col_half][col_clr] = 1'b0; mcol[col_half][col_set] = 1'b1; end
      end
      #1 compare($sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
