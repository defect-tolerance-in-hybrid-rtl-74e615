// tag_bank: the CMOS tags of one repairable LUT. Every nano row and every nano
// column has a one-bit tag; a 1 means the row/column is part of the final LUT,
// a 0 means it is excluded. There are ROWS = 2^N + RSP row tags. The plain
// tagged scheme (SPLIT=0) has one set of COLS = N + CSP column tags; the
// modified scheme (SPLIT=1) splits every column into an upper and a lower
// half and gives each half its own column tags, 2*COLS in all, while the row
// tags stay shared.
//
// On reset and on `init` the tags of the LUT's own rows and columns are set to
// 1 and those of the spares to 0, as the repair procedure requires. A repair
// step is a swap: row_swap clears the tag of row_clr and sets that of row_set
// in the same clock edge; col_swap does the same for the columns of half
// col_half. Both swaps may happen in the same cycle. Keeping the tags in
// flip-flops (standing for 6T SRAM bits) and the swap interface are this
// design's choices.
module tag_bank #(
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
  input  logic                           init,
  input  logic                           row_swap,
  input  logic [RW-1:0]                  row_clr,
  input  logic [RW-1:0]                  row_set,
  input  logic                           col_swap,
  input  logic                           col_half,
  input  logic [CW-1:0]                  col_clr,
  input  logic [CW-1:0]                  col_set,
  output logic [ROWS-1:0]                row_tag,
  output logic [HALVES-1:0][COLS-1:0]    col_tag
);

  // Own rows/columns tagged 1, spares 0.
  function automatic logic [ROWS-1:0] row_init();
    logic [ROWS-1:0] v;
    for (int unsigned r = 0; r < ROWS; r++) v[r] = (r < (1 << N));
    return v;
  endfunction
  function automatic logic [COLS-1:0] col_init();
    logic [COLS-1:0] v;
    for (int unsigned c = 0; c < COLS; c++) v[c] = (c < N);
    return v;
  endfunction
  localparam logic [ROWS-1:0] ROW_INIT = row_init();
  localparam logic [COLS-1:0] COL_INIT = col_init();

  logic half_sel;
  assign half_sel = SPLIT ? col_half : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_tag <= ROW_INIT;
      col_tag <= {HALVES{COL_INIT}};
    end else if (init) begin
      row_tag <= ROW_INIT;
      col_tag <= {HALVES{COL_INIT}};
    end else begin
      if (row_swap) begin
        row_tag[row_clr] <= 1'b0;
        row_tag[row_set] <= 1'b1;
      end
      if (col_swap) begin
        col_tag[half_sel][col_clr] <= 1'b0;
        col_tag[half_sel][col_set] <= 1'b1;
      end
    end
  end

endmodule
