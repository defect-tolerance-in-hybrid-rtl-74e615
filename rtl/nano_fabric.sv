// nano_fabric: behavioural model of the nanodevice crossbar that stores the
// bits of one repairable look-up table. It is not CMOS logic: it stands for a
// self-assembled cell array and models its manufacturing defects.
//
// The array has ROWS = 2^N + RSP rows and COLS = N + CSP columns. Rows
// 0..2^N-1 are the LUT's own rows, rows 2^N.. are the spare rows; columns
// 0..N-1 are the LUT's own columns, N.. the spare columns. As in the area
// count of the tagged repair scheme, (2^N+RSP)*(N+CSP) - RSP*CSP cells exist:
// the corner where a spare row meets a spare column has no cells, and those
// positions always read 0. A spare row is thus exactly one LUT row wide: it
// replaces a whole row over the LUT's own columns, and a spare column is one
// LUT column tall.
//
// Defects are injected through defect_mask/defect_val: a masked cell is stuck
// at its defect_val bit, ignores writes and always reads that value. Which
// defect model the fabric follows is this model's own choice (stuck-at cells).
//
// Interface: one row select `row` for both ports. A write (we=1) stores the
// whole row wdata at the rising clock edge. rdata shows the selected row
// combinationally, so a row written in one cycle reads back in the next.
module nano_fabric #(
  parameter int unsigned N   = 4,
  parameter int unsigned CSP = 4,
  parameter int unsigned RSP = 16,
  localparam int unsigned ROWS = (1 << N) + RSP,
  localparam int unsigned COLS = N + CSP,
  localparam int unsigned RW   = $clog2(ROWS)
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [RW-1:0]              row,
  input  logic [COLS-1:0]            wdata,
  output logic [COLS-1:0]            rdata,
  input  logic [ROWS-1:0][COLS-1:0]  defect_mask,
  input  logic [ROWS-1:0][COLS-1:0]  defect_val
);

  logic [ROWS-1:0][COLS-1:0] cells;

  // A cell exists unless it sits in the spare-row x spare-column corner.
  function automatic logic cell_exists(int unsigned r, int unsigned c);
    return !(r >= (1 << N) && c >= N);
  endfunction

  always_ff @(posedge clk) begin
    if (we && int'(row) < ROWS) cells[row] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (int'(row) < ROWS) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        if (!cell_exists(int'(row), c))  rdata[c] = 1'b0;
        else if (defect_mask[row][c])    rdata[c] = defect_val[row][c];
        else                             rdata[c] = cells[row][c];
      end
    end
  end

endmodule
