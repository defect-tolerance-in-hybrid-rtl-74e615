// lut_access: turns the tags into the LUT's address and data mapping. The
// tags say which nano rows and columns belong to the repaired LUT; this block
// says where LUT entry `addr` and its output bit j physically live.
//
// Rows: logical row k is the k-th row whose tag is 1, counting the physical
// rows in the order [own rows of the upper half][spare rows][own rows of the
// lower half] (for SPLIT=0 this is simply [own rows][spare rows]). With this
// order a spare row that takes the place of an upper-half row lands in the
// upper half of the address space, and the upper half always holds exactly
// 2^(N-1) rows, so spare rows can be shared by both halves as the modified
// scheme requires. Columns: output bit j is the j-th column whose tag is 1 in
// the column-tag set of the half the address falls in (addr[N-1] when
// SPLIT=1); a spare row, which only has cells under the LUT's own columns,
// is always read through those N columns. The ordering rules are this design's choice; the document only
// says a tag of 1 selects a row or column for the final LUT.
//
// Interface: purely combinational. prow/prow_valid give the physical row for
// addr; dout gathers the selected columns from the row read from the fabric;
// wrow scatters wdata onto the selected columns for a write (unselected cells
// are written 0).
module lut_access #(
  parameter int unsigned N     = 4,
  parameter int unsigned CSP   = 4,
  parameter int unsigned RSP   = 16,
  parameter bit          SPLIT = 1'b1,
  localparam int unsigned ROWS   = (1 << N) + RSP,
  localparam int unsigned COLS   = N + CSP,
  localparam int unsigned HALVES = SPLIT ? 2 : 1,
  localparam int unsigned RW     = $clog2(ROWS)
) (
  input  logic [ROWS-1:0]              row_tag,
  input  logic [HALVES-1:0][COLS-1:0]  col_tag,
  input  logic [N-1:0]                 addr,
  input  logic [N-1:0]                 wdata,
  input  logic [COLS-1:0]              fab_rdata,
  output logic [RW-1:0]                prow,
  output logic                         prow_valid,
  output logic [COLS-1:0]              wrow,
  output logic [N-1:0]                 dout
);

  localparam int unsigned HR = (1 << N) / HALVES;  // own rows per half

  // Physical row visited at position k of the selection order.
  function automatic int unsigned order_to_phys(int unsigned k);
    if (k < HR)            return k;
    else if (k < HR + RSP) return (1 << N) + (k - HR);
    else                   return k - RSP;
  endfunction

  logic                half;
  logic [COLS-1:0]     ctag;

  localparam logic [COLS-1:0] OWN_COLS = COLS'((1 << N) - 1);

  // A spare row has cells under the own columns only and is read there.
  assign half = SPLIT ? addr[N-1] : 1'b0;
  assign ctag = (int'(prow) >= (1 << N)) ? OWN_COLS : col_tag[half];

  // Row selection: rank decode over the tagged rows.
  always_comb begin
    int unsigned rank;
    logic [RW-1:0] p;
    rank       = 0;
    prow       = '0;
    prow_valid = 1'b0;
    for (int unsigned k = 0; k < ROWS; k++) begin
      p = RW'(order_to_phys(k));
      if (row_tag[p]) begin
        if (rank == int'(addr) && !prow_valid) begin
          prow       = p;
          prow_valid = 1'b1;
        end
        rank++;
      end
    end
  end

  // Column gather (read) and scatter (write).
  always_comb begin
    int unsigned j;
    j    = 0;
    dout = '0;
    wrow = '0;
    for (int unsigned c = 0; c < COLS; c++) begin
      if (ctag[c]) begin
        if (j < N) begin
          dout[j] = fab_rdata[c];
          wrow[c] = wdata[j];
        end
        j++;
      end
    end
  end

endmodule
