// hybrid_lut: one repairable 2^N x N look-up table built from a defective
// nanodevice cell array and a small amount of CMOS. The nano fabric holds the
// LUT's 2^N rows and N columns plus RSP spare rows and CSP spare columns; CMOS
// one-bit tags pick which rows and columns form the LUT, so defective ones can
// be left out without any address encoder or decoder.
//
// Operation:
//  * Repair: pulse repair_start. The repair engine tests the fabric, swaps
//    spare rows/columns in through the tags, and raises repair_done with
//    repair_ok telling whether a defect-free LUT was found. The fabric is
//    owned by the repair engine while repair_busy is high.
//  * Program: with repair_done high, cfg_we writes the N-bit entry cfg_data at
//    LUT address cfg_addr (one entry per clock).
//  * Evaluate: lut_out is the N-bit entry at address lut_in, combinationally
//    from the fabric (when cfg_we is low). lut_ready = repair_done & repair_ok.
// SPLIT selects the scheme: 1 = modified tagged repair (columns split into two
// halves with their own tags), 0 = plain tagged repair. Defaults: a 2^4 x 4 LUT
// with 100% spares, the document's running example; which scheme is the
// default is this design's choice (the one the document uses for its benchmark
// results). defect_mask/defect_val inject stuck-at defects into the fabric
// model and exist for simulation; the tags and replacement counts are brought
// out for observation.
module hybrid_lut #(
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
  input  logic                          clk,
  input  logic                          rst_n,
  // repair
  input  logic                          repair_start,
  output logic                          repair_busy,
  output logic                          repair_done,
  output logic                          repair_ok,
  // programming
  input  logic                          cfg_we,
  input  logic [N-1:0]                  cfg_addr,
  input  logic [N-1:0]                  cfg_data,
  // evaluation
  input  logic [N-1:0]                  lut_in,
  output logic [N-1:0]                  lut_out,
  output logic                          lut_ready,
  // defect injection into the fabric model
  input  logic [ROWS-1:0][COLS-1:0]     defect_mask,
  input  logic [ROWS-1:0][COLS-1:0]     defect_val,
  // observation
  output logic [ROWS-1:0]               row_tag,
  output logic [HALVES-1:0][COLS-1:0]   col_tag,
  output logic [7:0]                    col_repl,
  output logic [HALVES-1:0][7:0]        row_repl
);

  logic            tag_init, row_swap, col_swap, col_half;
  logic [RW-1:0]   row_clr, row_set;
  logic [CW-1:0]   col_clr, col_set;

  logic            rc_we;
  logic [RW-1:0]   rc_row;
  logic [COLS-1:0] rc_wdata;

  logic            fab_we;
  logic [RW-1:0]   fab_row;
  logic [COLS-1:0] fab_wdata, fab_rdata;

  logic [N-1:0]    acc_addr;
  logic [RW-1:0]   acc_prow;
  logic            acc_valid;
  logic [COLS-1:0] acc_wrow;

  nano_fabric #(.N(N), .CSP(CSP), .RSP(RSP)) u_fabric (
    .clk, .we(fab_we), .row(fab_row), .wdata(fab_wdata), .rdata(fab_rdata),
    .defect_mask, .defect_val
  );

  tag_bank #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(SPLIT)) u_tags (
    .clk, .rst_n, .init(tag_init),
    .row_swap, .row_clr, .row_set,
    .col_swap, .col_half, .col_clr, .col_set,
    .row_tag, .col_tag
  );

  repair_ctrl #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(SPLIT)) u_repair (
    .clk, .rst_n, .start(repair_start),
    .busy(repair_busy), .done(repair_done), .ok(repair_ok),
    .fab_we(rc_we), .fab_row(rc_row), .fab_wdata(rc_wdata), .fab_rdata,
    .tag_init, .row_swap, .row_clr, .row_set,
    .col_swap, .col_half, .col_clr, .col_set,
    .row_tag, .col_tag, .col_repl, .row_repl
  );

  assign acc_addr = cfg_we ? cfg_addr : lut_in;

  lut_access #(.N(N), .CSP(CSP), .RSP(RSP), .SPLIT(SPLIT)) u_access (
    .row_tag, .col_tag, .addr(acc_addr), .wdata(cfg_data),
    .fab_rdata, .prow(acc_prow), .prow_valid(acc_valid),
    .wrow(acc_wrow), .dout(lut_out)
  );

  // The repair engine owns the fabric while it runs.
  always_comb begin
    if (repair_busy) begin
      fab_we    = rc_we;
      fab_row   = rc_row;
      fab_wdata = rc_wdata;
    end else begin
      fab_we    = cfg_we && repair_done && acc_valid;
      fab_row   = acc_prow;
      fab_wdata = acc_wrow;
    end
  end

  assign lut_ready = repair_done && repair_ok;

  // Programming is only meaningful after a repair has finished.
  a_cfg_after_repair: assert property (@(posedge clk)
    cfg_we |-> (repair_done && !repair_busy));

endmodule
