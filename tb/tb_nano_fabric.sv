// tb_nano_fabric: checks the fabric model. Random stuck-at defects are
// injected, every row is written with random data and read back, and each bit
// is compared with what a cell array with those defects must return: a stuck
// cell its stuck value, a missing spare-row x spare-column cell 0, any other
// cell the data last written. Rows are rewritten several times with fresh
// defect maps so stuck cells are seen to ignore writes.
`timescale 1ns/1ps
module tb_nano_fabric;
  localparam int N = 4, CSP = 4, RSP = 16;
  localparam int ROWS = (1 << N) + RSP, COLS = N + CSP;
  localparam int RW = $clog2(ROWS);

  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [RW-1:0] row;
  logic [COLS-1:0] wdata, rdata;
  logic [ROWS-1:0][COLS-1:0] dmask, dval;
  logic [COLS-1:0] written[ROWS];
  int checks = 0, failures = 0, corner_seen = 0, stuck_seen = 0;

  nano_fabric #(.N(N), .CSP(CSP), .RSP(RSP)) dut (.*, .defect_mask(dmask), .defect_val(dval));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    we = 0; row = '0; wdata = '0;
    for (int pass = 0; pass < 8; pass++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          dmask[r][c] = ($urandom_range(9, 0) == 0);
          dval[r][c]  = $urandom_range(1, 0);
        end
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        we = 1; row = RW'(r); wdata = COLS'($urandom);
        written[r] = wdata;
      end
      @(negedge clk);
      we = 0;
      for (int r = 0; r < ROWS; r++) begin
        row = RW'(r);
        #1;
        for (int c = 0; c < COLS; c++) begin
          if (r >= (1 << N) && c >= N) begin exp = 1'b0; corner_seen++; end
          else if (dmask[r][c]) begin exp = dval[r][c]; stuck_seen++; end
          else exp = written[r][c];
          checks++;
          if (rdata[c] !== exp) begin
            failures++;
            $display("FAIL: row %0d col %0d read %0b expected %0b", r, c, rdata[c], exp);
          end
        end
      end
    end
    checks++; if (corner_seen == 0 || stuck_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
