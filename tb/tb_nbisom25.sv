// tb_nbisom25: self-checking test of one NBISOM_25 chip (5 x 5 elements).
// The testbench plays the board: each row/column line is the OR of its own
// drive and the chip's pulls. It writes a weight vector into every element
// by row/column addressing, reads them all back, presents an input vector at
// Manhattan distance 20 from one element and checks that the search asserts
// exactly that element's row and column line in search cycle 19 (after the
// 64 distance cycles), then distributes alpha in the two steps of the
// paper's example (1/4 to all 25 elements, then 1/2 to the 3 x 3 square
// around the winner), adapts, and compares every weight with the model.
module tb_nbisom25;
  import sofm_pkg::*;
  localparam int R = 5, C = 5;
  logic clk = 0, rst_n = 0;
  pe_cmd_e cmd = CMD_NOP;
  logic [7:0] data_in = 0, data_out;
  logic data_oe;
  logic [R-1:0] row_drv = 0, row_in, row_pull;
  logic [C-1:0] col_drv = 0, col_in, col_pull;
  int checks = 0, failures = 0;
  logic [7:0] wm [R][C][64];
  logic [7:0] x [64];
  int shift_of [R][C];
  int wr, wc, k;

  assign row_in = row_drv | row_pull;
  assign col_in = col_drv | col_pull;

  nbisom25 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input pe_cmd_e c, input logic [7:0] dat,
                    input logic [R-1:0] rd, input logic [C-1:0] cd);
    cmd = c; data_in = dat; row_drv = rd; col_drv = cd;
    @(posedge clk); #1;
    cmd = CMD_NOP; row_drv = 0; col_drv = 0;
  endtask

  function automatic logic [4:0] span(input int lo, input int hi);
    logic [4:0] m = 0;
    for (int i = 0; i < 5; i++) if (i >= lo && i <= hi) m[i] = 1'b1;
    return m;
  endfunction

  task automatic read_all(input string what);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      op(CMD_CLR, 0, 0, 0);
      for (int j = 0; j < 64; j++) begin
        cmd = CMD_READ; row_drv = 5'(1 << r); col_drv = 5'(1 << c); #1;
        check(data_oe && data_out == wm[r][c][j], $sformatf("%s (%0d,%0d)[%0d] got %0d exp %0d", what, r, c, j, data_out, wm[r][c][j]));
        @(posedge clk); #1;
      end
      cmd = CMD_NOP; row_drv = 0; col_drv = 0;
    end
  endtask

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      op(CMD_CLR, 0, 0, 0);
      for (int j = 0; j < 64; j++) begin
        wm[r][c][j] = 8'($urandom);
        op(CMD_WRITE, wm[r][c][j], 5'(1 << r), 5'(1 << c));
      end
    end
    read_all("write/read");
    // input vector at distance 20 from element (wr, wc)
    wr = 3; wc = 1;
    for (int j = 0; j < 64; j++) x[j] = wm[wr][wc][j];
    for (int j = 0; j < 20; j++) x[j] = (x[j] < 128) ? x[j] + 1 : x[j] - 1;
    op(CMD_CLR, 0, 0, 0);
    for (int j = 0; j < 64; j++) op(CMD_DIST, x[j], 0, 0);
    k = 0;
    cmd = CMD_SEARCH; #1;
    while (row_pull == 0 && k < 20000) begin @(posedge clk); #1; k++; end
    check(k == 19, $sformatf("best match found in search cycle %0d", k));
    check(row_pull == 5'(1 << wr) && col_pull == 5'(1 << wc),
          $sformatf("best match lines row=%b col=%b", row_pull, col_pull));
    @(posedge clk); #1; cmd = CMD_NOP;
    // alpha distribution: 1/4 to the 5x5 square, then 1/2 to the 3x3 square
    op(CMD_ALPHA, 8'd2, span(wr - 2, wr + 2), span(wc - 2, wc + 2));
    op(CMD_ALPHA, 8'd1, span(wr - 1, wr + 1), span(wc - 1, wc + 1));
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      int dr, dc;
      dr = (r > wr) ? r - wr : wr - r;
      dc = (c > wc) ? c - wc : wc - c;
      shift_of[r][c] = (dr <= 1 && dc <= 1) ? 1 : (dr <= 2 && dc <= 2) ? 2 : -1;
    end
    for (int j = 0; j < 64; j++) begin
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        if (shift_of[r][c] >= 0) begin
          int diff;
          diff = int'(x[j]) - int'(wm[r][c][j]);
          wm[r][c][j] = 8'(int'(wm[r][c][j]) + (diff >>> shift_of[r][c]));
        end
      end
      op(CMD_ADAPT, x[j], 0, 0);
    end
    read_all("adapted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
