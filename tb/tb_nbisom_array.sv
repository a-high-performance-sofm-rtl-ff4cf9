// tb_nbisom_array: self-checking test of the board's 4 x 4 chip array
// (20 x 20 elements) at its default size. It writes a weight vector into all
// 400 elements through the board row/column lines and reads them all back,
// which checks that board line cr*5 + r reaches row r of every chip in chip
// row cr. An input vector at Manhattan distance 20 from element (14, 5) must
// assert exactly board row line 14 and column line 5 in search cycle 19.
// Alpha is then distributed to a 5 x 5 square (1/4) and a 3 x 3 square (1/2)
// that both straddle chip boundaries, and all weights are compared with the
// model after adaptation.
module tb_nbisom_array;
  import sofm_pkg::*;
  localparam int R = 20, C = 20;
  logic clk = 0, rst_n = 0;
  pe_cmd_e cmd = CMD_NOP;
  logic [7:0] data_in = 0, data_out;
  logic data_oe;
  logic [R-1:0] row_drv = 0, row_line;
  logic [C-1:0] col_drv = 0, col_line;
  int checks = 0, failures = 0;
  logic [7:0] wm [R][C][64];
  logic [7:0] x [64];
  int shift_of [R][C];
  int wr, wc, k;

  nbisom_array dut (.clk, .rst_n, .cmd, .data_in, .data_out, .data_oe,
                    .row_drive(row_drv), .col_drive(col_drv), .row_line, .col_line);
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

  function automatic logic [R-1:0] span(input int lo, input int hi);
    logic [R-1:0] m = 0;
    for (int i = 0; i < R; i++) if (i >= lo && i <= hi) m[i] = 1'b1;
    return m;
  endfunction

  task automatic read_all(input string what);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      op(CMD_CLR, 0, 0, 0);
      for (int j = 0; j < 64; j++) begin
        cmd = CMD_READ; row_drv = 20'(1 << r); col_drv = 20'(1 << c); #1;
        check(data_oe && data_out == wm[r][c][j], $sformatf("%s (%0d,%0d)[%0d] got %0d exp %0d", what, r, c, j, data_out, wm[r][c][j]));
        @(posedge clk); #1;
      end
      cmd = CMD_NOP; row_drv = 0; col_drv = 0;
    end
  endtask

  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      op(CMD_CLR, 0, 0, 0);
      for (int j = 0; j < 64; j++) begin
        wm[r][c][j] = 8'($urandom);
        op(CMD_WRITE, wm[r][c][j], 20'(1 << r), 20'(1 << c));
      end
    end
    read_all("write/read");
    // input vector at distance 20 from element (wr, wc)
    wr = 14; wc = 5;
    for (int j = 0; j < 64; j++) x[j] = wm[wr][wc][j];
    for (int j = 0; j < 20; j++) x[j] = (x[j] < 128) ? x[j] + 1 : x[j] - 1;
    op(CMD_CLR, 0, 0, 0);
    for (int j = 0; j < 64; j++) op(CMD_DIST, x[j], 0, 0);
    k = 0;
    cmd = CMD_SEARCH; #1;
    while (row_line == 0 && k < 20000) begin @(posedge clk); #1; k++; end
    check(k == 19, $sformatf("best match found in search cycle %0d", k));
    check(row_line == 20'(1 << wr) && col_line == 20'(1 << wc),
          $sformatf("best match lines row=%b col=%b", row_line, col_line));
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
