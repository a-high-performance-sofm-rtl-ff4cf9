// tb_sofm_pe: self-checking test of one processing element driven the way
// the controller drives it. Checks addressed and unaddressed WRITE and READ,
// the Manhattan distance of 64 components (seen through the best-match
// search: the element first asserts its lines in search cycle max(d-1, 0),
// d = distance), adaptation with every alpha, that an element without a
// factor for the current vector does not adapt, and masking (no pull, no
// adaptation). Expected values come from a weight model in the testbench.
module tb_sofm_pe;
  import sofm_pkg::*;
  logic clk = 0, rst_n = 0;
  pe_cmd_e cmd = CMD_NOP;
  logic [7:0] data_in = 0, data_out;
  logic data_oe, row_line = 0, col_line = 0, pull;
  int checks = 0, failures = 0;
  logic [7:0] wm [64];
  logic [7:0] x [64];
  int d;

  sofm_pe dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input pe_cmd_e c, input logic [7:0] dat, input bit r, input bit col);
    cmd = c; data_in = dat; row_line = r; col_line = col;
    @(posedge clk); #1;
    cmd = CMD_NOP; row_line = 0; col_line = 0;
  endtask

  task automatic read_check(input string what);
    op(CMD_CLR, 0, 0, 0);
    for (int k = 0; k < 64; k++) begin
      cmd = CMD_READ; row_line = 1; col_line = 1; #1;
      check(data_oe && data_out == wm[k], $sformatf("%s: weight %0d", what, k));
      @(posedge clk); #1;
    end
    cmd = CMD_NOP; row_line = 0; col_line = 0;
  endtask

  task automatic make_x(input int dd);   // x at Manhattan distance dd
    int left = dd;
    for (int k = 0; k < 64; k++) x[k] = wm[k];
    while (left > 0) begin
      int k = $urandom % 64;
      if (x[k] < 255 && x[k] >= wm[k]) begin x[k]++; left--; end
      else if (x[k] > 0 && x[k] <= wm[k]) begin x[k]--; left--; end
    end
  endtask

  function automatic int manhattan();
    int s = 0;
    for (int k = 0; k < 64; k++) s += (x[k] > wm[k]) ? x[k] - wm[k] : wm[k] - x[k];
    return s;
  endfunction

  task automatic distance();
    op(CMD_CLR, 0, 0, 0);
    for (int k = 0; k < 64; k++) op(CMD_DIST, x[k], 0, 0);
  endtask

  task automatic search_check(input int dd);
    int k = 0;
    cmd = CMD_SEARCH; #1;
    while (!pull && k < 20000) begin
      @(posedge clk); #1; k++;
    end
    check(pull && k == ((dd > 0) ? dd - 1 : 0),
          $sformatf("search for d=%0d answered in cycle %0d", dd, k));
    @(posedge clk); #1;
    check(pull, "lines stay asserted at zero");
    cmd = CMD_NOP;
  endtask

  task automatic adapt(input int shift, input bit addressed);
    op(CMD_ALPHA, 8'(shift), 1, addressed);
    for (int k = 0; k < 64; k++) begin
      int diff = int'(x[k]) - int'(wm[k]);
      int q = diff / (1 << shift);
      if (diff < 0 && diff % (1 << shift) != 0) q--;
      if (addressed) wm[k] = 8'(int'(wm[k]) + q);
      op(CMD_ADAPT, x[k], 0, 0);
    end
  endtask

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    op(CMD_CLR, 0, 0, 0);
    for (int k = 0; k < 64; k++) begin wm[k] = 8'($urandom); op(CMD_WRITE, wm[k], 1, 1); end
    read_check("write");
    op(CMD_CLR, 0, 0, 0);
    for (int k = 0; k < 64; k++) op(CMD_WRITE, 8'($urandom), 1, 0);
    read_check("unaddressed write");
    op(CMD_CLR, 0, 0, 0);
    cmd = CMD_READ; row_line = 0; col_line = 1; #1;
    check(!data_oe && data_out == 0, "unaddressed read stays off the bus");
    @(posedge clk); #1;
    // distance and search
    for (int t = 0; t < 8; t++) begin
      d = (t < 5) ? t * t : int'($urandom % 3000);
      make_x(d);
      check(manhattan() == d, "stimulus distance");
      distance();
      search_check(d);
    end
    for (int t = 0; t < 2; t++) begin       // fully random vector
      for (int k = 0; k < 64; k++) x[k] = 8'($urandom);
      distance();
      search_check(manhattan());
    end
    // back-to-back distances: the second must restart, not accumulate
    for (int k = 0; k < 64; k++) x[k] = 8'($urandom);
    distance();
    make_x(7);
    distance();
    search_check(7);
    // adaptation with every factor
    for (int s = 0; s < 8; s++) begin
      for (int k = 0; k < 64; k++) x[k] = 8'($urandom);
      distance();
      adapt(s, 1);
      read_check($sformatf("adapt shift %0d", s));
    end
    // element without a factor for this vector keeps its weights
    for (int k = 0; k < 64; k++) x[k] = 8'($urandom);
    distance();
    adapt(0, 0);
    read_check("no factor, no adaptation");
    // masked element: no pull, no adaptation
    op(CMD_ALPHA, 8'h80, 1, 1);
    for (int k = 0; k < 64; k++) x[k] = wm[k];
    distance();
    cmd = CMD_SEARCH; #1;
    check(!pull, "masked element does not answer");
    @(posedge clk); #1; cmd = CMD_NOP;
    for (int k = 0; k < 64; k++) x[k] = 8'($urandom);
    distance();
    op(CMD_ALPHA, 8'd0, 1, 1);
    for (int k = 0; k < 64; k++) op(CMD_ADAPT, x[k], 0, 0);
    read_check("masked element does not adapt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
