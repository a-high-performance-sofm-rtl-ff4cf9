// tb_pe_weight_mem: self-checking test of the element weight memory.
// Fills all 64 words through the address counter, reads them back, checks
// the counter's clear, increment, hold and wrap-around, and a
// read-modify-write in one cycle, all against a model array.
module tb_pe_weight_mem;
  logic clk = 0, rst_n = 0;
  logic clr_cnt = 0, inc_cnt = 0, we = 0;
  logic [7:0] wdata = 0, rdata;
  logic [5:0] addr;
  int checks = 0, failures = 0;
  logic [7:0] model [64];
  int mcnt;

  pe_weight_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input bit c, input bit i, input bit w, input logic [7:0] d);
    clr_cnt = c; inc_cnt = i; we = w; wdata = d;
    @(posedge clk); #1;
    if (w) model[mcnt] = d;
    if (c) mcnt = 0; else if (i) mcnt = (mcnt + 1) % 64;
    clr_cnt = 0; inc_cnt = 0; we = 0;
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mcnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(addr == 0, "counter 0 after reset");
    for (int i = 0; i < 64; i++) step(0, 1, 1, 8'($urandom));
    check(addr == 0, "counter wrapped after 64 increments");
    for (int i = 0; i < 64; i++) begin
      check(rdata == model[mcnt], $sformatf("read word %0d", i));
      check(addr == 6'(mcnt), "counter value");
      step(0, 1, 0, 0);
    end
    step(0, 0, 0, 0);   // hold
    step(0, 1, 0, 0); step(0, 1, 0, 0); step(0, 0, 1, 8'hA5);
    check(addr == 2 && rdata == 8'hA5, "write without increment");
    step(1, 1, 0, 0);
    check(addr == 0, "clear has priority over increment");
    // read-modify-write in one cycle
    for (int i = 0; i < 64; i++) step(0, 1, 1, rdata + 8'd3);
    for (int i = 0; i < 64; i++) begin
      check(rdata == model[mcnt], $sformatf("rmw word %0d", i));
      step(0, 1, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
