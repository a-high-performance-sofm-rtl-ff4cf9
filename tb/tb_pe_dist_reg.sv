// tb_pe_dist_reg: self-checking test of the 14-bit distance register: load,
// hold, reset value and the zero / one flags.
module tb_pe_dist_reg;
  logic clk = 0, rst_n = 0;
  logic load = 0;
  logic [13:0] d_in = 0, d_out;
  logic zero, one;
  int checks = 0, failures = 0;
  logic [13:0] v;

  pe_dist_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    check(d_out == 0 && zero && !one, "reset to 0");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      v = (i < 4) ? 14'(i) : (i == 4) ? 14'h3FFF : 14'($urandom);
      d_in = v; load = 1; @(posedge clk); #1; load = 0;
      check(d_out == v, $sformatf("load %0d", v));
      check(zero == (v == 0) && one == (v == 1), "flags");
      d_in = ~v; @(posedge clk); #1;
      check(d_out == v, "hold without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
