// tb_pe_alpha_reg: self-checking test of the alpha register: load of every
// shift count, clear of the valid flag, load winning over clear, the sticky
// mask flag and reset.
module tb_pe_alpha_reg;
  logic clk = 0, rst_n = 0;
  logic clear = 0, load = 0, mask_set = 0;
  logic [2:0] shift_in = 0, shift;
  logic valid, masked;
  int checks = 0, failures = 0;

  pe_alpha_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input bit c, input bit l, input bit m, input logic [2:0] s);
    clear = c; load = l; mask_set = m; shift_in = s;
    @(posedge clk); #1;
    clear = 0; load = 0; mask_set = 0;
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    check(!valid && !masked && shift == 0, "reset state");
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      step(0, 1, 0, 3'(s));
      check(valid && shift == 3'(s), $sformatf("load shift %0d", s));
      step(0, 0, 0, 3'(7 - s));
      check(valid && shift == 3'(s), "hold");
      step(1, 0, 0, 0);
      check(!valid, "clear drops valid");
    end
    step(1, 1, 0, 3'd5);
    check(valid && shift == 5, "load wins over clear");
    step(0, 0, 1, 0);
    check(masked && valid && shift == 5, "mask set keeps alpha");
    step(1, 0, 0, 0);
    check(masked, "mask is sticky");
    rst_n = 0; #1;
    check(!masked && !valid, "reset clears mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
