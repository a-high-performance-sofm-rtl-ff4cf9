// tb_dp_sram: self-checking test of the dual-port SRAM: random reads and
// writes on both ports at once against a model, the one-cycle read latency,
// the read-data hold when a port is idle and the collision rule (port B wins).
module tb_dp_sram;
  localparam int AW = 13;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [7:0] model [2**AW];
  logic [7:0] exp_a, exp_b;
  bit chk_a, chk_b, seen_a = 0, seen_b = 0;
  int checks = 0, failures = 0;

  dp_sram dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise memory and model through both ports
    for (int i = 0; i < 2**AW; i += 2) begin
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = 8'($urandom);
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = 8'($urandom);
      model[i] = a_wdata; model[i + 1] = b_wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 20000; i++) begin
      a_en = ($urandom % 4) != 0; a_we = $urandom % 2;
      b_en = ($urandom % 4) != 0; b_we = $urandom % 2;
      a_addr = AW'($urandom % 64); b_addr = AW'($urandom % 64); // force overlaps
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      chk_a = a_en && !a_we; chk_b = b_en && !b_we;
      if (chk_a) begin exp_a = model[a_addr]; seen_a = 1; end
      if (chk_b) begin exp_b = model[b_addr]; seen_b = 1; end
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (chk_a) check(a_rdata == exp_a, "port A read");
      if (chk_b) check(b_rdata == exp_b, "port B read");
      if (!chk_a && !chk_b && seen_a && seen_b) begin
        a_en = 0; b_en = 0; @(posedge clk); #1;
        check(a_rdata == exp_a && b_rdata == exp_b, "read data held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
