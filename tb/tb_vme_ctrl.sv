// tb_vme_ctrl: self-checking test of the VME-bus slave. A testbench bus
// master runs D8 cycles (AS*/DS* asserted, wait for DTACK*, release) against
// a model of the SRAM port A. Checks: SRAM writes and reads through the
// window, that another board's addresses get no DTACK* and no SRAM access,
// the DTACK* latency (at most 5 clock cycles), the job start pulse and its
// opcode, that no start is issued while the controller is busy, the status
// register, the interrupt raised by done and its clearing.
module tb_vme_ctrl;
  import sofm_pkg::*;
  localparam int AW = 13;
  logic clk = 0, rst_n = 0;
  logic [23:0] vme_addr = 0;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [7:0] vme_din = 0, vme_dout;
  logic vme_dout_oe, vme_dtack_n, vme_irq_n;
  logic a_en, a_we;
  logic [AW-1:0] a_addr;
  logic [7:0] a_wdata, a_rdata;
  logic start;
  ctrl_op_e op;
  logic busy = 0, done = 0;
  logic [7:0] mem [2**AW];
  int checks = 0, failures = 0;
  int n_start = 0, a_access = 0;
  ctrl_op_e last_op;

  vme_ctrl dut (.*);
  always #5 clk = ~clk;

  // port A model: synchronous, one cycle read latency
  always @(posedge clk) begin
    if (a_en) begin
      a_access++;
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (start && rst_n) begin n_start++; last_op <= op; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one D8 bus cycle; returns read data and whether DTACK* came
  task automatic bus(input logic [23:0] addr, input bit wr, input logic [7:0] d,
                     output logic [7:0] q, output bit acked);
    int t = 0;
    vme_addr = addr; vme_write_n = !wr; vme_din = d;
    #2 vme_as_n = 0; vme_ds_n = 0;
    while (vme_dtack_n && t < 20) begin @(posedge clk); #1; t++; end
    acked = !vme_dtack_n;
    if (acked) begin
      check(t <= 5, $sformatf("DTACK after %0d cycles", t));
      if (!wr) check(vme_dout_oe, "read data driven");
      q = vme_dout;
    end
    vme_as_n = 1; vme_ds_n = 1;
    t = 0;
    while (!vme_dtack_n && t < 20) begin @(posedge clk); #1; t++; end
    check(vme_dtack_n && !vme_dout_oe, "DTACK released after DS");
    repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q; bit ack; int base_acc;
    logic [7:0] model [256];
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check(vme_irq_n && vme_dtack_n, "idle after reset");
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'($urandom);
      bus(24'h400000 + 24'(i * 17), 1, model[i], q, ack);
      check(ack, "write acknowledged");
    end
    for (int i = 0; i < 256; i++) begin
      bus(24'h400000 + 24'(i * 17), 0, 0, q, ack);
      check(ack && q == model[i], $sformatf("read back %0d: %0h", i, q));
    end
    base_acc = a_access;
    bus(24'h410000, 1, 8'h55, q, ack);
    check(!ack && a_access == base_acc, "other board's address ignored");
    // job start
    bus(24'h408000, 1, 8'h80 | 8'(OP_LEARN), q, ack);
    check(ack && n_start == 1 && last_op == OP_LEARN, $sformatf("start pulse with opcode ack=%0d n=%0d op=%0d", ack, n_start, last_op));
    busy = 1;
    bus(24'h408000, 0, 0, q, ack);
    check(q[7] && !q[6] && q[2:0] == 3'(OP_LEARN), $sformatf("status busy %0h", q));
    bus(24'h408000, 1, 8'h80 | 8'(OP_RECALL), q, ack);
    check(n_start == 1, "no start while busy");
    bus(24'h408000, 1, 8'(OP_READ), q, ack);
    check(n_start == 1, "opcode write without start bit");
    @(posedge clk); #1 busy = 0; done = 1; @(posedge clk); #1 done = 0;
    repeat (2) @(posedge clk); #1;
    check(!vme_irq_n, "interrupt after done");
    bus(24'h408000, 0, 0, q, ack);
    check(!q[7] && q[6], $sformatf("status irq %0h", q));
    bus(24'h408001, 1, 0, q, ack);
    check(vme_irq_n, "interrupt cleared");
    bus(24'h408000, 1, 8'h80 | 8'(OP_RECALL), q, ack);
    check(n_start == 2 && last_op == OP_RECALL, "second start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
