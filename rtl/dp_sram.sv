// dp_sram: the board's dual-port SRAM (8 K x 8 by default).
//
// Port A belongs to the VME-bus side, port B to the NBISOM controller; both
// are synchronous and independent: on a rising edge with en high a port
// writes wdata (we high) or reads, and a read word appears on rdata after
// that edge and holds until the port's next read. If both ports write the
// same address in one cycle, port B's value is kept. The paper only says the
// memory is dual-ported and what it holds (input vectors, a parameter field,
// an address field and the results); its size, the synchronous ports and the
// collision rule are this design's. The array is not reset.
module dp_sram #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
