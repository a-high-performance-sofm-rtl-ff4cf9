// pe_weight_mem: weight memory of one processing element.
//
// Holds the element's weight vector (64 bytes by default, as in the paper) and
// the "special counter register" that generates the memory address. Every
// access uses the counter as address: the counter is cleared by clr_cnt and
// advances by one on inc_cnt, wrapping from DEPTH-1 to 0. The read port is
// asynchronous (rdata shows w[cnt] in the same cycle), the write port writes
// wdata to w[cnt] on the rising clock edge when we is high, so a
// read-modify-write of one weight (adaptation) takes one cycle.
//
// The paper gives the size and the counter; the asynchronous read and the
// clear/increment controls are this design's choices. The memory array is not
// reset: like the SRAM macro it models, it holds whatever was last written.
module pe_weight_mem #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_cnt,   // counter := 0 (priority over inc_cnt)
  input  logic             inc_cnt,   // counter := counter + 1
  input  logic             we,        // write wdata to w[counter]
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,     // w[counter]
  output logic [AW-1:0]    addr       // current counter value
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (clr_cnt) cnt <= '0;
    else if (inc_cnt) cnt <= (cnt == AW'(DEPTH - 1)) ? '0 : cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we) mem[cnt] <= wdata;
  end

  assign rdata = mem[cnt];
  assign addr  = cnt;

endmodule
