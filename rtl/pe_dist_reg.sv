// pe_dist_reg: 14-bit distance register of one processing element.
//
// Stores the Manhattan distance as the calculation unit accumulates it and,
// during the best-match search, as it counts down. The register itself only
// stores: d_in (from the calculation unit) is taken on the rising edge when
// load is high. It also decodes the two values the best-match search needs:
// `zero` (distance is 0) and `one` (distance is 1, so the next decrement
// reaches 0). The 14-bit width is the paper's: 64 components times 255 is at
// most 16320. Reset clears it to 0.
module pe_dist_reg #(
  parameter int unsigned D_BITS = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [D_BITS-1:0] d_in,
  output logic [D_BITS-1:0] d_out,
  output logic              zero,
  output logic              one
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    d_out <= '0;
    else if (load) d_out <= d_in;
  end

  assign zero = (d_out == '0);
  assign one  = (d_out == D_BITS'(1));

endmodule
