// pe_alpha_reg: adaptation-factor register of one processing element.
//
// The paper restricts alpha to 1, 1/2, 1/4, ... so that a shifter replaces the
// multiplier; with 8-bit weights 8 factors make sense, which the register
// stores as a 3-bit shift count (alpha = 2**-shift). Besides the count it keeps
// two flags of this design's own: `valid` says that the element received a
// factor for the current input vector (only such elements adapt) and `masked`
// marks an element the controller has faded out because it is faulty.
//
// Timing: all updates on the rising clock edge. clear drops `valid` (once per
// input vector); load stores shift_in and sets `valid`; mask_set sets
// `masked`, which only reset clears. Reset clears everything.
module pe_alpha_reg #(
  parameter int unsigned A_BITS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              load,
  input  logic              mask_set,
  input  logic [A_BITS-1:0] shift_in,
  output logic [A_BITS-1:0] shift,
  output logic              valid,
  output logic              masked
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift  <= '0;
      valid  <= 1'b0;
      masked <= 1'b0;
    end else begin
      if (load) begin
        shift <= shift_in;
        valid <= 1'b1;
      end else if (clear) begin
        valid <= 1'b0;
      end
      if (mask_set) masked <= 1'b1;
    end
  end

endmodule
