// pe_calc: calculation unit of one processing element (combinational).
//
// Computes, in parallel, the three results the paper asks of it; the
// controlling unit picks which one is stored:
//   dist_acc = (first ? 0 : d_cur) + |x - w|     Manhattan distance term
//   dist_dec = max(d_cur - 1, 0)                 count-down in the search
//   w_new    = w + ((x - w) >>> shift)           adaptation by 2**-shift
// The difference x - w is a 9-bit signed value and the shift is arithmetic,
// so w_new always lies between w and x and stays within 8 bits; shift = 0
// copies x. The accumulation is 14 bits wide as in the paper and saturates at
// its maximum, which 64 components of 8 bits never reach.
module pe_calc #(
  parameter int unsigned W_BITS = 8,
  parameter int unsigned D_BITS = 14,
  parameter int unsigned A_BITS = 3
) (
  input  logic [W_BITS-1:0] x,        // input vector component (data bus)
  input  logic [W_BITS-1:0] w,        // weight from the weight memory
  input  logic [D_BITS-1:0] d_cur,     // distance register
  input  logic              first,    // first component: start a new sum
  input  logic [A_BITS-1:0] shift,    // alpha as shift count
  output logic [D_BITS-1:0] dist_acc,
  output logic [D_BITS-1:0] dist_dec,
  output logic [W_BITS-1:0] w_new
);

  logic signed [W_BITS:0]   diff;
  logic        [W_BITS-1:0] absdiff;
  logic        [D_BITS:0]   sum;
  logic signed [W_BITS:0]   step;
  logic signed [W_BITS+1:0] wsum;

  always_comb begin
    diff    = $signed({1'b0, x}) - $signed({1'b0, w});
    absdiff = diff[W_BITS] ? W_BITS'(-diff) : diff[W_BITS-1:0];
    sum     = (first ? '0 : {1'b0, d_cur}) + (D_BITS + 1)'(absdiff);
    dist_acc = sum[D_BITS] ? '1 : sum[D_BITS-1:0];
    dist_dec = (d_cur == '0) ? '0 : d_cur - 1'b1;
    step    = diff >>> shift;
    wsum    = $signed({2'b00, w}) + (W_BITS + 2)'(step);
    w_new   = wsum[W_BITS-1:0];
  end

endmodule
