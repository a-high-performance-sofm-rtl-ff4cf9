// sofm_pe: one processing element (neuron) of the NBISOM_25 chip.
//
// Built from the five blocks of the paper's element diagram: weight memory
// with address counter (pe_weight_mem), alpha register (pe_alpha_reg),
// distance register (pe_dist_reg), calculation unit (pe_calc) and controlling
// unit (pe_ctrl). The element processes one input vector component per clock
// cycle: 64 CMD_DIST cycles compute the Manhattan distance between the input
// vector and the stored weight vector, CMD_SEARCH cycles count it down, and
// 64 CMD_ADAPT cycles move the weights towards the input vector by the stored
// factor alpha = 2**-shift.
//
// Interface: the 3-bit control bus `cmd`, the 8-bit data bus split into
// data_in and data_out/data_oe, the sensed row and column lines and `pull`,
// the element's request to assert both of them. Everything is synchronous to
// one rising clock edge; the paper's chip uses two non-overlapping clocks
// instead, which this design replaces by a single clock.
module sofm_pe
  import sofm_pkg::*;
#(
  parameter int unsigned NW = N_WEIGHTS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cmd_e           cmd,
  input  logic [W_BITS-1:0] data_in,
  output logic [W_BITS-1:0] data_out,
  output logic              data_oe,
  input  logic              row_line,
  input  logic              col_line,
  output logic              pull
);

  localparam int unsigned AW = $clog2(NW);

  logic              cnt_clr, cnt_inc, mem_we, mem_sel_adapt;
  logic              dist_load, dist_sel_dec;
  logic              alpha_clear, alpha_load, mask_set;
  logic [W_BITS-1:0] w, w_new, w_wr;
  logic [AW-1:0]     addr;
  logic [D_BITS-1:0] d_cur, dist_acc, dist_dec, dist_in;
  logic              dist_zero, dist_one;
  logic [A_BITS-1:0] shift;
  logic              alpha_valid, masked;

  pe_ctrl u_ctrl (
    .cmd, .row_line, .col_line, .data_msb(data_in[ALPHA_MASK_BIT]),
    .dist_zero, .dist_one, .alpha_valid, .masked,
    .cnt_clr, .cnt_inc, .mem_we, .mem_sel_adapt, .dist_load, .dist_sel_dec,
    .alpha_clear, .alpha_load, .mask_set, .data_oe, .pull
  );

  assign w_wr = mem_sel_adapt ? w_new : data_in;

  pe_weight_mem #(.DEPTH(NW), .WIDTH(W_BITS)) u_mem (
    .clk, .rst_n, .clr_cnt(cnt_clr), .inc_cnt(cnt_inc), .we(mem_we),
    .wdata(w_wr), .rdata(w), .addr
  );

  pe_alpha_reg #(.A_BITS(A_BITS)) u_alpha (
    .clk, .rst_n, .clear(alpha_clear), .load(alpha_load), .mask_set,
    .shift_in(data_in[A_BITS-1:0]), .shift, .valid(alpha_valid), .masked
  );

  pe_calc #(.W_BITS(W_BITS), .D_BITS(D_BITS), .A_BITS(A_BITS)) u_calc (
    .x(data_in), .w, .d_cur, .first(addr == '0), .shift,
    .dist_acc, .dist_dec, .w_new
  );

  assign dist_in = dist_sel_dec ? dist_dec : dist_acc;

  pe_dist_reg #(.D_BITS(D_BITS)) u_dist (
    .clk, .rst_n, .load(dist_load), .d_in(dist_in), .d_out(d_cur),
    .zero(dist_zero), .one(dist_one)
  );

  assign data_out = data_oe ? w : '0;

endmodule
