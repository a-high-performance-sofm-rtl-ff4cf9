// pe_ctrl: controlling unit of one processing element (combinational).
//
// Decodes the command on the 3-bit control bus (see sofm_pkg::pe_cmd_e) into
// the enables of the weight memory, alpha register and distance register, and
// is the element's interface to its row and column line. An element is
// addressed when both its row line and its column line are asserted by the
// controller (the paper's way of addressing single elements or arrays of
// them). During CMD_SEARCH the element instead asserts its own lines (`pull`)
// when its distance is 0, or is 1 and is being decremented to 0 in this
// cycle; a masked element never does. Lines are modelled active high: an
// asserted line stands for an open-drain line pulled low.
//
// Per command:
//   CLR    counter := 0
//   DIST   distance := acc (restarting when the counter is 0), counter++,
//          alpha `valid` cleared (a new input vector begins)
//   SEARCH distance := distance - 1 (saturating), counter := 0, pull lines
//   ALPHA  counter := 0; addressed: load alpha from data[2:0], or mark the
//          element masked when data[7] is set
//   ADAPT  counter++; if alpha valid and not masked: w[cnt] := adapted weight
//   WRITE  counter++; addressed: w[cnt] := data
//   READ   counter++; addressed: drive w[cnt] onto the data bus
// The command set and its encoding are this design's; the paper names only
// the operations (distance, best-match count-down, alpha, adaptation,
// reading and writing of weights).
module pe_ctrl
  import sofm_pkg::*;
(
  input  pe_cmd_e cmd,
  input  logic    row_line,     // sensed state of the element's row line
  input  logic    col_line,     // sensed state of the element's column line
  input  logic    data_msb,     // data bus bit 7 (mask request in CMD_ALPHA)
  input  logic    dist_zero,
  input  logic    dist_one,
  input  logic    alpha_valid,
  input  logic    masked,
  output logic    cnt_clr,
  output logic    cnt_inc,
  output logic    mem_we,
  output logic    mem_sel_adapt, // 1: write adapted weight, 0: write data bus
  output logic    dist_load,
  output logic    dist_sel_dec,  // 1: load decremented, 0: load accumulated
  output logic    alpha_clear,
  output logic    alpha_load,
  output logic    mask_set,
  output logic    data_oe,
  output logic    pull           // assert own row and column line
);

  logic addressed;
  assign addressed = row_line && col_line;

  always_comb begin
    cnt_clr       = 1'b0;
    cnt_inc       = 1'b0;
    mem_we        = 1'b0;
    mem_sel_adapt = 1'b0;
    dist_load     = 1'b0;
    dist_sel_dec  = 1'b0;
    alpha_clear   = 1'b0;
    alpha_load    = 1'b0;
    mask_set      = 1'b0;
    data_oe       = 1'b0;
    pull          = 1'b0;
    unique case (cmd)
      CMD_NOP: ;
      CMD_CLR: cnt_clr = 1'b1;
      CMD_DIST: begin
        dist_load   = 1'b1;
        cnt_inc     = 1'b1;
        alpha_clear = 1'b1;
      end
      CMD_SEARCH: begin
        dist_load    = 1'b1;
        dist_sel_dec = 1'b1;
        cnt_clr      = 1'b1;
        pull         = !masked && (dist_zero || dist_one);
      end
      CMD_ALPHA: begin
        cnt_clr    = 1'b1;
        mask_set   = addressed && data_msb;
        alpha_load = addressed && !data_msb;
      end
      CMD_ADAPT: begin
        cnt_inc       = 1'b1;
        mem_sel_adapt = 1'b1;
        mem_we        = alpha_valid && !masked;
      end
      CMD_WRITE: begin
        cnt_inc = 1'b1;
        mem_we  = addressed;
      end
      CMD_READ: begin
        cnt_inc = 1'b1;
        data_oe = addressed;
      end
      default: ;
    endcase
  end

endmodule
