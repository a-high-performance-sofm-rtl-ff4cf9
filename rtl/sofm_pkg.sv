// sofm_pkg: types and constants shared by the NBISOM_25 processing elements,
// the chip, the board array and the board controllers.
//
// Widths that come from the paper: 8-bit weights and data bus, 64 weights per
// element, 14-bit distance, 3-bit control bus, 3-bit alpha (a shift count
// selecting one of the factors 1, 1/2, ..., 1/128), 5x5 elements per chip and
// 4x4 chips per board. The command encoding on the control bus, the layout of
// the dual-port SRAM and the controller opcodes are this design's own choices.
package sofm_pkg;

  localparam int unsigned W_BITS     = 8;    // weight / data bus width
  localparam int unsigned D_BITS     = 14;   // distance register width
  localparam int unsigned N_WEIGHTS  = 64;   // weights per element
  localparam int unsigned A_BITS     = 3;    // alpha shift count width

  // Commands on the 3-bit control bus, common to all elements.
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,  // hold
    CMD_CLR    = 3'd1,  // clear the address counter
    CMD_DIST   = 3'd2,  // accumulate |x - w[cnt]|, cnt++ (loads at cnt == 0)
    CMD_SEARCH = 3'd3,  // decrement distance, winners pull row/col lines
    CMD_ALPHA  = 3'd4,  // addressed elements load alpha (or mask) from data
    CMD_ADAPT  = 3'd5,  // w[cnt] += (x - w[cnt]) >>> alpha, cnt++
    CMD_WRITE  = 3'd6,  // addressed element writes data to w[cnt], cnt++
    CMD_READ   = 3'd7   // addressed element drives w[cnt] on data, cnt++
  } pe_cmd_e;

  // Data byte of CMD_ALPHA: bit 7 set marks the element as faulty (masked).
  localparam int unsigned ALPHA_MASK_BIT = 7;

  // Jobs the VME side can start on the NBISOM controller.
  typedef enum logic [2:0] {
    OP_NONE   = 3'd0,
    OP_RECALL = 3'd1,  // best match of each vector, no adaptation
    OP_LEARN  = 3'd2,  // best match, alpha distribution, adaptation
    OP_WRITE  = 3'd3,  // write weight vectors to addressed elements
    OP_READ   = 3'd4,  // read weight vectors of addressed elements
    OP_MASK   = 3'd5   // fade out the addressed (faulty) elements
  } ctrl_op_e;

  // Dual-port SRAM layout (byte addresses).
  localparam int unsigned DP_NVEC    = 'h000; // number of input vectors
  localparam int unsigned DP_VLEN    = 'h001; // components per vector (1..64)
  localparam int unsigned DP_NSTEPS  = 'h002; // neighbourhood steps (0..8)
  localparam int unsigned DP_STEPS   = 'h010; // per step: alpha shift, radius
  localparam int unsigned DP_NADDR   = 'h040; // number of addressed elements
  localparam int unsigned DP_ADDRS   = 'h042; // per element: row, column
  localparam int unsigned DP_RESULT  = 'h100; // per vector: best row, column
  localparam int unsigned DP_DATA    = 'h400; // vectors / weight vectors, 64 B each
  localparam logic [7:0]  NO_MATCH   = 8'hFF; // position when no element answers

endpackage
