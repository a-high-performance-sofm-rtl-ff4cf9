// nb25_vme: the NB25-VME board, a VME-bus accelerator for self-organizing
// feature maps with 400 neurons (a 20 x 20 map) of 64 8-bit weights each.
//
// Four blocks, wired as in the paper's board diagram: the VME-bus controller
// (vme_ctrl) gives the host access to the dual-port SRAM (dp_sram, port A)
// and starts jobs on the NBISOM controller (nbisom_ctrl), which reads input
// vectors and parameters through port B, sequences the 4 x 4 array of
// NBISOM_25 chips (nbisom_array) and writes best-match positions or read
// weights back into the SRAM; when a job ends the VME controller raises an
// interrupt. All blocks run on the single board clock (16 MHz in the paper).
//
// Use: write the parameter field, the address field and the vectors into the
// SRAM window, write the job opcode with bit 7 set to offset 0x8000, wait for
// vme_irq_n, read the results, and clear the interrupt by writing 0x8001.
// The SRAM layout is given in sofm_pkg. The board structure (two controllers,
// dual-port SRAM, 4 x 4 chips) follows the paper; the VME register map, the
// SRAM layout and the job protocol are this design's own.
module nb25_vme
  import sofm_pkg::*;
#(
  parameter int unsigned CHIP_ROWS = 4,
  parameter int unsigned CHIP_COLS = 4,
  parameter int unsigned ROWS      = 5,
  parameter int unsigned COLS      = 5,
  parameter int unsigned AW        = 13,
  parameter logic [7:0]  BASE      = 8'h40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] vme_addr,
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [7:0]  vme_din,
  output logic [7:0]  vme_dout,
  output logic        vme_dout_oe,
  output logic        vme_dtack_n,
  output logic        vme_irq_n
);

  localparam int unsigned MAP_ROWS = CHIP_ROWS * ROWS;
  localparam int unsigned MAP_COLS = CHIP_COLS * COLS;

  logic          a_en, a_we;
  logic [AW-1:0] a_addr;
  logic [7:0]    a_wdata, a_rdata;
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [7:0]    b_wdata, b_rdata;
  logic          start, busy, done;
  ctrl_op_e      op;
  pe_cmd_e       cmd;
  logic [W_BITS-1:0]   arr_data, arr_rdata;
  logic                arr_rdata_oe;
  logic [MAP_ROWS-1:0] row_drive, row_line;
  logic [MAP_COLS-1:0] col_drive, col_line;

  vme_ctrl #(.BASE(BASE), .AW(AW)) u_vme (
    .clk, .rst_n, .vme_addr, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_din,
    .vme_dout, .vme_dout_oe, .vme_dtack_n, .vme_irq_n,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .start, .op, .busy, .done
  );

  dp_sram #(.AW(AW), .DW(8)) u_sram (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  nbisom_ctrl #(.MAP_ROWS(MAP_ROWS), .MAP_COLS(MAP_COLS), .AW(AW)) u_ctrl (
    .clk, .rst_n, .start, .op, .busy, .done,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .cmd, .arr_data, .arr_rdata, .arr_rdata_oe,
    .row_drive, .col_drive, .row_line, .col_line
  );

  nbisom_array #(.CHIP_ROWS(CHIP_ROWS), .CHIP_COLS(CHIP_COLS),
                 .ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .cmd, .data_in(arr_data),
    .data_out(arr_rdata), .data_oe(arr_rdata_oe),
    .row_drive, .col_drive, .row_line, .col_line
  );

endmodule
