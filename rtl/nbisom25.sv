// nbisom25: the NBISOM_25 chip, a ROWS x COLS array of processing elements
// (5 x 5 in the paper) sharing one control bus and one 8-bit data bus.
//
// Every element obeys the same command in the same cycle (SIMD). Element
// (r, c) senses row line r and column line c; the chip asserts row line r
// when any element of row r pulls, and column line c when any element of
// column c pulls. On the chip the lines are open-drain I/O pins; here each
// pin is split into the sensed line state (row_in/col_in, the wired value on
// the board) and the chip's own pull-down request (row_pull/col_pull), both
// active high. The data bus pin is split likewise: data_in from the
// controller, data_out/data_oe from the one addressed element in CMD_READ
// (outputs of unaddressed elements are zero, so they are ORed).
//
// Pin count as in the paper: 8 data, 3 control, clock, 5 row, 5 column lines.
// The single clock replacing the two non-overlapping clocks is this design's.
module nbisom25
  import sofm_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5,
  parameter int unsigned NW   = N_WEIGHTS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cmd_e           cmd,
  input  logic [W_BITS-1:0] data_in,
  output logic [W_BITS-1:0] data_out,
  output logic              data_oe,
  input  logic [ROWS-1:0]   row_in,
  input  logic [COLS-1:0]   col_in,
  output logic [ROWS-1:0]   row_pull,
  output logic [COLS-1:0]   col_pull
);

  logic [W_BITS-1:0] pe_dout [ROWS][COLS];
  logic              pe_oe   [ROWS][COLS];
  logic              pe_pull [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      sofm_pe #(.NW(NW)) u_pe (
        .clk, .rst_n, .cmd, .data_in,
        .data_out(pe_dout[r][c]), .data_oe(pe_oe[r][c]),
        .row_line(row_in[r]), .col_line(col_in[c]), .pull(pe_pull[r][c])
      );
    end
  end

  always_comb begin
    data_out = '0;
    data_oe  = 1'b0;
    row_pull = '0;
    col_pull = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        data_out    |= pe_dout[r][c];
        data_oe     |= pe_oe[r][c];
        row_pull[r] |= pe_pull[r][c];
        col_pull[c] |= pe_pull[r][c];
      end
    end
  end

endmodule
