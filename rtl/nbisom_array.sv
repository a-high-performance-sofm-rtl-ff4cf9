// nbisom_array: the board's CHIP_ROWS x CHIP_COLS array of NBISOM_25 chips
// (4 x 4 in the paper), forming one map of MAP_ROWS x MAP_COLS elements
// (20 x 20).
//
// On the board the row pins of all chips in one chip row are tied to the same
// board row lines, and likewise for the columns, giving 20 row and 20 column
// open-drain lines that the controller both drives (to address elements) and
// senses (to find the best match). Here a line is the wired OR of the
// controller's drive and every chip's pull, active high: board row line
// cr*ROWS + r is chip row cr's row pin r. Control and data buses are common
// to all chips; the read data of the one addressed element is ORed onto the
// shared bus. The wiring follows the paper's board diagram.
module nbisom_array
  import sofm_pkg::*;
#(
  parameter int unsigned CHIP_ROWS = 4,
  parameter int unsigned CHIP_COLS = 4,
  parameter int unsigned ROWS      = 5,
  parameter int unsigned COLS      = 5,
  parameter int unsigned NW        = N_WEIGHTS,
  localparam int unsigned MAP_ROWS = CHIP_ROWS * ROWS,
  localparam int unsigned MAP_COLS = CHIP_COLS * COLS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_cmd_e             cmd,
  input  logic [W_BITS-1:0]   data_in,
  output logic [W_BITS-1:0]   data_out,
  output logic                data_oe,
  input  logic [MAP_ROWS-1:0] row_drive,   // controller asserts row lines
  input  logic [MAP_COLS-1:0] col_drive,   // controller asserts column lines
  output logic [MAP_ROWS-1:0] row_line,    // wired state of the row lines
  output logic [MAP_COLS-1:0] col_line     // wired state of the column lines
);

  logic [W_BITS-1:0] chip_dout [CHIP_ROWS][CHIP_COLS];
  logic              chip_oe   [CHIP_ROWS][CHIP_COLS];
  logic [ROWS-1:0]   chip_rpull[CHIP_ROWS][CHIP_COLS];
  logic [COLS-1:0]   chip_cpull[CHIP_ROWS][CHIP_COLS];

  for (genvar cr = 0; cr < CHIP_ROWS; cr++) begin : g_crow
    for (genvar cc = 0; cc < CHIP_COLS; cc++) begin : g_ccol
      nbisom25 #(.ROWS(ROWS), .COLS(COLS), .NW(NW)) u_chip (
        .clk, .rst_n, .cmd, .data_in,
        .data_out(chip_dout[cr][cc]), .data_oe(chip_oe[cr][cc]),
        .row_in(row_line[cr*ROWS +: ROWS]), .col_in(col_line[cc*COLS +: COLS]),
        .row_pull(chip_rpull[cr][cc]), .col_pull(chip_cpull[cr][cc])
      );
    end
  end

  always_comb begin
    data_out = '0;
    data_oe  = 1'b0;
    row_line = row_drive;
    col_line = col_drive;
    for (int cr = 0; cr < CHIP_ROWS; cr++) begin
      for (int cc = 0; cc < CHIP_COLS; cc++) begin
        data_out |= chip_dout[cr][cc];
        data_oe  |= chip_oe[cr][cc];
        row_line[cr*ROWS +: ROWS] |= chip_rpull[cr][cc];
        col_line[cc*COLS +: COLS] |= chip_cpull[cr][cc];
      end
    end
  end

endmodule
