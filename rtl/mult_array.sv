// mult_array - the pipelined NX x NR array multiplier as a two-dimensional
// iterative logic array (ILA), with the test-mode routing multiplexers.
//
// Geometry: ROWS = NX + NR rows, one per product bit weight, and COLS = NX
// columns, one per multiplicand bit. Column j carries x_j downward; the carry
// also moves down (to the next weight), the summand s moves right along its
// row (same weight). Cell (i, j) holds multiplier bit r[i-j] in its A register
// when 0 <= i-j < NR and a constant 0 otherwise, so row i sums every partial
// product r[a] x[b] with a + b = i. Product bit i leaves the rightmost column of
// row i; the carries leaving the bottom row are 0 for every operand pair.
//
// Cells are registered, so cell (i, j) handles a given operand i + j clocks
// after cell (0, 0): x_top[j] must be presented j clocks late and product bit i
// appears i + COLS clocks after x_top[0] (skew and deskew live in the top).
//
// Test mode: the boundary multiplexers feed cell (0, 0) with the generator
// pattern tpat, give each other top-row cell the vertical outputs of its left
// neighbour, and each other left-column cell the horizontal output of the cell
// above. Every cell on a 45-degree line (same i + j) then sees the same input
// sequence, the generator sequence mapped through the bijective test-mode cell
// function once per line. Which boundary inputs are multiplexed follows the
// design's test tessellation; the ports and the orientation are this
// implementation's choice.
module mult_array
  import bist_pkg::*;
#(
  parameter int unsigned NX   = NX_DEF,
  parameter int unsigned NR   = NR_DEF,
  parameter int unsigned ROWS = NX + NR,
  parameter int unsigned COLS = NX
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            test,           // 1: test mode, 0: normal mode
  input  logic            load_r,         // load r into the A registers
  input  logic [NR-1:0]   r,              // multiplier
  input  logic [COLS-1:0] x_top,          // skewed multiplicand bits, column j
  input  cell_word_t      tpat,           // generator pattern for cell (0, 0)
  output logic [ROWS-1:0] s_right,        // s_o of the rightmost column, row i
  output logic [COLS-1:0] x_bottom,       // x_o of the bottom row, column j
  output logic [COLS-1:0] c_bottom        // c_o of the bottom row, column j
);

  logic xo [ROWS][COLS];
  logic so [ROWS][COLS];
  logic co [ROWS][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      localparam int IDX   = i - j;
      localparam bit HAS_A = (IDX >= 0) && (IDX < int'(NR));
      logic x_in, s_in, c_in, r_bit;

      // Vertical inputs: multiplicand and carry.
      if (i == 0 && j == 0) begin : g_vin_corner
        assign x_in = test ? tpat.x : x_top[0];
        assign c_in = test ? tpat.c : 1'b0;
      end else if (i == 0) begin : g_vin_top
        assign x_in = test ? xo[0][j-1] : x_top[j];
        assign c_in = test ? co[0][j-1] : 1'b0;
      end else begin : g_vin_inner
        assign x_in = xo[i-1][j];
        assign c_in = co[i-1][j];
      end

      // Horizontal input: summand.
      if (i == 0 && j == 0) begin : g_hin_corner
        assign s_in = test ? tpat.s : 1'b0;
      end else if (j == 0) begin : g_hin_left
        assign s_in = test ? so[i-1][0] : 1'b0;
      end else begin : g_hin_inner
        assign s_in = so[i][j-1];
      end

      if (HAS_A) begin : g_rbit
        assign r_bit = r[IDX];
      end else begin : g_nobit
        assign r_bit = 1'b0;
      end

      mult_cell #(.HAS_A(HAS_A)) u_cell (
        .clk    (clk),
        .rst_n  (rst_n),
        .test   (test),
        .load_a (load_r),
        .r_in   (r_bit),
        .x_i    (x_in),
        .s_i    (s_in),
        .c_i    (c_in),
        .x_o    (xo[i][j]),
        .s_o    (so[i][j]),
        .c_o    (co[i][j])
      );
    end
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_out_r
    assign s_right[i] = so[i][COLS-1];
  end
  for (genvar j = 0; j < COLS; j++) begin : g_out_b
    assign x_bottom[j] = xo[ROWS-1][j];
    assign c_bottom[j] = co[ROWS-1][j];
  end

endmodule
