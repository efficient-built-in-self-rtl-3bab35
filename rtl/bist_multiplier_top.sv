// bist_multiplier_top - pipelined NX x NR array multiplier with built-in
// self-test for sequential (two-pattern) faults.
//
// Normal mode: load_r stores the multiplier r in the cells' A registers; then
// one multiplicand x per clock may be applied and its product p = x * r
// appears LATENCY = NX + NR + NX - 1 clocks later (10 for 4 x 3). Input skew
// registers delay x_j by j clocks and output deskew registers delay product bit
// i by ROWS - 1 - i clocks, so x and p are plain parallel words.
//
// Self-test: a pulse on bist_start runs one session. The test controller
// switches the array into test mode, the SIC component generator drives cell
// (0, 0), the boundary multiplexers of the array pass the sequence on along the
// 45-degree lines, and one check-sum analyzer per observed output word (the
// summand of each rightmost-column cell, the {x, c} word of each bottom-row
// cell) accumulates the responses. When bist_done rises, bist_pass tells
// whether every sum equals its fault-free value, which bist_pkg::golden_sum
// computes at elaboration time. A session takes 1 + GEN_CYCLES + LATENCY
// clocks (203 by default); the A registers keep r, so normal operation
// resumes afterwards without reloading. The session sequencing and the
// signature comparison are this implementation's; the parts (generator,
// routing multiplexers, analyzers, mode switch) follow the design.
module bist_multiplier_top
  import bist_pkg::*;
#(
  parameter int unsigned NX = NX_DEF,
  parameter int unsigned NR = NR_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_r,
  input  logic [NR-1:0]    r,
  input  logic [NX-1:0]    x,
  output logic [NX+NR-1:0] p,
  input  logic             bist_start,
  output logic             bist_busy,
  output logic             bist_done,
  output logic             bist_pass,
  output logic             bist_phase2
);

  localparam int unsigned ROWS    = NX + NR;
  localparam int unsigned COLS    = NX;
  localparam int unsigned LATENCY = ROWS + COLS - 1;

  logic            test_mode, clear, gen_en, gen_last;
  logic [LATENCY:0] win;
  cell_word_t      tpat;
  logic [COLS-1:0] x_top, x_bottom, c_bottom;
  logic [ROWS-1:0] s_right;

  // ---------------------------------------------------------------- skew
  assign x_top[0] = x[0];
  for (genvar j = 1; j < COLS; j++) begin : g_skew
    logic sr [j];
    always_ff @(posedge clk) begin
      sr[0] <= x[j];
      for (int k = 1; k < j; k++) sr[k] <= sr[k-1];
    end
    assign x_top[j] = sr[j-1];
  end

  // ---------------------------------------------------------------- array
  mult_array #(.NX(NX), .NR(NR)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .test     (test_mode),
    .load_r   (load_r),
    .r        (r),
    .x_top    (x_top),
    .tpat     (tpat),
    .s_right  (s_right),
    .x_bottom (x_bottom),
    .c_bottom (c_bottom)
  );

  // ---------------------------------------------------------------- deskew
  assign p[ROWS-1] = s_right[ROWS-1];
  for (genvar i = 0; i < ROWS - 1; i++) begin : g_deskew
    localparam int unsigned D = ROWS - 1 - i;
    logic sr [D];
    always_ff @(posedge clk) begin
      sr[0] <= s_right[i];
      for (int k = 1; k < int'(D); k++) sr[k] <= sr[k-1];
    end
    assign p[i] = sr[D-1];
  end

  // ---------------------------------------------------------------- BIST
  siccg u_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .en       (gen_en),
    .pattern  (tpat),
    .bist_clk (),
    .phase2   (bist_phase2),
    .last     (gen_last)
  );

  bist_controller #(.DEPTH(LATENCY)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (bist_start),
    .gen_last  (gen_last),
    .test_mode (test_mode),
    .clear     (clear),
    .gen_en    (gen_en),
    .win       (win),
    .busy      (bist_busy),
    .done      (bist_done)
  );

  logic [ROWS-1:0] ok_r;
  logic [COLS-1:0] ok_b;

  // Rightmost column: cell (i, COLS-1) lies on 45-degree line i + COLS - 1.
  for (genvar i = 0; i < ROWS; i++) begin : g_ora_r
    localparam int unsigned LINE = i + COLS - 1;
    localparam logic [ACC_W-1:0] GOLD = golden_sum(LINE, 1'b0);
    logic [ACC_W-1:0] acc;
    ora_checksum #(.IN_W(1), .ACC_W(ACC_W)) u_ora (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .en    (win[LINE+1]),
      .din   (s_right[i]),
      .acc   (acc)
    );
    assign ok_r[i] = (acc == GOLD);
  end

  // Bottom row: cell (ROWS-1, j) lies on 45-degree line ROWS - 1 + j.
  for (genvar j = 0; j < COLS; j++) begin : g_ora_b
    localparam int unsigned LINE = ROWS - 1 + j;
    localparam logic [ACC_W-1:0] GOLD = golden_sum(LINE, 1'b1);
    logic [ACC_W-1:0] acc;
    ora_checksum #(.IN_W(2), .ACC_W(ACC_W)) u_ora (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .en    (win[LINE+1]),
      .din   ({x_bottom[j], c_bottom[j]}),
      .acc   (acc)
    );
    assign ok_b[j] = (acc == GOLD);
  end

  assign bist_pass = bist_done & (&ok_r) & (&ok_b);

endmodule
