// tb_mult_array - checks the 7 x 4 multiplier array in both modes.
//
// Normal mode: a multiplier r is loaded, then a new random multiplicand enters
// every clock, skewed by the testbench (column j gets its bit j clocks late).
// Product bit i must leave the rightmost column exactly i + COLS clocks after
// the operand entered column 0, and the bottom-row carries must stay 0.
// Test mode: random patterns drive cell (0, 0). A cell on 45-degree line d
// then outputs, d + 1 clocks later, the pattern mapped d + 1 times by the
// test-mode cell function (x, s, c) -> (x, s ^ c, c), whatever r holds; the
// rightmost-column summands and the bottom-row {x, c} words are compared with
// that model. Checks start once the pipeline holds only data of the current
// mode.
module tb_mult_array
  import bist_pkg::*;
;
  localparam int NX = 4, NR = 3, ROWS = 7, COLS = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic test = 1'b0, load_r = 1'b0;
  logic [NR-1:0] r = '0;
  logic [COLS-1:0] x_top;
  cell_word_t tpat;
  logic [ROWS-1:0] s_right;
  logic [COLS-1:0] x_bottom, c_bottom;
  int checks = 0, failures = 0;
  logic [NX-1:0] xs [2048];
  logic [2:0]    tp [2048];
  int cyc = 0;
  int mode_start = 0;
  int n_mul = 0, n_test = 0;

  always #5 clk = ~clk;

  mult_array #(.NX(NX), .NR(NR)) dut (.clk, .rst_n, .test, .load_r, .r, .x_top, .tpat,
                                      .s_right, .x_bottom, .c_bottom);

  function automatic logic [2:0] tf(input logic [2:0] v, input int n);
    logic [2:0] w = v;
    for (int k = 0; k < n; k++) w = {w[2], w[1] ^ w[0], w[0]};
    return w;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // Drive inputs for cycle cyc and check outputs visible in it.
  task automatic step();
    xs[cyc] = NX'($urandom);
    tp[cyc] = 3'($urandom);
    for (int j = 0; j < COLS; j++) x_top[j] = (cyc - j >= 0) ? xs[cyc - j][j] : 1'b0;
    tpat = tp[cyc];
    if (cyc - mode_start >= ROWS + COLS + 1) begin
      if (!test) begin
        for (int i = 0; i < ROWS; i++) begin
          int prod = int'(xs[cyc - i - COLS]) * int'(r);
          chk($sformatf("p[%0d]", i), int'(s_right[i]), (prod >> i) & 1);
        end
        chk("bottom carries", int'(c_bottom), 0);
        n_mul++;
      end else begin
        for (int i = 0; i < ROWS; i++) begin
          logic [2:0] w = tf(tp[cyc - i - COLS], i + COLS);
          chk($sformatf("test s_right[%0d]", i), int'(s_right[i]), int'(w[1]));
        end
        for (int j = 0; j < COLS; j++) begin
          logic [2:0] w = tf(tp[cyc - ROWS - j], ROWS + j);
          chk($sformatf("test x_bottom[%0d]", j), int'(x_bottom[j]), int'(w[2]));
          chk($sformatf("test c_bottom[%0d]", j), int'(c_bottom[j]), int'(w[0]));
        end
        n_test++;
      end
    end
    @(posedge clk);
    #1 cyc++;
  endtask

  initial begin
    x_top = '0; tpat = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rv = 0; rv < 8; rv++) begin
      r = NR'(rv); load_r = 1'b1;
      @(posedge clk); #1 load_r = 1'b0;
      test = 1'b0; mode_start = cyc;
      repeat (60) step();
      test = 1'b1; mode_start = cyc;
      repeat (40) step();
    end
    chk("normal-mode cycles checked", n_mul > 300 ? 1 : 0, 1);
    chk("test-mode cycles checked", n_test > 200 ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
