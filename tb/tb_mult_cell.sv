// tb_mult_cell - exhaustive check of one multiplier cell.
//
// For both cell kinds (with an A register, and the constant-0 cell) and both
// modes, every input combination is applied and the registered outputs one
// clock later are compared with the full-adder equations (normal mode) or the
// bijective test-mode function (x, s, c) -> (x, s ^ c, c), worked out here
// with integer arithmetic. The A register's load and its reset are checked too.
module tb_mult_cell;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic test, load_a, r_in, x_i, s_i, c_i;
  logic xo1, so1, co1, xo0, so0, co0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_cell #(.HAS_A(1'b1)) dut1 (.clk, .rst_n, .test, .load_a, .r_in, .x_i, .s_i, .c_i,
                                  .x_o(xo1), .s_o(so1), .c_o(co1));
  mult_cell #(.HAS_A(1'b0)) dut0 (.clk, .rst_n, .test, .load_a, .r_in, .x_i, .s_i, .c_i,
                                  .x_o(xo0), .s_o(so0), .c_o(co0));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (test=%0b x=%0b s=%0b c=%0b)",
               what, got, exp, test, x_i, s_i, c_i);
    end
  endtask

  task automatic sweep(input int a_val);
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 8; v++) begin
        int tot;
        test = m[0]; x_i = v[2]; s_i = v[1]; c_i = v[0];
        @(posedge clk); #1;
        // cell with A register
        tot = int'(s_i) + int'(c_i) + ((m == 0) ? a_val * int'(x_i) : 0);
        check("x_o", xo1, x_i);
        check("s_o", so1, tot[0]);
        check("c_o", co1, (m == 0) ? tot[1] : c_i);
        // constant-0 cell
        tot = int'(s_i) + int'(c_i);
        check("x_o0", xo0, x_i);
        check("s_o0", so0, tot[0]);
        check("c_o0", co0, (m == 0) ? tot[1] : c_i);
      end
    end
  endtask

  initial begin
    test = 0; load_a = 0; r_in = 1; x_i = 0; s_i = 0; c_i = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // After reset A = 0: x must not enter the sum.
    sweep(0);
    // Load A = 1.
    load_a = 1; r_in = 1; @(posedge clk); #1 load_a = 0; r_in = 0;
    sweep(1);
    // A holds while load_a is low (r_in is 0 now).
    sweep(1);
    // Load A = 0 again.
    load_a = 1; @(posedge clk); #1 load_a = 0;
    sweep(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
