// tb_fault_coverage - single-cell fault grading of the self-test at the
// default 4 x 3 size.
//
// For every one of the 28 cells, every registered output (x_o, s_o, c_o) and
// four fault kinds - stuck-at-0, stuck-at-1, slow-to-rise and slow-to-fall (a
// rising or falling change arrives one clock late, a two-pattern fault) - the
// fault is forced onto the cell output and a complete self-test is run: 336
// sessions. The testbench checks that the fault-free array passes before and
// after the sweep and compares each session's pass/fail with the expected
// outcome of a separate behavioural model of the test-mode array: every fault
// on x_o and c_o is caught; on s_o the check-sum analyzers alias for stuck-at
// faults in cells (0..6, 2) and (6, 0) and for delay faults in cells (1, 2),
// (3, 2) and (5, 2), where the wrong summand only reaches the observed outputs
// through an XOR with an evenly balanced carry stream. In total 314 of 336
// faults are detected.
module tb_fault_coverage;
  localparam int ROWS = 7, COLS = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load_r = 1'b0;
  logic [2:0] r = 3'd6;
  logic [3:0] x = '0;
  logic [6:0] p;
  logic bist_start = 1'b0;
  logic bist_busy, bist_done, bist_pass, bist_phase2;
  int checks = 0, failures = 0;
  int detected = 0, total = 0;

  // Fault selection, visible to the per-cell injectors.
  int sel_i = -1, sel_j = -1, sel_sig = 0, sel_kind = 0;
  bit armed = 1'b0;

  always #5 clk = ~clk;

  bist_multiplier_top dut (.clk, .rst_n, .load_r, .r, .x, .p, .bist_start, .bist_busy,
                           .bist_done, .bist_pass, .bist_phase2);

  for (genvar I = 0; I < ROWS; I++) begin : g_fi
    for (genvar J = 0; J < COLS; J++) begin : g_fj
      logic fv = 1'b0, fv_next = 1'b0, tprev = 1'b0;
      // Faulty value of the selected output for the next clock.
      always @(negedge clk) begin
        logic nxt;
        case (sel_sig)
          0:       nxt = dut.u_array.g_row[I].g_col[J].u_cell.x_i;
          1:       nxt = dut.u_array.g_row[I].g_col[J].u_cell.sum;
          default: nxt = dut.u_array.g_row[I].g_col[J].u_cell.carry;
        endcase
        case (sel_kind)
          0:       fv_next = 1'b0;           // stuck-at-0
          1:       fv_next = 1'b1;           // stuck-at-1
          2:       fv_next = nxt & tprev;    // slow-to-rise
          default: fv_next = nxt | tprev;    // slow-to-fall
        endcase
        tprev = nxt;
      end
      always @(posedge clk) #1 fv = fv_next;

      initial forever begin
        wait (armed && sel_i == I && sel_j == J);
        case (sel_sig)
          0:       force dut.u_array.g_row[I].g_col[J].u_cell.x_o = fv;
          1:       force dut.u_array.g_row[I].g_col[J].u_cell.s_o = fv;
          default: force dut.u_array.g_row[I].g_col[J].u_cell.c_o = fv;
        endcase
        wait (!armed);
        case (sel_sig)
          0:       release dut.u_array.g_row[I].g_col[J].u_cell.x_o;
          1:       release dut.u_array.g_row[I].g_col[J].u_cell.s_o;
          default: release dut.u_array.g_row[I].g_col[J].u_cell.c_o;
        endcase
      end
    end
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_bist(output bit passed);
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    while (!bist_done) @(negedge clk);
    passed = bist_pass;
  endtask

  // Expected outcome from the behavioural model (see header).
  function automatic bit expect_detect(input int i, input int j, input int sig, input int kind);
    if (sig != 1) return 1'b1;
    if (kind <= 1) return !((j == 2) || (i == 6 && j == 0));
    return !(j == 2 && (i == 1 || i == 3 || i == 5));
  endfunction

  initial begin
    bit ok;
    string names [3] = '{"x_o", "s_o", "c_o"};
    string kinds [4] = '{"stuck-at-0", "stuck-at-1", "slow-to-rise", "slow-to-fall"};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk) load_r = 1'b1;
    @(negedge clk) load_r = 1'b0;
    run_bist(ok);
    chk("fault-free self-test passes", int'(ok), 1);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        for (int sig = 0; sig < 3; sig++)
          for (int kind = 0; kind < 4; kind++) begin
            sel_i = i; sel_j = j; sel_sig = sig; sel_kind = kind;
            @(negedge clk);
            @(negedge clk) armed = 1'b1;
            run_bist(ok);
            armed = 1'b0;
            @(negedge clk);
            total++;
            if (!ok) detected++;
            chk($sformatf("cell (%0d,%0d) %s %s detected", i, j, names[sig], kinds[kind]),
                int'(!ok), int'(expect_detect(i, j, sig, kind)));
          end
    sel_i = -1;
    run_bist(ok);
    chk("fault-free self-test passes after the sweep", int'(ok), 1);
    $display("faults detected: %0d of %0d", detected, total);
    chk("faults detected", detected, 314);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
