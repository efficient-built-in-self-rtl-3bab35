// tb_bist_multiplier_top - end-to-end test of the self-testable 4 x 3 array
// multiplier at its default size.
//
// 1. Normal mode: every multiplier value is loaded and a stream of random
//    multiplicands (one per clock) is checked against x * r after exactly 10
//    clocks.
// 2. Self-test on the fault-free array: must pass, must spend 203 clocks in
//    test mode and show both generator phases. Meanwhile a monitor on the
//    inputs of all 28 cells records consecutive input pairs: every cell must
//    receive all 24 ordered single-input-change pairs of its 3-bit input.
// 3. Normal mode right after the test, without reloading r.
// 4. A stuck-at-0 carry output in one inner cell: the self-test must fail.
// 5. A slow-to-fall summand output in another cell (a falling transition
//    arrives one clock late; a sequential fault that only a two-pattern test
//    sees): the self-test must fail.
// 6. Faults removed: the self-test passes again.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_bist_multiplier_top;
  localparam int NX = 4, NR = 3, ROWS = 7, COLS = 4, LAT = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load_r = 1'b0;
  logic [NR-1:0] r = '0;
  logic [NX-1:0] x = '0;
  logic [NX+NR-1:0] p;
  logic bist_start = 1'b0;
  logic bist_busy, bist_done, bist_pass, bist_phase2;
  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_products = 0, n_loads = 0, n_sessions = 0, n_phase1 = 0, n_phase2 = 0;
  int n_pass = 0, n_stuck_detected = 0, n_delay_detected = 0, n_after_test = 0;
  int n_cells_covered = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bist_multiplier_top dut (.clk, .rst_n, .load_r, .r, .x, .p, .bist_start, .bist_busy,
                           .bist_done, .bist_pass, .bist_phase2);

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // ------------------------------------------------------------------ normal
  task automatic load(input logic [NR-1:0] rv);
    @(negedge clk) begin r = rv; load_r = 1'b1; end
    @(negedge clk) load_r = 1'b0;
    n_loads++;
  endtask

  task automatic stream(input int n, input logic [NR-1:0] rv, input bit after_test);
    logic [NX-1:0] q [$];
    for (int t = 0; t < n + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        logic [NX-1:0] xv = q.pop_front();
        chk($sformatf("p = %0d * %0d", xv, rv), int'(p), int'(xv) * int'(rv));
        n_products++;
        if (after_test) n_after_test++;
      end
      x = (t < n) ? NX'($urandom) : '0;
      q.push_back(x);
    end
  endtask

  // --------------------------------------------------------------- self-test
  task automatic run_bist(output bit passed);
    int busy_cycles = 0;
    bit saw_p1 = 0, saw_p2 = 0;
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    while (!bist_done) begin
      if (bist_busy) busy_cycles++;
      if (bist_busy && !bist_phase2) saw_p1 = 1;
      if (bist_busy && bist_phase2) saw_p2 = 1;
      @(negedge clk);
    end
    chk("clocks in test mode", busy_cycles, 203);
    n_sessions++;
    if (saw_p1) n_phase1++;
    if (saw_p2) n_phase2++;
    passed = bist_pass;
  endtask

  // ------------------------------------------- per-cell SIC pair coverage
  bit monitor_on = 0;
  for (genvar I = 0; I < ROWS; I++) begin : g_mi
    for (genvar J = 0; J < COLS; J++) begin : g_mj
      logic [2:0] prv;
      bit seen [8][8];
      always @(negedge clk) begin
        logic [2:0] cur;
        cur = {dut.u_array.g_row[I].g_col[J].x_in, dut.u_array.g_row[I].g_col[J].s_in,
               dut.u_array.g_row[I].g_col[J].c_in};
        if (monitor_on) seen[prv][cur] = 1'b1;
        prv = cur;
      end
      function automatic int n_sic();
        int n = 0;
        for (int a = 0; a < 8; a++)
          for (int k = 0; k < 3; k++)
            if (seen[a][a ^ (1 << k)]) n++;
        return n;
      endfunction
    end
  end

  // ------------------------------------------------------------ fault models
  // Slow-to-fall on s_o of cell (2, 2): a 1 -> 0 change of the fault-free
  // output arrives one clock late, so the faulty output is the OR of the
  // fault-free output in this clock and the previous one.
  logic f_val = 1'b0, f_next = 1'b0, t_prev = 1'b0;
  bit delay_fault_on = 0;
  always @(negedge clk) begin
    logic nxt;
    nxt    = dut.u_array.g_row[2].g_col[2].u_cell.sum;
    f_next = delay_fault_on ? (nxt | t_prev) : nxt;
    t_prev = nxt;
  end
  always @(posedge clk) begin
    #1 f_val = f_next;
  end

  initial begin
    bit ok;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. normal mode
    for (int rv = 0; rv < 8; rv++) begin
      load(NR'(rv));
      stream(40, NR'(rv), 0);
    end

    // 2. fault-free self-test with r = 5 loaded
    load(3'd5);
    monitor_on = 1;
    run_bist(ok);
    monitor_on = 0;
    chk("fault-free self-test passes", int'(ok), 1);
    if (ok) n_pass++;
    if (g_mi[0].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[0].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[0].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[0].g_mj[3].n_sic() == 24) n_cells_covered++;
    if (g_mi[1].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[1].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[1].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[1].g_mj[3].n_sic() == 24) n_cells_covered++;
    if (g_mi[2].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[2].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[2].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[2].g_mj[3].n_sic() == 24) n_cells_covered++;
    if (g_mi[3].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[3].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[3].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[3].g_mj[3].n_sic() == 24) n_cells_covered++;
    if (g_mi[4].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[4].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[4].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[4].g_mj[3].n_sic() == 24) n_cells_covered++;
    if (g_mi[5].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[5].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[5].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[5].g_mj[3].n_sic() == 24) n_cells_covered++;
    if (g_mi[6].g_mj[0].n_sic() == 24) n_cells_covered++;
    if (g_mi[6].g_mj[1].n_sic() == 24) n_cells_covered++;
    if (g_mi[6].g_mj[2].n_sic() == 24) n_cells_covered++;
    if (g_mi[6].g_mj[3].n_sic() == 24) n_cells_covered++;
    chk("cells that received all 24 SIC pairs", n_cells_covered, ROWS * COLS);

    // 3. normal mode after the test, r still 5
    stream(40, 3'd5, 1);

    // 4. stuck-at-0 on c_o of cell (3, 1)
    force dut.u_array.g_row[3].g_col[1].u_cell.c_o = 1'b0;
    run_bist(ok);
    release dut.u_array.g_row[3].g_col[1].u_cell.c_o;
    chk("stuck-at fault detected", int'(!ok), 1);
    if (!ok) n_stuck_detected++;

    // 5. slow-to-fall on s_o of cell (2, 2)
    delay_fault_on = 1;
    @(posedge clk);
    force dut.u_array.g_row[2].g_col[2].u_cell.s_o = f_val;
    run_bist(ok);
    release dut.u_array.g_row[2].g_col[2].u_cell.s_o;
    delay_fault_on = 0;
    chk("delay fault detected", int'(!ok), 1);
    if (!ok) n_delay_detected++;

    // 6. fault-free again
    run_bist(ok);
    chk("self-test passes after faults removed", int'(ok), 1);
    if (ok) n_pass++;
    stream(20, 3'd5, 1);

    $display("mechanisms: products=%0d r_loads=%0d sessions=%0d phase1=%0d phase2=%0d pass=%0d stuck_detected=%0d delay_detected=%0d normal_after_test=%0d cells_covered=%0d",
             n_products, n_loads, n_sessions, n_phase1, n_phase2, n_pass, n_stuck_detected,
             n_delay_detected, n_after_test, n_cells_covered);
    chk("mechanism: products", n_products > 0, 1);
    chk("mechanism: r loads", n_loads > 0, 1);
    chk("mechanism: phase 1", n_phase1 > 0, 1);
    chk("mechanism: phase 2", n_phase2 > 0, 1);
    chk("mechanism: pass", n_pass > 0, 1);
    chk("mechanism: stuck-at detected", n_stuck_detected > 0, 1);
    chk("mechanism: delay fault detected", n_delay_detected > 0, 1);
    chk("mechanism: normal mode after test", n_after_test > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
