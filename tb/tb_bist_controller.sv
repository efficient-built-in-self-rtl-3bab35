// tb_bist_controller - checks the test controller's sequence and timing.
//
// A stand-in for the generator raises gen_last in the RUNLEN-th cycle of
// gen_en. Each session must show: one clear cycle in test mode, then gen_en for
// exactly RUNLEN cycles, then DEPTH flush cycles still in test mode, then done
// with test mode off. win[n] must equal gen_en delayed by n clocks throughout.
// Sessions of several lengths are run back to back, started from IDLE and from
// DONE.
module tb_bist_controller;
  localparam int DEPTH = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, gen_last;
  logic test_mode, clear, gen_en, busy, done;
  logic [DEPTH:0] win;
  int checks = 0, failures = 0;
  int en_count = 0;
  int runlen = 5;
  logic hist [0:4095];
  int cyc = 0;

  always #5 clk = ~clk;

  bist_controller #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .gen_last, .test_mode, .clear,
                                        .gen_en, .win, .busy, .done);

  assign gen_last = gen_en && (en_count == runlen - 1);

  always_ff @(posedge clk) begin
    if (clear) en_count <= 0;
    else if (gen_en) en_count <= en_count + 1;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // Record gen_en and check the window delay line every cycle.
  always @(posedge clk) begin
    #2;
    hist[cyc] = gen_en;
    for (int n = 1; n <= DEPTH; n++)
      if (cyc - n >= 0) chk($sformatf("win[%0d]", n), int'(win[n]), int'(hist[cyc - n]));
    chk("win[0]", int'(win[0]), int'(gen_en));
    chk("busy", int'(busy), int'(test_mode));
    cyc++;
  end

  task automatic session(input int len);
    runlen = len;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    chk("clear cycle", int'(clear), 1);
    chk("test_mode in clear", int'(test_mode), 1);
    chk("gen_en in clear", int'(gen_en), 0);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      chk("gen_en in run", int'(gen_en), 1);
      chk("test_mode in run", int'(test_mode), 1);
      chk("clear in run", int'(clear), 0);
    end
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      chk("gen_en in flush", int'(gen_en), 0);
      chk("test_mode in flush", int'(test_mode), 1);
      chk("done in flush", int'(done), 0);
    end
    @(negedge clk);
    chk("done", int'(done), 1);
    chk("test_mode after done", int'(test_mode), 0);
    repeat (3) @(negedge clk);
    chk("done holds", int'(done), 1);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    chk("idle test_mode", int'(test_mode), 0);
    chk("idle done", int'(done), 0);
    session(5);
    session(192);
    session(1);
    session(37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
