// tb_siccg - checks the SIC component generator cycle by cycle.
//
// An independent model (nested loops over phase, counter value, BIST cycle and
// half cycle) gives the expected pattern of every run cycle. The testbench also
// checks the derived properties the self-test relies on: phase 1 applies every
// one of the 24 ordered single-input-change pairs of a 3-bit word inside a
// BIST cycle, phase 2 applies every one of the 24 ordered Hamming-distance-2
// pairs between BIST cycles, phase2 rises after 96 cycles and `last` comes in
// run cycle 191 (192 cycles per pass). A pause in en must freeze the output,
// and clear must restart the sequence.
module tb_siccg
  import bist_pkg::*;
;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  cell_word_t pattern;
  logic bist_clk, phase2, last;
  int checks = 0, failures = 0;
  logic [2:0] exp_seq [192];
  bit sic_seen [8][8];
  bit d2_seen [8][8];

  always #5 clk = ~clk;

  siccg dut (.clk, .rst_n, .clear, .en, .pattern, .bist_clk, .phase2, .last);

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int popc3(input logic [2:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]);
  endfunction

  initial begin
    int k, nsic, nd2, cycles;
    logic [2:0] xs;
    logic [2:0] prev;
    // Independent expected sequence.
    k = 0;
    for (int ph = 0; ph < 2; ph++)
      for (int c = 0; c < 8; c++) begin
        xs = 3'b001;
        for (int b = 0; b < 6; b++) begin
          for (int h = 0; h < 2; h++) begin
            if (ph == 0) exp_seq[k] = (h == 1 ? xs : 3'b000) ^ 3'(c);
            else         exp_seq[k] = xs ^ 3'(c);
            k++;
          end
          xs = {xs[0], xs[2:1]};
        end
      end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    clear = 1'b1; @(posedge clk); #1 clear = 1'b0;

    for (int pass = 0; pass < 2; pass++) begin
      cycles = 0;
      prev = '0;
      for (int t = 0; t < 192; t++) begin
        en = 1'b1;
        #1;
        chk($sformatf("pattern[%0d]", t), int'(pattern), int'(exp_seq[t]));
        chk($sformatf("phase2[%0d]", t), int'(phase2), (t >= 96) ? 1 : 0);
        chk($sformatf("bist_clk[%0d]", t), int'(bist_clk), t % 2);
        chk($sformatf("last[%0d]", t), int'(last), (t == 191) ? 1 : 0);
        if (t % 2 == 1 && t < 96 && popc3(prev ^ pattern) == 1) sic_seen[prev][pattern] = 1'b1;
        if (t % 2 == 0 && t > 96 && popc3(prev ^ pattern) == 2) d2_seen[prev][pattern] = 1'b1;
        prev = pattern;
        cycles++;
        @(posedge clk);
        #1;
        // Insert a pause now and then: the outputs must not move.
        if (t == 37 || t == 140) begin
          logic [2:0] hold;
          en = 1'b0;
          #1 hold = pattern;
          repeat (3) @(posedge clk);
          #1 chk("hold while en=0", int'(pattern), int'(hold));
        end
      end
      chk("cycles per pass", cycles, 192);
      en = 1'b0;
      nsic = 0; nd2 = 0;
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          if (sic_seen[a][b]) nsic++;
          if (d2_seen[a][b]) nd2++;
        end
      chk("distinct SIC pairs in phase 1", nsic, 24);
      chk("distinct distance-2 pairs in phase 2", nd2, 24);
      // Restart.
      clear = 1'b1; @(posedge clk); #1 clear = 1'b0;
      chk("phase2 after clear", int'(phase2), 0);
    end

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
