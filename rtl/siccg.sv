// siccg - SIC (single input change) component generator for the 3-bit input
// word {x, s, c} of an array multiplier cell.
//
// Parts, as in the design: a 3-bit binary counter C counting 000 to 111, a
// 3-bit barrel shifter X initialised to 001 and rotated right once per BIST
// clock, the control module (siccg_control) selecting the phase, and the
// output gates
//   phase 1: pattern_i = (X_i & bist_clk) ^ C_i
//   phase 2: pattern_i =  X_i ^ C_i.
// The BIST clock has half the frequency of the multiplier clock; here it is a
// toggle flip-flop (bist_clk) on the multiplier clock, so one BIST cycle is two
// multiplier cycles: bist_clk = 0 in the first, 1 in the second. The counter
// steps once every six BIST cycles (six barrel-shifter shifts, two full
// rotations of X).
//
// Phase 1 therefore emits the pairs <C, C ^ X> with Hamming distance 1, every
// counter value with every bit flipped twice; phase 2 holds C ^ X for a BIST
// cycle and moves to C ^ ror(X), a Hamming-distance-2 step. One pass lasts
// 2 * 8 * 6 * 2 = 192 multiplier cycles; `last` is high in the final cycle.
//
// Timing: pattern is combinational from the registers and valid in every
// cycle in which en is high; the registers advance on clock edges with en = 1.
// clear (synchronous) returns to counter 000, X = 001, bist_clk = 0, phase 1.
module siccg
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  output cell_word_t pattern,
  output logic       bist_clk,
  output logic       phase2,
  output logic       last
);

  logic [2:0] cnt;       // binary counter C
  logic [2:0] xsh;       // barrel shifter X2 X1 X0
  logic [2:0] pre;       // BIST cycles within one counter step, 0..5
  logic       step_x;    // end of a BIST cycle
  logic       step_c;    // end of the sixth BIST cycle
  logic       n;         // counter at 111 and stepping

  always_comb begin
    step_x = en & bist_clk;
    step_c = step_x & (pre == 3'(BIST_PER_COUNT - 1));
    n      = step_c & (cnt == 3'b111);
    last   = n & phase2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      xsh      <= 3'b001;
      pre      <= '0;
      bist_clk <= 1'b0;
    end else if (clear) begin
      cnt      <= '0;
      xsh      <= 3'b001;
      pre      <= '0;
      bist_clk <= 1'b0;
    end else if (en) begin
      bist_clk <= ~bist_clk;
      if (step_x) begin
        xsh <= {xsh[0], xsh[2:1]};
        pre <= step_c ? '0 : pre + 3'd1;
      end
      if (step_c) cnt <= cnt + 3'd1;
    end
  end

  siccg_control u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .n      (n),
    .phase2 (phase2)
  );

  always_comb begin
    if (!phase2) pattern = (xsh & {3{bist_clk}}) ^ cnt;
    else         pattern = xsh ^ cnt;
  end

endmodule
