// bist_pkg - shared types, sizes and reference functions of the self-testable
// pipelined array multiplier.
//
// The array multiplier computes x * r with NX multiplicand bits and NR
// multiplier bits (4 x 3 as in the design's example). Its cells exchange a
// 3-bit word: the multiplicand bit x and the carry c travel down the array
// (vertical word), the summand s travels to the right (horizontal word).
//
// In test mode every cell behaves as the bijective function f below: its A
// register is forced to 0 (the "A = 0" case of the design) and the carry
// output passes c_i on instead of the half-adder carry. This design-for-test
// change is this implementation's own choice; with it every cell of the array
// receives all 24 single-input-change (SIC) pairs of its 3-bit input from the
// generator sequence below.
//
// The generator reference (gen_ref) and the fault-free signature function
// (golden_sum) give the fixed check-sums the output response analyzers must
// reach after a fault-free self-test; they are evaluated at elaboration time.
package bist_pkg;

  // Default geometry: 4-bit multiplicand, 3-bit multiplier, 7-bit product.
  localparam int unsigned NX_DEF = 4;
  localparam int unsigned NR_DEF = 3;

  // One pattern of the SIC component generator lasts one multiplier clock; a
  // BIST clock is two multiplier clocks; the counter steps every six BIST clocks;
  // two phases of 8 counter values each.
  localparam int unsigned BIST_PER_COUNT = 6;
  localparam int unsigned GEN_CYCLES     = 2 * 8 * BIST_PER_COUNT * 2;  // 192

  // Accumulator width of a check-sum analyzer: a 2-bit word summed over
  // GEN_CYCLES cycles is at most 3 * 192 = 576 < 1024.
  localparam int unsigned ACC_W = 10;

  // Cell word; x is the MSB of the generator pattern, c the LSB.
  typedef struct packed {
    logic x;
    logic s;
    logic c;
  } cell_word_t;

  // Test-mode cell function: x passes, s_o = s ^ c (A = 0), c_o = c.
  function automatic logic [2:0] f_test(input logic [2:0] v);
    logic x, s, c;
    {x, s, c} = v;
    return {x, s ^ c, c};
  endfunction

  // Applies f_test n times.
  function automatic logic [2:0] f_test_pow(input logic [2:0] v, input int unsigned n);
    logic [2:0] w;
    w = v;
    for (int unsigned i = 0; i < n; i++) w = f_test(w);
    return w;
  endfunction

  // Pattern the generator emits in run cycle k (0 <= k < GEN_CYCLES).
  function automatic logic [2:0] gen_ref(input int unsigned k);
    int unsigned ph, bcyc, half;
    logic [2:0] cnt;
    logic [2:0] xs;
    ph   = k / (GEN_CYCLES / 2);
    cnt  = 3'((k % (GEN_CYCLES / 2)) / (2 * BIST_PER_COUNT));
    bcyc = (k % (2 * BIST_PER_COUNT)) / 2;
    half = k % 2;
    case (bcyc % 3)
      0:       xs = 3'b001;
      1:       xs = 3'b100;
      default: xs = 3'b010;
    endcase
    if (ph == 0) return (half != 0 ? xs : 3'b000) ^ cnt;
    else         return xs ^ cnt;
  endfunction

  // Fault-free check-sum of a cell on 45-degree line d (cell indices summing to
  // d, counted from 0 at the top-left cell). vertical = 0 sums the 1-bit
  // horizontal output s_o, vertical = 1 sums the 2-bit vertical word {x_o, c_o}.
  function automatic logic [ACC_W-1:0] golden_sum(input int unsigned d, input bit vertical);
    logic [ACC_W-1:0] acc;
    logic [2:0] w;
    acc = '0;
    for (int unsigned k = 0; k < GEN_CYCLES; k++) begin
      w = f_test_pow(gen_ref(k), d + 1);
      if (vertical) acc = acc + ACC_W'({w[2], w[0]});
      else          acc = acc + ACC_W'(w[1]);
    end
    return acc;
  endfunction

endpackage
