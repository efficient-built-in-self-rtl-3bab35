// mult_cell - one cell of the pipelined array multiplier: a latched 1-bit full
// adder with an A register holding one multiplier bit.
//
// Normal mode (test = 0), as in the design's cell equations:
//   x_o = x_i,  s_o = s_i ^ c_i ^ (A & x_i),
//   c_o = s_i c_i + c_i (A & x_i) + s_i (A & x_i).
// All three outputs are registered, so a word moves one cell per clock.
// A cell with HAS_A = 0 has no multiplier index and its A is the constant 0.
//
// Test mode (test = 1): the A value is forced to 0 so that all cells of the
// array compute the same function, and the carry output is switched to c_i so
// that the cell function (x, s, c) -> (x, s ^ c, c) is bijective. The design
// asks for a design-for-test change that makes the cell bijective but does not
// spell it out; this particular one (one multiplexer on c_o plus one gate on A)
// is this implementation's choice.
//
// The A register loads r_in when load_a is high and clears on reset; the
// pipeline registers have no reset (their contents are overwritten every clock).
module mult_cell #(
  parameter bit HAS_A = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test,
  input  logic load_a,
  input  logic r_in,
  input  logic x_i,
  input  logic s_i,
  input  logic c_i,
  output logic x_o,
  output logic s_o,
  output logic c_o
);

  logic a_q;
  logic pp, sum, carry;

  if (HAS_A) begin : g_areg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      a_q <= 1'b0;
      else if (load_a) a_q <= r_in;
    end
  end else begin : g_noareg
    assign a_q = 1'b0;
  end

  always_comb begin
    pp    = a_q & ~test & x_i;
    sum   = s_i ^ c_i ^ pp;
    carry = test ? c_i : ((s_i & c_i) | (c_i & pp) | (s_i & pp));
  end

  always_ff @(posedge clk) begin
    x_o <= x_i;
    s_o <= sum;
    c_o <= carry;
  end

endmodule
