// ora_checksum - output response analyzer "A" in its check-sum form: an
// accumulator (a binary adder and a register) that sums one observed array
// output word over the self-test.
//
// Because the test sequence is fixed, a fault-free array always leaves the same
// sum; comparing acc with that stored value after the test decides pass or fail.
// The least significant bit of acc is the parity of the summed word, so the
// parity-checker variant is the same circuit reduced to one bit.
//
// Interface: clear (synchronous, has priority) zeroes acc; in every clock with
// en high, acc <= acc + din. The sum wraps modulo 2**ACC_W. The accumulator
// follows the design; the widths and the enable are this implementation's.
module ora_checksum #(
  parameter int unsigned IN_W  = 1,
  parameter int unsigned ACC_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [IN_W-1:0]  din,
  output logic [ACC_W-1:0] acc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else if (en)    acc <= acc + ACC_W'(din);
  end

endmodule
