// siccg_control - control module of the SIC component generator.
//
// A single flip-flop that starts at 0 (reset or synchronous clear) and is set
// to 1 on the clock edge at which its enable n is high. The generator drives n
// when its 3-bit counter leaves the value 111, so the output phase2 is 0 for
// the first pass of the counter (phase 1, single-input-change pairs) and 1 for
// the second (phase 2, Hamming-distance-2 pairs). Once set it stays set until
// cleared. The flip-flop and its enable follow the design; the synchronous
// clear is this implementation's addition so a new self-test can start.
module siccg_control (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,    // synchronous return to phase 1
  input  logic n,        // counter has reached 111 and is stepping
  output logic phase2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase2 <= 1'b0;
    else if (clear) phase2 <= 1'b0;
    else if (n)     phase2 <= 1'b1;
  end

endmodule
