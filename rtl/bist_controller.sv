// bist_controller - test controller of the self-testable array.
//
// In the design the controller is a switch between normal mode and test mode.
// This implementation adds the sequencing needed to run a self-test on its own:
//   IDLE  : normal mode (test_mode = 0); start moves to CLEAR.
//   CLEAR : one cycle in test mode; clear resets the generator and analyzers.
//   RUN   : gen_en = 1 while the generator emits its sequence, until its
//           `gen_last` cycle (GEN_CYCLES cycles for the default generator).
//   FLUSH : DEPTH more cycles in test mode so the last pattern reaches the
//           cells on the farthest 45-degree line.
//   DONE  : done = 1 and back in normal mode; start begins a new test.
// win[0] is high in every RUN cycle; win[n] is win[0] delayed by n clocks. The
// analyzer of a cell on 45-degree line d (its output lags the generator by d + 1
// clocks) accumulates while win[d + 1] is high, so it sees exactly the
// responses to the generated sequence.
module bist_controller #(
  parameter int unsigned DEPTH = 10      // longest generator-to-output latency
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           gen_last,
  output logic           test_mode,
  output logic           clear,
  output logic           gen_en,
  output logic [DEPTH:0] win,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_FLUSH, S_DONE} state_t;

  state_t state;
  logic [$clog2(DEPTH+1)-1:0] flush_cnt;
  logic [DEPTH:1] win_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      flush_cnt <= '0;
    end else begin
      case (state)
        S_IDLE:  if (start) state <= S_CLEAR;
        S_CLEAR: state <= S_RUN;
        S_RUN:   if (gen_last) begin
                   state     <= S_FLUSH;
                   flush_cnt <= '0;
                 end
        S_FLUSH: begin
                   flush_cnt <= flush_cnt + 1'b1;
                   if (flush_cnt == $bits(flush_cnt)'(DEPTH - 1)) state <= S_DONE;
                 end
        S_DONE:  if (start) state <= S_CLEAR;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_q <= '0;
    else        win_q <= win[DEPTH-1:0];
  end

  always_comb begin
    test_mode = (state == S_CLEAR) || (state == S_RUN) || (state == S_FLUSH);
    clear     = (state == S_CLEAR);
    gen_en    = (state == S_RUN);
    busy      = test_mode;
    done      = (state == S_DONE);
    win       = {win_q, gen_en};
  end

endmodule
