// tb_siccg_control - checks the phase flip-flop of the SIC component
// generator: 0 after reset, unchanged while n is low, set by n, held after n
// falls, and returned to 0 by clear.
module tb_siccg_control;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, n = 1'b0;
  logic phase2;
  logic model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  siccg_control dut (.clk, .rst_n, .clear, .n, .phase2);

  initial begin
    model = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      // Mostly idle, with rare n and clear pulses.
      n     = ($urandom % 17) == 0;
      clear = ($urandom % 23) == 0;
      @(posedge clk);
      if (clear) model = 1'b0;
      else if (n) model = 1'b1;
      #1;
      checks++;
      if (phase2 !== model) begin
        failures++;
        $display("FAIL t=%0d phase2=%0b expected %0b", t, phase2, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
