// tb_ora_checksum - drives a 2-bit check-sum analyzer with random words,
// random enables and occasional clears, and compares its sum after every clock
// with an integer model (sum modulo 2**10).
module tb_ora_checksum;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  logic [1:0] din = '0;
  logic [9:0] acc;
  int model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ora_checksum #(.IN_W(2), .ACC_W(10)) dut (.clk, .rst_n, .clear, .en, .din, .acc);

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (acc !== 10'd0) begin failures++; $display("FAIL reset value %0d", acc); end
    for (int t = 0; t < 2000; t++) begin
      din   = 2'($urandom);
      en    = ($urandom % 4) != 0;
      clear = ($urandom % 300) == 0;
      @(posedge clk);
      if (clear) model = 0;
      else if (en) model = (model + int'(din)) % 1024;
      #1;
      checks++;
      if (int'(acc) != model) begin
        failures++;
        $display("FAIL t=%0d acc=%0d expected %0d", t, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
