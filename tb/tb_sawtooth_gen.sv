// Testbench for sawtooth_gen: two full periods of the 12-bit ramp against
// an independent count of clocks since reset.
module tb_sawtooth_gen;
  logic        clk = 0, rst = 1;
  logic [11:0] wave;
  int checks = 0, failures = 0;
  int wraps = 0;

  sawtooth_gen #(.W(12)) dut (.clk, .rst, .wave);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (wave !== 12'd0) begin failures++; $display("FAIL reset value %0d", wave); end
    rst <= 0;
    for (int n = 1; n <= 2 * 4096 + 10; n++) begin
      @(posedge clk);
      #1 checks++;
      if (wave !== 12'(n % 4096)) begin
        failures++;
        if (failures < 10) $display("FAIL clock %0d wave=%0d expected %0d", n, wave, n % 4096);
      end
      if (wave == 0) wraps++;
    end
    checks++;
    if (wraps != 2) begin failures++; $display("FAIL wraps=%0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
