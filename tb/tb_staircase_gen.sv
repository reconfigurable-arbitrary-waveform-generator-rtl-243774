// Testbench for staircase_gen at its default size (stairs of 1000 clocks,
// height 78): over one full period plus a few stairs the level must equal
// 78 * ((n / 1000) mod 53) at clock n after reset.
module tb_staircase_gen;
  logic        clk = 0, rst = 1;
  logic [11:0] wave;
  int checks = 0, failures = 0;
  int resets_to_zero = 0;
  logic [11:0] prev;

  staircase_gen dut (.clk, .rst, .wave);

  always #5 clk = ~clk;

  initial begin
    int expect_lvl;
    repeat (2) @(posedge clk);
    rst <= 0;
    prev = 0;
    for (int n = 1; n <= 56000; n++) begin
      @(posedge clk);
      #1;
      expect_lvl = 78 * ((n / 1000) % 53);
      checks++;
      if (wave !== 12'(expect_lvl)) begin
        failures++;
        if (failures < 10) $display("FAIL clock %0d wave=%0d expected %0d", n, wave, expect_lvl);
      end
      if (prev == 12'd4056 && wave == 0) resets_to_zero++;
      prev = wave;
    end
    checks++;
    if (resets_to_zero != 1) begin failures++; $display("FAIL top stair reached %0d times", resets_to_zero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
