// Testbench for triangle_gen: two periods of the triangle against an
// independent formula (rises 1..2047, falls back to 1, period 4092 clocks),
// including the synchronous reset.
module tb_triangle_gen;
  logic        clk = 0, rst = 1;
  logic [11:0] wave;
  int checks = 0, failures = 0;
  int peaks = 0, valleys = 0;

  triangle_gen dut (.clk, .rst, .wave);

  always #5 clk = ~clk;

  function automatic int tri_ref(input int n);
    int ph;
    ph = n % 4092;
    return (ph <= 2046) ? 1 + ph : 1 + (4092 - ph);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (wave !== 12'd1) begin failures++; $display("FAIL reset value %0d", wave); end
    rst <= 0;
    for (int n = 1; n <= 2 * 4092 + 5; n++) begin
      @(posedge clk);
      #1 checks++;
      if (wave !== 12'(tri_ref(n))) begin
        failures++;
        if (failures < 10) $display("FAIL clock %0d wave=%0d expected %0d", n, wave, tri_ref(n));
      end
      if (wave == 12'd2047) peaks++;
      if (wave == 12'd1) valleys++;
    end
    checks++;
    if (peaks != 2 || valleys != 2) begin
      failures++;
      $display("FAIL peaks=%0d valleys=%0d", peaks, valleys);
    end
    // synchronous reset in the middle of a slope
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    #1 checks++;
    if (wave !== 12'd1) begin failures++; $display("FAIL after reset %0d", wave); end
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
