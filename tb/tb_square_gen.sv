// Testbench for square_gen: for divisions 2, 7 and 15 the output period
// must be the division and the high time half of it, rounded down.
module tb_square_gen;
  logic       clk = 0, rst = 1;
  logic [3:0] div = 4'd2;
  logic       wave;
  int checks = 0, failures = 0;
  int cyc = 0;

  square_gen dut (.clk, .rst, .div, .wave);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic measure(input int d);
    int rise, fall, rise2;
    div <= 4'(d);
    repeat (40) @(posedge clk);
    @(posedge wave); rise = cyc;
    @(negedge wave); fall = cyc;
    @(posedge wave); rise2 = cyc;
    checks++;
    if (rise2 - rise != d) begin failures++; $display("FAIL div %0d period %0d", d, rise2 - rise); end
    checks++;
    if (fall - rise != d / 2) begin failures++; $display("FAIL div %0d high %0d", d, fall - rise); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    measure(2); measure(7); measure(15); measure(3); measure(2); measure(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
