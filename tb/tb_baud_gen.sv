// Testbench for baud_gen: first tick after reset and tick period for
// several divide ratios, including one below the minimum of 2.
module tb_baud_gen;
  logic        clk = 0, rst = 1;
  logic [15:0] cnt_limit = 16'd2;
  logic        ck_en;
  int checks = 0, failures = 0;
  int cyc = 0;

  baud_gen #(.CNT_W(16)) dut (.clk, .rst, .cnt_limit, .ck_en);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Measure the distance in clocks between consecutive ticks, n times.
  task automatic measure(input int expect_period, input int n);
    int last;
    @(posedge clk iff ck_en);
    last = cyc;
    repeat (n) begin
      @(posedge clk iff ck_en);
      check(cyc - last == expect_period,
            $sformatf("limit=%0d period=%0d expected %0d", cnt_limit, cyc - last, expect_period));
      last = cyc;
    end
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst <= 0;
    t0 = cyc;
    @(posedge clk iff ck_en);
    check(cyc - t0 == 3, $sformatf("first tick after %0d clocks", cyc - t0));
    measure(2, 5);
    foreach (cnt_limit_list[i]) begin
      cnt_limit <= cnt_limit_list[i];
      @(posedge clk iff ck_en);   // let the reload take the new value
      measure(cnt_limit_list[i] < 2 ? 2 : int'(cnt_limit_list[i]), 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] cnt_limit_list[5] = '{16'd7, 16'd15, 16'd1, 16'd192, 16'd3};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
