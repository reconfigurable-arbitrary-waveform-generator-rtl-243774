// Testbench for uart_tx: frames with and without parity, taken from the
// line at every baud tick and compared with the expected bit sequence;
// busy timing (high from load until the eleventh shift) and ignoring of a
// load while busy.
module tb_uart_tx;
  localparam int DIV = 4;
  logic       clk = 0, rst = 1;
  logic       baud_en = 0, load = 0, parity_en = 0;
  logic [7:0] din = '0;
  logic       tro, busy;
  int checks = 0, failures = 0;
  int div_cnt = 0;

  uart_tx dut (.clk, .rst, .baud_en, .load, .din, .parity_en, .tro, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
    baud_en <= (div_cnt == DIV - 1);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input logic [7:0] b, input bit pen);
    logic [10:0] expect_bits;
    parity_en <= pen;
    @(posedge clk);
    din  <= b;
    load <= 1;
    @(posedge clk);
    load <= 0;
    din  <= ~b;             // must not matter any more
    #1 check(busy, "busy high right after load");
    // expected line values after ticks 0..10: start, d0..d7, parity/1, 1
    expect_bits = {1'b1, (pen ? ^b : 1'b1), b, 1'b0};
    for (int k = 0; k < 11; k++) begin
      @(posedge clk iff baud_en);
      #1;
      check(tro === expect_bits[k],
            $sformatf("byte %h pen=%0d bit %0d tro=%b expected %b", b, pen, k, tro, expect_bits[k]));
      check(busy === (k < 10), $sformatf("busy=%b after tick %0d", busy, k));
      if (k == 2) begin
        // a second load while busy must be ignored
        load <= 1;
        @(posedge clk);
        load <= 0;
      end
    end
    // the line stays idle afterwards: the second load was dropped
    repeat (3) begin
      @(posedge clk iff baud_en);
      #1 check(tro === 1'b1 && !busy, "idle after frame");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    #1 check(tro === 1'b1 && !busy, "idle after reset");
    send(8'hA5, 0);
    send(8'h3C, 1);
    send(8'h01, 1);
    send(8'hFF, 1);
    for (int i = 0; i < 10; i++) send(8'($urandom), 1'($urandom));
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
