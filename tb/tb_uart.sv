// Testbench for uart: transmitter output looped back to the receiver input.
// Random bytes at several divide ratios, with and without parity, must come
// back unchanged with no parity error, and each frame must take the
// expected number of clocks.
module tb_uart;
  logic        clk = 0, rst = 1;
  logic [15:0] cnt_limit = 16'd2;
  logic        parity_en = 0, load = 0;
  logic [7:0]  din = '0, dout;
  logic        tro, busy, full, parity_error, rx_done, baud_tick;
  int checks = 0, failures = 0;
  longint cyc = 0;

  uart dut (.clk, .rst, .cnt_limit, .parity_en, .load, .din, .tro, .busy,
            .rx_in(tro), .dout, .full, .parity_error, .rx_done, .baud_tick);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic xfer(input logic [7:0] b);
    longint t_start, t_done;
    @(posedge clk iff !busy);
    din  <= b;
    load <= 1;
    @(posedge clk);
    load <= 0;
    // start bit on the line
    @(negedge clk iff !tro);
    t_start = cyc;
    @(posedge clk iff rx_done);
    t_done = cyc;
    check(dout === b, $sformatf("limit=%0d pen=%0d sent %h got %h", cnt_limit, parity_en, b, dout));
    check(!parity_error, "no parity error on loopback");
    // start, 8 data, [parity], then stop bit sampled; +2 synchronizer,
    // +1 output register, +1 sampling phase
    check(t_done - t_start >= longint'((parity_en ? 10 : 9) * cnt_limit) &&
          t_done - t_start <= longint'((parity_en ? 11 : 10) * cnt_limit + 4),
          $sformatf("frame took %0d clocks at limit %0d", t_done - t_start, cnt_limit));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (limits[i]) begin
      cnt_limit <= limits[i];
      repeat (2 * 16) @(posedge clk);
      for (int p = 0; p < 2; p++) begin
        parity_en <= 1'(p);
        repeat (6) xfer(8'($urandom));
        xfer(8'h00);
        xfer(8'hFF);
      end
    end
    check(full, "full set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] limits[4] = '{16'd2, 16'd3, 16'd7, 16'd15};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
