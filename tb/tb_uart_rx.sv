// Testbench for uart_rx: drives serial frames bit by bit at the baud tick
// rate (with and without parity, with a wrong parity bit) and checks the
// received byte, full, rx_done and parity_error.
module tb_uart_rx;
  localparam int DIV = 5;
  logic       clk = 0, rst = 1;
  logic       baud_en = 0, rx_in = 1, parity_en = 0;
  logic [7:0] dout;
  logic       full, parity_error, rx_done;
  int checks = 0, failures = 0;
  int div_cnt = 0;
  int done_count = 0;

  uart_rx dut (.clk, .rst, .baud_en, .rx_in, .parity_en, .dout, .full,
               .parity_error, .rx_done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
    baud_en <= (div_cnt == DIV - 1);
    if (rx_done) done_count++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic put_bit(input logic v);
    @(posedge clk iff baud_en);
    rx_in <= v;
  endtask

  task automatic send(input logic [7:0] b, input bit pen, input bit bad_parity);
    int n_before;
    n_before = done_count;
    parity_en <= pen;
    put_bit(1'b0);
    for (int i = 0; i < 8; i++) put_bit(b[i]);
    if (pen) put_bit((^b) ^ bad_parity);
    put_bit(1'b1);
    repeat (3) put_bit(1'b1);
    check(done_count == n_before + 1, $sformatf("one rx_done for %h (got %0d)", b, done_count - n_before));
    check(dout === b, $sformatf("dout=%h expected %h", dout, b));
    check(full === 1'b1, "full set");
    check(parity_error === (pen && bad_parity),
          $sformatf("parity_error=%b pen=%0d bad=%0d", parity_error, pen, bad_parity));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    check(!full && !rx_done, "nothing received while line idle");
    send(8'h90, 0, 0);
    send(8'h5A, 1, 0);
    send(8'h5A, 1, 1);
    send(8'h00, 1, 1);
    send(8'hFF, 0, 1);   // parity off: a wrong parity bit is not even sent
    repeat (12) send(8'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
