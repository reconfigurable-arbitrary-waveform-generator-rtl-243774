// Testbench for cmd_decoder: reset settings, every defined code word, and
// bytes that must be ignored (unknown codes, or no rx_valid).
module tb_cmd_decoder;
  import awg_pkg::*;
  logic        clk = 0, rst = 1;
  logic        rx_valid = 0;
  logic [7:0]  rx_byte = '0;
  wave_sel_e   wave_sel;
  logic [15:0] baud_limit;
  logic [3:0]  sq_div;
  int checks = 0, failures = 0;

  cmd_decoder #(.CLK_HZ(1_843_200)) dut (.clk, .rst, .rx_valid, .rx_byte,
                                         .wave_sel, .baud_limit, .sq_div);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cmd(input logic [7:0] b, input bit valid = 1);
    rx_byte  <= b;
    rx_valid <= valid;
    @(posedge clk);
    rx_valid <= 0;
    @(posedge clk);
    #1;
  endtask

  // 1843200 / rate, rounded down
  int unsigned expect_limit[9] = '{16756, 6144, 3072, 1536, 768, 192, 128, 96, 64};
  int unsigned expect_div[3]   = '{2, 7, 15};

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    check(wave_sel == WAVE_SAW && baud_limit == 2 && sq_div == 2, "reset settings");
    cmd(8'h90); check(wave_sel == WAVE_TRI,   "8'h90 selects triangle");
    cmd(8'hA0); check(wave_sel == WAVE_STAIR, "8'hA0 selects staircase");
    cmd(8'h80, 0); check(wave_sel == WAVE_STAIR, "no rx_valid, no change");
    cmd(8'h80); check(wave_sel == WAVE_SAW,   "8'h80 selects sawtooth");
    for (int i = 0; i < 9; i++) begin
      cmd(8'h20 + 8'(i));
      check(baud_limit == 16'(expect_limit[i]), $sformatf("baud code %0d limit %0d", i, baud_limit));
    end
    cmd(8'h29); check(baud_limit == 16'd64, "unknown baud code ignored");
    for (int i = 0; i < 3; i++) begin
      cmd(8'h40 + 8'(i));
      check(sq_div == 4'(expect_div[i]), $sformatf("div code %0d div %0d", i, sq_div));
    end
    cmd(8'h43); check(sq_div == 4'd15, "unknown division code ignored");
    cmd(8'h91); check(wave_sel == WAVE_SAW, "8'h91 is not a waveform code");
    cmd(8'h00); check(wave_sel == WAVE_SAW && baud_limit == 16'd64 && sq_div == 4'd15, "8'h00 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
