// Workload testbench: the link at every baud rate the PC program offers
// (110 to 28800 baud), on awg_top at its default parameters.
//
// For each rate the PC side sends the rate's code word at the current rate,
// switches its own bit period to 1843200 / rate clocks, then sends a
// waveform code word at the new rate (with even parity on for every other
// rate) and checks that it was acted on. The FPGA then sends a byte back;
// the testbench checks its value and that the start bit lasts exactly one
// bit period at the new rate.
module tb_awg_baud_rates;
  import awg_pkg::*;
  logic        clk = 0, rst = 1;
  logic        parity_en = 0, rx_in = 1, tx_load = 0;
  logic [7:0]  tx_din = '0;
  logic        tx_out, tx_busy, rx_full, rx_parity_error, baud_tick, sq_wave;
  logic [7:0]  rx_data;
  logic [11:0] dac_out;
  wave_sel_e   wave_sel;
  int checks = 0, failures = 0;
  int bit_clks = 2;
  int rates_done = 0;

  awg_top dut (.clk, .rst, .parity_en, .rx_in, .tx_out, .tx_load, .tx_din, .tx_busy,
               .rx_data, .rx_full, .rx_parity_error, .baud_tick, .dac_out, .sq_wave,
               .wave_sel);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pc_send(input logic [7:0] b, input bit pen);
    rx_in <= 1'b0;
    repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx_in <= b[i];
      repeat (bit_clks) @(posedge clk);
    end
    if (pen) begin
      rx_in <= ^b;
      repeat (bit_clks) @(posedge clk);
    end
    rx_in <= 1'b1;
    repeat (2 * bit_clks + 4) @(posedge clk);
  endtask

  task automatic pc_receive(output logic [7:0] b, output int start_len);
    int k;
    @(negedge tx_out);
    k = 0;
    while (tx_out == 1'b0 && k < 70000) begin @(posedge clk); #1 k++; end
    start_len = k;
    // now at the first clock of bit 0; sample mid-bit
    repeat (bit_clks / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      #1 b[i] = tx_out;
      repeat (bit_clks) @(posedge clk);
    end
  endtask

  localparam logic [7:0] WAVES[3] = '{CMD_TRI, CMD_STAIR, CMD_SAW};
  localparam int unsigned CLOCKS_PER_BIT[9] =
    '{16756, 6144, 3072, 1536, 768, 192, 128, 96, 64};

  initial begin
    logic [7:0] got;
    int         start_len;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    // fastest first, so that the slow rates are reached from a fast link
    for (int r = 8; r >= 0; r--) begin
      logic [7:0] w;
      logic [7:0] tx_byte;
      bit pen;
      pen = r[0];
      parity_en <= pen;
      @(posedge clk);
      pc_send(8'h20 + 8'(r), pen);
      bit_clks = int'(CLOCKS_PER_BIT[r]);
      repeat (2 * bit_clks) @(posedge clk);
      w = WAVES[r % 3];
      pc_send(w, pen);
      check((w == CMD_TRI && wave_sel == WAVE_TRI) || (w == CMD_STAIR && wave_sel == WAVE_STAIR) ||
            (w == CMD_SAW && wave_sel == WAVE_SAW),
            $sformatf("rate %0d: code %h gave %s", baud_rate(r), w, wave_sel.name()));
      check(!rx_parity_error, $sformatf("rate %0d: no parity error", baud_rate(r)));
      tx_byte = 8'($urandom) | 8'h01;   // bit 0 set: the start bit ends on a 1
      fork
        begin
          @(posedge clk);
          tx_din  <= tx_byte;
          tx_load <= 1;
          @(posedge clk);
          tx_load <= 0;
        end
        pc_receive(got, start_len);
      join
      check(got == tx_byte, $sformatf("rate %0d: sent back %h got %h", baud_rate(r), tx_byte, got));
      check(start_len == bit_clks, $sformatf("rate %0d: start bit %0d clocks, expected %0d",
                                              baud_rate(r), start_len, bit_clks));
      @(posedge clk iff !tx_busy);
      repeat (2 * bit_clks) @(posedge clk);
      rates_done++;
    end
    check(rates_done == 9, "all nine rates exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
