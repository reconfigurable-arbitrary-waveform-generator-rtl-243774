// End-to-end testbench for awg_top at its default parameters.
//
// The testbench plays the PC: it sends code words on rx_in as serial frames
// at the link's current bit rate and checks every clock that dac_out equals
// the selected waveform, computed here from the number of clocks since
// reset. It walks through: default sawtooth, triangular (8'h90) including
// its turning points, staircase (8'hA0) over a full period including the
// return to zero, back to sawtooth, a code word with a parity error that
// must be ignored, a change of baud rate (to 28800 baud, 64 clocks per bit)
// with commands at the new rate, the square wave at divisions 2, 7 and 15,
// and a byte sent back through the transmitter and decoded from tx_out.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_awg_top;
  import awg_pkg::*;
  logic        clk = 0, rst = 1;
  logic        parity_en = 0, rx_in = 1, tx_load = 0;
  logic [7:0]  tx_din = '0;
  logic        tx_out, tx_busy, rx_full, rx_parity_error, baud_tick, sq_wave;
  logic [7:0]  rx_data;
  logic [11:0] dac_out;
  wave_sel_e   wave_sel;
  int checks = 0, failures = 0;
  longint n = 0;            // clock edges since reset was released
  int bit_clks = 2;         // link bit period the PC side uses
  bit running = 0;

  // mechanism counters
  int m_saw = 0, m_tri = 0, m_stair = 0, m_tri_turn = 0, m_stair_wrap = 0;
  int m_parity_reject = 0, m_baud_change = 0, m_div_change = 0, m_tx = 0;

  awg_top dut (.clk, .rst, .parity_en, .rx_in, .tx_out, .tx_load, .tx_din, .tx_busy,
               .rx_data, .rx_full, .rx_parity_error, .baud_tick, .dac_out, .sq_wave,
               .wave_sel);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // Reference waveforms after k clocks since reset.
  function automatic int saw_ref(input longint k);
    return int'(k % 4096);
  endfunction
  function automatic int tri_ref(input longint k);
    int ph;
    ph = int'(k % 4092);
    return (ph <= 2046) ? 1 + ph : 1 + (4092 - ph);
  endfunction
  function automatic int stair_ref(input longint k);
    return 78 * int'((k / 1000) % 53);
  endfunction

  // Per-clock check of the DAC bus. sel_prev is the selection in force
  // before the last edge, which is what the output register used.
  wave_sel_e sel_prev = WAVE_SAW;
  int        dac_prev = 0;
  always @(negedge clk) begin
    if (running) begin
      int exp_v;
      unique case (sel_prev)
        WAVE_TRI:   exp_v = tri_ref(n - 1);
        WAVE_STAIR: exp_v = stair_ref(n - 1);
        default:    exp_v = saw_ref(n - 1);
      endcase
      if (n >= 1) check(dac_out === 12'(exp_v),
                        $sformatf("clock %0d sel %s dac %0d expected %0d", n, sel_prev.name(), dac_out, exp_v));
      if (sel_prev == WAVE_TRI && (dac_out == 12'd2047 || (dac_out == 12'd1 && dac_prev == 2))) m_tri_turn++;
      if (sel_prev == WAVE_STAIR && dac_out == 0 && dac_prev == 4056) m_stair_wrap++;
      dac_prev = int'(dac_out);
    end
    sel_prev = wave_sel;
  end

  always @(posedge clk) if (running) n++;

  // PC side: one frame, LSB first, optional parity (optionally wrong).
  task automatic pc_send(input logic [7:0] b, input bit pen = 0, input bit bad = 0);
    rx_in <= 1'b0;
    repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx_in <= b[i];
      repeat (bit_clks) @(posedge clk);
    end
    if (pen) begin
      rx_in <= (^b) ^ bad;
      repeat (bit_clks) @(posedge clk);
    end
    rx_in <= 1'b1;
    repeat (3 * bit_clks + 4) @(posedge clk);
  endtask

  task automatic expect_sel(input wave_sel_e s, input string what);
    check(wave_sel == s, $sformatf("%s: wave_sel %s", what, wave_sel.name()));
  endtask

  task automatic measure_square(input int d);
    longint r1, f1, r2;
    repeat (40) @(posedge clk);
    @(posedge sq_wave); r1 = n;
    @(negedge sq_wave); f1 = n;
    @(posedge sq_wave); r2 = n;
    check(r2 - r1 == longint'(d) && f1 - r1 == longint'(d) / 2,
          $sformatf("square div %0d: period %0d high %0d", d, r2 - r1, f1 - r1));
  endtask

  // Receive one frame from tx_out, sampling in the middle of each bit.
  task automatic pc_receive(output logic [7:0] b);
    @(negedge tx_out);
    repeat (bit_clks / 2) @(posedge clk);
    #1 check(tx_out == 0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (bit_clks) @(posedge clk);
      #1 b[i] = tx_out;
    end
    repeat (bit_clks) @(posedge clk);
    #1 check(tx_out == 1, "stop bit");
  endtask

  initial begin
    logic [7:0] got;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    running = 1;

    // default: sawtooth, baud at half the clock frequency
    repeat (5000) @(posedge clk);
    expect_sel(WAVE_SAW, "after reset");
    check(!rx_full && tx_out, "receiver empty and line idle after reset");
    m_saw++;

    // the code word of the original example selects the triangle
    pc_send(8'h90);
    expect_sel(WAVE_TRI, "8'h90");
    check(rx_full && rx_data == 8'h90 && !rx_parity_error, "receive buffer holds 8'h90");
    m_tri++;
    repeat (4200) @(posedge clk);

    // staircase over a whole period
    pc_send(8'hA0);
    expect_sel(WAVE_STAIR, "8'hA0");
    m_stair++;
    repeat (54000) @(posedge clk);

    pc_send(8'h80);
    expect_sel(WAVE_SAW, "8'h80");
    m_saw++;

    // parity on: a good frame acts, a bad one is dropped
    parity_en <= 1;
    pc_send(8'h90, 1, 0);
    expect_sel(WAVE_TRI, "8'h90 with parity");
    m_tri++;
    pc_send(8'hA0, 1, 1);
    check(rx_parity_error, "parity error flagged");
    if (wave_sel == WAVE_TRI) m_parity_reject++;
    expect_sel(WAVE_TRI, "frame with parity error ignored");
    pc_send(8'h80, 1, 0);
    check(!rx_parity_error, "parity error cleared by good frame");
    expect_sel(WAVE_SAW, "8'h80 with parity");
    parity_en <= 0;
    repeat (10) @(posedge clk);

    // square wave divisions
    measure_square(2);
    pc_send(8'h41); measure_square(7);  m_div_change++;
    pc_send(8'h42); measure_square(15); m_div_change++;
    pc_send(8'h40); measure_square(2);  m_div_change++;

    // change the link to 28800 baud: 1843200 / 28800 = 64 clocks per bit
    pc_send(8'h28);
    bit_clks = 64;
    repeat (200) @(posedge clk);
    pc_send(8'hA0);
    expect_sel(WAVE_STAIR, "8'hA0 at 28800 baud");
    if (wave_sel == WAVE_STAIR) m_baud_change++;
    m_stair++;

    // send a byte back to the PC at the new rate
    fork
      begin
        @(posedge clk);
        tx_din  <= 8'hC3;
        tx_load <= 1;
        @(posedge clk);
        tx_load <= 0;
      end
      pc_receive(got);
    join
    check(got == 8'hC3, $sformatf("byte from tx_out %h", got));
    if (got == 8'hC3) m_tx++;

    // and back to the default link rate (code 8'h20 is 110 baud; use 9600)
    pc_send(8'h25);
    bit_clks = 192;
    repeat (400) @(posedge clk);
    pc_send(8'h80);
    expect_sel(WAVE_SAW, "8'h80 at 9600 baud");
    m_saw++;
    if (wave_sel == WAVE_SAW) m_baud_change++;
    repeat (100) @(posedge clk);

    $display("INFO saw=%0d tri=%0d stair=%0d tri_turn=%0d stair_wrap=%0d parity_reject=%0d baud_change=%0d div_change=%0d tx=%0d",
             m_saw, m_tri, m_stair, m_tri_turn, m_stair_wrap, m_parity_reject, m_baud_change, m_div_change, m_tx);
    check(m_saw > 0, "sawtooth selected");
    check(m_tri > 0, "triangle selected");
    check(m_stair > 0, "staircase selected");
    check(m_tri_turn > 0, "triangle turned");
    check(m_stair_wrap > 0, "staircase returned to zero");
    check(m_parity_reject > 0, "parity error rejected");
    check(m_baud_change > 0, "baud rate changed");
    check(m_div_change > 0, "square division changed");
    check(m_tx > 0, "byte transmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
