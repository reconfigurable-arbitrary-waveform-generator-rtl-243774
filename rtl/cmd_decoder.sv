// Command decoder: acts on the code words received from the PC.
//
// Each byte delivered by the UART receiver (rx_valid for one clock, byte in
// rx_byte) is decoded and, if it is a known code word, updates one of three
// settings registers:
//   wave_sel   which waveform drives the DAC (sawtooth, triangular, staircase)
//   baud_limit divide ratio for the baud generator, CLK_HZ / rate
//   sq_div     clock division for the square wave (2, 7 or 15)
// The encoding is listed in awg_pkg. A byte received with a parity error
// must not reach rx_valid (the top gates it).
//
// From the original design: code word 8'b1001_0000 selects the triangular
// wave, after reset the sawtooth is selected and the baud tick is half the
// clock frequency (baud_limit = 2). The other code words, the clock
// frequency CLK_HZ (1.8432 MHz, which divides exactly into all but the
// lowest rate) and the reset division of 2 are this design's choices.
// Settings change on the clock after rx_valid.
module cmd_decoder
  import awg_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_843_200
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  rx_valid,
  input  logic [7:0]            rx_byte,
  output wave_sel_e             wave_sel,
  output logic [BAUD_CNT_W-1:0] baud_limit,
  output logic [3:0]            sq_div
);

  // Divide ratio of every baud code, worked out at elaboration.
  typedef logic [BAUD_CNT_W-1:0] limit_tab_t [NUM_BAUD];

  function automatic limit_tab_t make_tab(input int unsigned clk_hz);
    limit_tab_t tab;
    for (int unsigned i = 0; i < NUM_BAUD; i++)
      tab[i] = calc_baud_limit(clk_hz, baud_rate(i));
    return tab;
  endfunction

  localparam limit_tab_t BAUD_TAB = make_tab(CLK_HZ);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wave_sel   <= WAVE_SAW;
      baud_limit <= BAUD_CNT_W'(2);
      sq_div     <= 4'd2;
    end else if (rx_valid) begin
      if (rx_byte == CMD_SAW)   wave_sel <= WAVE_SAW;
      if (rx_byte == CMD_TRI)   wave_sel <= WAVE_TRI;
      if (rx_byte == CMD_STAIR) wave_sel <= WAVE_STAIR;
      if (rx_byte[7:4] == CMD_BAUD_NIBBLE && rx_byte[3:0] < 4'(NUM_BAUD))
        baud_limit <= BAUD_TAB[rx_byte[3:0]];
      if (rx_byte[7:4] == CMD_DIV_NIBBLE && rx_byte[3:0] < 4'(NUM_DIV))
        sq_div <= sq_div_of(32'(rx_byte[3:0]));
    end
  end

endmodule
