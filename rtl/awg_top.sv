// Reconfigurable arbitrary waveform generator, FPGA side.
//
// A PC sends one-byte code words over a serial line (rx_in). The UART
// receives them and the command decoder selects the waveform on the 12-bit
// DAC bus, the baud rate of the link and the division of the square-wave
// output. The three waveform generators (sawtooth, triangular, staircase)
// run all the time from clk; a multiplexer picks one and the result is
// registered onto dac_out. The square wave sq_wave is the clock divided by
// 2, 7 or 15. The UART transmitter is brought out (tx_load, tx_din,
// tx_busy, tx_out) for sending bytes back to the PC. Bytes received with a
// parity error are not acted on.
//
// After reset: sawtooth on the DAC, baud tick at half the clock frequency,
// square wave at clk/2, parity off unless parity_en is high. dac_out follows
// the selected generator with one clock of delay; a new setting takes effect
// two clocks after the receiver's rx_done.
//
// The parts and their defaults follow the original system; how the received
// code words are encoded, the output register and the transmit port are this
// design's choices. rst is active high; the triangular generator samples it
// synchronously and the other blocks asynchronously, as in the original
// flowcharts, so rst must be held for at least one clock edge.
module awg_top
  import awg_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_843_200
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             parity_en,
  // serial link to the PC
  input  logic             rx_in,
  output logic             tx_out,
  // transmitter access
  input  logic             tx_load,
  input  logic [7:0]       tx_din,
  output logic             tx_busy,
  // receiver status
  output logic [7:0]       rx_data,
  output logic             rx_full,
  output logic             rx_parity_error,
  output logic             baud_tick,
  // outputs
  output logic [DAC_W-1:0] dac_out,
  output logic             sq_wave,
  output wave_sel_e        wave_sel
);

  logic                  rx_done;
  logic [BAUD_CNT_W-1:0] baud_limit;
  logic [3:0]            sq_div;
  logic [DAC_W-1:0]      saw, tri_w, stair;

  uart u_uart (
    .clk, .rst,
    .cnt_limit   (baud_limit),
    .parity_en,
    .load        (tx_load),
    .din         (tx_din),
    .tro         (tx_out),
    .busy        (tx_busy),
    .rx_in,
    .dout        (rx_data),
    .full        (rx_full),
    .parity_error(rx_parity_error),
    .rx_done,
    .baud_tick
  );

  cmd_decoder #(.CLK_HZ(CLK_HZ)) u_cmd (
    .clk, .rst,
    .rx_valid  (rx_done && !rx_parity_error),
    .rx_byte   (rx_data),
    .wave_sel,
    .baud_limit,
    .sq_div
  );

  sawtooth_gen  #(.W(DAC_W)) u_saw   (.clk, .rst, .wave(saw));
  triangle_gen  #(.W(DAC_W)) u_tri   (.clk, .rst, .wave(tri_w));
  staircase_gen #(.W(DAC_W)) u_stair (.clk, .rst, .wave(stair));
  square_gen    #(.DW(4))    u_sq    (.clk, .rst, .div(sq_div), .wave(sq_wave));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) dac_out <= '0;
    else begin
      unique case (wave_sel)
        WAVE_TRI:   dac_out <= tri_w;
        WAVE_STAIR: dac_out <= stair;
        default:    dac_out <= saw;
      endcase
    end
  end

endmodule
