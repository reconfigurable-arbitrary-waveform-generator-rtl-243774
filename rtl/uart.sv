// UART: baud rate generator, transmitter section and receiver section.
//
// One baud generator divides clk by cnt_limit and its tick drives both the
// transmitter and the receiver, so both run at the same bit rate. The
// transmitter sends din when load is pulsed (busy high until done) and the
// receiver delivers each byte on dout with full, parity_error and a
// one-clock rx_done. parity_en switches the even parity bit on for both
// directions. Frame: start bit, 8 data bits LSB first, optional even
// parity, stop bit.
//
// The split into these three sections and the shared baud generator follow
// the original UART block diagram; rx_done and baud_tick are brought out by
// this design for the command decoder and for observation.
module uart (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [awg_pkg::BAUD_CNT_W-1:0]   cnt_limit,
  input  logic                             parity_en,
  // transmitter
  input  logic                             load,
  input  logic [7:0]                       din,
  output logic                             tro,
  output logic                             busy,
  // receiver
  input  logic                             rx_in,
  output logic [7:0]                       dout,
  output logic                             full,
  output logic                             parity_error,
  output logic                             rx_done,
  output logic                             baud_tick
);

  baud_gen #(.CNT_W(awg_pkg::BAUD_CNT_W)) u_baud (
    .clk, .rst, .cnt_limit, .ck_en(baud_tick)
  );

  uart_tx u_tx (
    .clk, .rst, .baud_en(baud_tick), .load, .din, .parity_en, .tro, .busy
  );

  uart_rx u_rx (
    .clk, .rst, .baud_en(baud_tick), .rx_in, .parity_en,
    .dout, .full, .parity_error, .rx_done
  );

endmodule
