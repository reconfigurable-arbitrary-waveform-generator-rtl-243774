// UART transmitter section: transmit buffer, shift register and parity.
//
// A one-clock pulse on load while busy is low copies din into the transmit
// buffer and raises busy at once. On the next baud tick (baud_en) the
// 11-bit shift register is filled with the frame
//   { parity_bit or 1, din[7:0], 0 (start), 1 (idle) }
// and shifted right by one in the same tick, so the start bit appears on
// tro immediately. Every later tick shifts a 1 in from the top and
// increments a bit counter; tro is bit 0 of the register. Data go out least
// significant bit first. When the counter reaches 11, busy falls while the
// line is already back at 1 (stop). With parity_en low, the top bit is a 1,
// so the frame is start, 8 data bits and stop bits. The parity bit is even
// parity (XOR of the data bits).
//
// Frame layout, counter limit of 11 and the shift-in of ones follow the
// original transmitter flowchart. Holding the byte in the buffer until the
// next baud tick (so that load can come on any clock) is this design's
// choice; busy covers that wait as well.
//
// Timing: asynchronous active-high reset leaves tro at 1. The start bit
// begins on the first baud tick after load; busy stays high for that wait
// plus 10 further baud periods.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_en,
  input  logic       load,
  input  logic [7:0] din,
  input  logic       parity_en,
  output logic       tro,
  output logic       busy
);

  localparam int unsigned FRAME_W = 11;

  logic [7:0]         tx_buf;
  logic               pending;
  logic               shifting;
  logic [FRAME_W-1:0] sreg;
  logic [3:0]         cnt;
  logic               par;
  logic [FRAME_W-1:0] frame_sh;

  parity_gen #(.W(8)) u_parity (.data(tx_buf), .parity(par));

  // Frame {parity or 1, data, start 0, idle 1} after its first shift.
  assign frame_sh = {1'b1, (parity_en ? par : 1'b1), tx_buf, 1'b0};
  assign busy  = pending | shifting;
  assign tro   = sreg[0];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tx_buf   <= '0;
      pending  <= 1'b0;
      shifting <= 1'b0;
      sreg     <= '1;
      cnt      <= '0;
    end else begin
      if (load && !busy) begin
        tx_buf  <= din;
        pending <= 1'b1;
      end
      if (baud_en) begin
        if (pending) begin
          sreg     <= frame_sh;
          cnt      <= 4'd1;
          shifting <= 1'b1;
          pending  <= 1'b0;
        end else begin
          sreg <= {1'b1, sreg[FRAME_W-1:1]};
          if (shifting) begin
            cnt <= cnt + 4'd1;
            if (cnt + 4'd1 == 4'(FRAME_W)) shifting <= 1'b0;
          end
        end
      end
    end
  end

endmodule
