// UART receiver section: receive shift register, buffer and parity checker.
//
// rx_in passes a two-flop synchronizer and is then sampled once per baud
// tick (baud_en). A state machine with one state per bit walks
//   IDLE -> B0 .. B7 -> [PARITY when parity_en] -> STOP -> IDLE.
// IDLE waits for a 0 on the line (the start bit). In B0..B7 the sampled bit
// is shifted into the receive shift register, least significant bit first.
// PARITY stores the received parity bit. In STOP the shift register is
// copied to the receive buffer (dout), full is set, parity_error is updated
// and rx_done pulses for one clock. The parity checker XORs the received
// data bits and compares the result with the received parity bit; with
// parity_en low parity_error is 0. The value of the stop bit is not checked.
//
// The state sequence follows the original receiver state diagram. Sampling
// once per bit (no oversampling) is the original scheme as well; it needs the
// sender's bit clock to keep a fixed phase to baud_en. The synchronizer, the
// rx_done strobe and full staying set once a byte has arrived are this
// design's choices. dout keeps the last byte until the next one is complete.
//
// Timing: asynchronous active-high reset. rx_done comes on the clock after
// the baud tick that samples the stop bit.
module uart_rx
  import awg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_en,
  input  logic       rx_in,
  input  logic       parity_en,
  output logic [7:0] dout,
  output logic       full,
  output logic       parity_error,
  output logic       rx_done
);

  rx_state_e  state;
  logic [1:0] sync;
  logic       rx_s;
  logic [7:0] sreg;
  logic       pbit;
  logic       par;

  assign rx_s = sync[1];

  parity_gen #(.W(8)) u_parity (.data(sreg), .parity(par));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx_in};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state        <= RX_IDLE;
      sreg         <= '0;
      pbit         <= 1'b0;
      dout         <= '0;
      full         <= 1'b0;
      parity_error <= 1'b0;
      rx_done      <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      if (baud_en) begin
        unique case (state)
          RX_IDLE: if (!rx_s) state <= RX_B0;
          RX_B0, RX_B1, RX_B2, RX_B3, RX_B4, RX_B5, RX_B6: begin
            sreg  <= {rx_s, sreg[7:1]};
            state <= rx_state_e'(state + 4'd1);
          end
          RX_B7: begin
            sreg  <= {rx_s, sreg[7:1]};
            state <= parity_en ? RX_PARITY : RX_STOP;
          end
          RX_PARITY: begin
            pbit  <= rx_s;
            state <= RX_STOP;
          end
          RX_STOP: begin
            dout         <= sreg;
            full         <= 1'b1;
            parity_error <= parity_en && (par != pbit);
            rx_done      <= 1'b1;
            state        <= RX_IDLE;
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

endmodule
