// Parity generator.
//
// XORs all bits of the data word. The result is the even-parity bit: the
// word plus this bit holds an even number of ones. Used by the transmitter to
// append a parity bit and by the receiver to check the one it received.
// Purely combinational.
module parity_gen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] data,
  output logic         parity
);

  always_comb begin
    parity = 1'b0;
    for (int i = 0; i < W; i++) parity = parity ^ data[i];
  end

endmodule
