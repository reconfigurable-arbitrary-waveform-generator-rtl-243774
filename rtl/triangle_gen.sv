// Triangular waveform generator.
//
// A W-bit up/down counter with a direction flag. While the flag is set the
// counter rises by one per clock, otherwise it falls by one. The flag is
// cleared on the clock where the counter, before counting, equals UP_TURN
// (12'b0111_1111_1110) and set where it equals DOWN_TURN (2). With the
// defaults the output runs 1, 2, ..., 2047, 2046, ..., 1, 2, ... with a
// period of 4092 clocks.
//
// Turning values, reset value (counter 1, flag set) and the synchronous
// reset follow the original flowchart. The comparison uses the value before
// the count, as a clocked process with signals does; that choice makes the
// wave span 1 .. 2047.
module triangle_gen #(
  parameter int unsigned W         = 12,
  parameter int unsigned UP_TURN   = 2046,
  parameter int unsigned DOWN_TURN = 2
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] wave
);

  logic up;

  always_ff @(posedge clk) begin
    if (rst) begin
      wave <= W'(1);
      up   <= 1'b1;
    end else if (up) begin
      wave <= wave + W'(1);
      if (wave == W'(UP_TURN)) up <= 1'b0;
    end else begin
      wave <= wave - W'(1);
      if (wave == W'(DOWN_TURN)) up <= 1'b1;
    end
  end

endmodule
