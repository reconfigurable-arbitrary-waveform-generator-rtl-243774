// Sawtooth waveform generator.
//
// A W-bit counter rises by one on every clock; after its highest value
// (all ones) it returns to zero, giving a ramp with a period of 2^W clocks.
// The value drives the DAC. Follows the original flowchart, including the
// asynchronous active-high reset to zero.
module sawtooth_gen #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] wave
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              wave <= '0;
    else if (wave == '1)  wave <= '0;
    else                  wave <= wave + W'(1);
  end

endmodule
