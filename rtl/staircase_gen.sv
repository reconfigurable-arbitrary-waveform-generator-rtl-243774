// Staircase waveform generator.
//
// A step counter i counts clocks; when it reaches STEP_CLKS (1000) it
// restarts at zero and the W-bit level rises by STEP_HEIGHT (78,
// 12'b0000_0100_1110). STEP_CLKS sets the width of a stair and STEP_HEIGHT
// its height. When a further step would pass the highest W-bit value the
// level returns to zero instead. With the defaults the levels are
// 0, 78, ..., 4056 (53 stairs) and the period is 53,000 clocks.
//
// Width and height follow the original design. The original only says the
// level is reset "once it reaches its maximum"; since 78 never lands exactly
// on 4095, this design resets when the next step would overflow. Reset is
// asynchronous, active high, to level 0 and i = 0; the first step comes
// STEP_CLKS clocks after reset.
module staircase_gen #(
  parameter int unsigned W           = 12,
  parameter int unsigned STEP_CLKS   = 1000,
  parameter int unsigned STEP_HEIGHT = 78
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] wave
);

  localparam int unsigned IW = $clog2(STEP_CLKS + 1);
  localparam logic [W-1:0] LAST_OK = W'((2 ** W) - 1 - STEP_HEIGHT);

  logic [IW-1:0] i;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      i    <= '0;
      wave <= '0;
    end else if (i + IW'(1) == IW'(STEP_CLKS)) begin
      i    <= '0;
      wave <= (wave > LAST_OK) ? '0 : wave + W'(STEP_HEIGHT);
    end else begin
      i    <= i + IW'(1);
    end
  end

endmodule
