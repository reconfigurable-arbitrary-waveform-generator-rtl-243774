// Variable-frequency square wave.
//
// Divides the clock by div (2 .. 15): a counter runs 0 .. div-1 and the
// output is high for the first div/2 counts (rounded down) and low for the
// rest, so the wave has period div clocks. The original offers division by
// 2, 7 and 15; how it is built is this design's choice. A new div takes
// effect at once; a count already past the new limit restarts at zero.
// Asynchronous active-high reset.
module square_gen #(
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] div,
  output logic          wave
);

  logic [DW-1:0] cnt;
  logic [DW-1:0] div_eff;

  assign div_eff = (div < DW'(2)) ? DW'(2) : div;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt  <= '0;
      wave <= 1'b1;
    end else begin
      if (cnt >= div_eff - DW'(1)) cnt <= '0;
      else                         cnt <= cnt + DW'(1);
      // wave is the registered value of "next count is in the first half"
      if (cnt >= div_eff - DW'(1)) wave <= 1'b1;
      else                         wave <= (cnt + DW'(1)) < (div_eff >> 1);
    end
  end

endmodule
