// Baud rate generator.
//
// A down counter divides the system clock by the 16-bit ratio cnt_limit and
// emits a one-clock enable pulse, ck_en, once per period. The UART
// transmitter and receiver advance one bit per ck_en. When the counter is
// zero it pulses ck_en and reloads; otherwise it counts down. The period is
// exactly cnt_limit clocks, so ratios 2 .. 65535 are possible; a smaller
// value is treated as 2, the minimum the design allows.
//
// Follows the original flowchart: reset loads the counter with 1 and clears
// ck_en, and the pulse comes when the counter is zero. The flowchart prints
// the reload value twice (cnt_limit and cnt_limit-1); this design reloads
// cnt_limit-1 and counts down by one, which makes the ratio exactly
// cnt_limit. ck_en is registered; it is a pulse, not a square wave.
//
// Timing: asynchronous active-high reset; ck_en first goes high on the
// second clock edge after reset is released, then one every cnt_limit clocks. A new cnt_limit takes effect at
// the next reload.
module baud_gen #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] cnt_limit,
  output logic             ck_en
);

  logic [CNT_W-1:0] counter;
  logic [CNT_W-1:0] limit_eff;

  assign limit_eff = (cnt_limit < CNT_W'(2)) ? CNT_W'(2) : cnt_limit;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      counter <= CNT_W'(1);
      ck_en   <= 1'b0;
    end else if (counter == '0) begin
      ck_en   <= 1'b1;
      counter <= limit_eff - CNT_W'(1);
    end else begin
      ck_en   <= 1'b0;
      counter <= counter - CNT_W'(1);
    end
  end

endmodule
