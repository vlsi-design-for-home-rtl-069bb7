// water_tank_ctrl - water tank pump and low-level buzzer.
//
// A 7-bit sensor gives the water level in percent. The three bands of the
// controller specification are decoded:
//   level < 50 %          pump on,  buzzer on  (tank low)
//   50 % <= level < 90 %  pump on,  buzzer off
//   level >= 90 %         pump off, buzzer off (tank full)
// The specification writes the middle band as "50 % <= level <= 90 %" and the
// top band as "level >= 90 %"; at exactly 90 % this design follows the top
// band and stops the pump. Readings above 100 count as full.
//
// Interface: level is sampled on the rising edge of clk; pump and buzzer are
// registered and follow it one clock later. rst_n is an active-low
// synchronous reset that turns both off.
module water_tank_ctrl
  import ha_pkg::*;
#(
  parameter int unsigned W         = LEVEL_W,
  parameter int unsigned LOW_BELOW = LEVEL_LOW_BELOW,
  parameter int unsigned FULL_FROM = LEVEL_FULL_FROM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] level,
  output logic         pump,
  output logic         buzzer
);

  logic low, full;

  assign low  = (32'(level) <  LOW_BELOW);
  assign full = (32'(level) >= FULL_FROM);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pump   <= 1'b0;
      buzzer <= 1'b0;
    end else begin
      pump   <= !full;
      buzzer <= low;
    end
  end

  a_buzzer_needs_pump: assert property (@(posedge clk) disable iff (!rst_n)
    buzzer |-> pump);

endmodule
