// lighting_ctrl - occupancy- and daylight-controlled lamp.
//
// The lamp is lit when the PIR sensor reports motion and the light sensor
// reads at most 200 lux, as the controller specification states. The width
// of the lux reading (16 bits, as common digital light sensors deliver) is a
// choice of this design.
//
// Interface: motion and lux are sampled on the rising edge of clk; lamp is
// registered and follows them one clock later. rst_n is an active-low
// synchronous reset that turns the lamp off.
module lighting_ctrl
  import ha_pkg::*;
#(
  parameter int unsigned W      = LUX_W,
  parameter int unsigned ON_MAX = LUX_ON_MAX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         motion,
  input  logic [W-1:0] lux,
  output logic         lamp
);

  logic dark;

  assign dark = (32'(lux) <= ON_MAX);

  always_ff @(posedge clk) begin
    if (!rst_n) lamp <= 1'b0;
    else        lamp <= dark && motion;
  end

endmodule
