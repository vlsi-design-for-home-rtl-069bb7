// hvac_ctrl - heating, ventilation and air-conditioning selector.
//
// While the PIR sensor reports someone in the room, the signed 8-bit
// temperature reading (degrees C) picks exactly one actuator:
//   T < 16         heater
//   16 <= T < 22   fan, speed 1
//   22 <= T < 27   fan, speed 2
//   27 <= T < 32   fan, speed 3
//   T >= 32        air conditioner
// With no motion everything is off. The bands follow the controller
// specification; switching off an empty room, the signed reading and the
// treatment of exactly 32 degrees (air conditioner) are choices of this
// design.
//
// Interface: motion and temperature are sampled on the rising edge of clk;
// heater, fan_speed and aircon are registered, so they follow the inputs one
// clock later. rst_n is an active-low synchronous reset that turns all
// actuators off.
module hvac_ctrl
  import ha_pkg::*;
#(
  parameter int unsigned W         = TEMP_W,
  parameter int          HEAT_BELOW = T_HEAT_BELOW,
  parameter int          FAN2_FROM  = T_FAN2_FROM,
  parameter int          FAN3_FROM  = T_FAN3_FROM,
  parameter int          AC_FROM    = T_AC_FROM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                motion,
  input  logic signed [W-1:0] temperature,
  output logic                heater,
  output fan_speed_t          fan_speed,
  output logic                aircon
);

  logic       heater_d, aircon_d;
  fan_speed_t fan_d;
  int         t;

  always_comb begin
    t        = int'(temperature);
    heater_d = 1'b0;
    aircon_d = 1'b0;
    fan_d    = FAN_OFF;
    if (motion) begin
      if (t < HEAT_BELOW)      heater_d = 1'b1;
      else if (t < FAN2_FROM)  fan_d    = FAN_1;
      else if (t < FAN3_FROM)  fan_d    = FAN_2;
      else if (t < AC_FROM)    fan_d    = FAN_3;
      else                     aircon_d = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      heater    <= 1'b0;
      fan_speed <= FAN_OFF;
      aircon    <= 1'b0;
    end else begin
      heater    <= heater_d;
      fan_speed <= fan_d;
      aircon    <= aircon_d;
    end
  end

  // Never more than one actuator at a time.
  a_one_actuator: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({heater, aircon, fan_speed != FAN_OFF}));

endmodule
