// home_automation_top - home automation system controller.
//
// One clocked controller that turns sensor readings into actuator commands
// for four household subsystems:
//   HVAC        hvac_ctrl        PIR + 8-bit temperature -> heater, fan 1-3,
//                                air conditioner
//   lighting    lighting_ctrl    PIR + lux reading        -> lamp
//   security    fire_alarm       smoke sensor             -> fire alarm
//               door_lock        12-bit password entry    -> door unlock,
//                                green/yellow/red light, door alarm
//   water tank  water_tank_ctrl  7-bit level in percent   -> pump, buzzer
// The split into these five subsystems and their rules follow the
// controller specification. One PIR sensor serves both the HVAC and the
// lighting controller, and an accepted password also silences a latched fire
// alarm; both are choices of this design. The design targets a 142.86 MHz
// clock (7 ns period).
//
// Interface: all sensor inputs are expected synchronous to clk (sampled on
// its rising edge); every actuator output is registered and answers its
// inputs one clock later. rst_n is an active-low synchronous reset that puts
// every actuator off and the door locked.
module home_automation_top
  import ha_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // sensors
  input  logic                     pir,
  input  logic signed [TEMP_W-1:0] temperature,
  input  logic [LUX_W-1:0]         lux,
  input  logic                     smoke,
  input  logic                     pwd_valid,
  input  logic [PWD_W-1:0]         pwd_in,
  input  logic                     lock_req,
  input  logic [LEVEL_W-1:0]       water_level,
  // HVAC actuators
  output logic                     heater,
  output fan_speed_t               fan_speed,
  output logic                     aircon,
  // lighting
  output logic                     lamp,
  // security
  output logic                     fire_alarm_on,
  output logic                     door_unlocked,
  output logic                     green_light,
  output logic                     yellow_light,
  output logic                     red_light,
  output logic                     door_alarm,
  output logic [1:0]               trial_count,
  // water tank
  output logic                     pump,
  output logic                     buzzer
);

  logic pwd_ok;

  hvac_ctrl u_hvac (
    .clk, .rst_n,
    .motion      (pir),
    .temperature (temperature),
    .heater      (heater),
    .fan_speed   (fan_speed),
    .aircon      (aircon)
  );

  lighting_ctrl u_lighting (
    .clk, .rst_n,
    .motion (pir),
    .lux    (lux),
    .lamp   (lamp)
  );

  fire_alarm u_fire (
    .clk, .rst_n,
    .smoke   (smoke),
    .silence (pwd_ok),
    .alarm   (fire_alarm_on)
  );

  door_lock u_door (
    .clk, .rst_n,
    .pwd_valid   (pwd_valid),
    .pwd_in      (pwd_in),
    .lock_req    (lock_req),
    .unlocked    (door_unlocked),
    .green       (green_light),
    .yellow      (yellow_light),
    .red         (red_light),
    .door_alarm  (door_alarm),
    .trial_count (trial_count),
    .pwd_ok      (pwd_ok)
  );

  water_tank_ctrl u_tank (
    .clk, .rst_n,
    .level  (water_level),
    .pump   (pump),
    .buzzer (buzzer)
  );

endmodule
