// ha_pkg - types and thresholds shared by the home automation controller.
//
// The thresholds are the ones of the controller specification: HVAC bands
// at 16, 22, 27 and 32 degrees C, lamp on at or below 200 lux, water tank
// pump/buzzer bands at 50 % and 90 %, three password trials, 12-bit
// password. The field widths that the specification does not fix (lux
// reading, trial counter) and the encodings of the enums are choices of this
// design.
package ha_pkg;

  // Sensor widths
  localparam int unsigned TEMP_W  = 8;   // signed two's-complement degrees C
  localparam int unsigned LUX_W   = 16;  // lux reading (width chosen here)
  localparam int unsigned LEVEL_W = 7;   // water level in percent, 0..100
  localparam int unsigned PWD_W   = 12;  // three hexadecimal digits

  // HVAC band edges in degrees C
  localparam int T_HEAT_BELOW = 16;  // below: heater
  localparam int T_FAN2_FROM  = 22;  // 16..21: fan 1, 22..26: fan 2
  localparam int T_FAN3_FROM  = 27;  // 27..31: fan 3
  localparam int T_AC_FROM    = 32;  // 32 and above: air conditioner

  // Lighting
  localparam int unsigned LUX_ON_MAX = 200;  // lamp may light at or below

  // Water tank band edges in percent
  localparam int unsigned LEVEL_LOW_BELOW = 50;  // below: pump and buzzer
  localparam int unsigned LEVEL_FULL_FROM = 90;  // at or above: pump off

  // Door lock
  localparam int unsigned MAX_TRIALS = 3;
  localparam logic [PWD_W-1:0] DEFAULT_PASSWORD = 12'hA5C;

  // Fan speed selected by the HVAC controller
  typedef enum logic [1:0] {
    FAN_OFF = 2'd0,
    FAN_1   = 2'd1,
    FAN_2   = 2'd2,
    FAN_3   = 2'd3
  } fan_speed_t;

  // Door lock states
  typedef enum logic [1:0] {
    LOCK_IDLE   = 2'd0,  // locked, no attempt pending, all lights off
    LOCK_OPEN   = 2'd1,  // door unlocked, green light
    LOCK_WRONG  = 2'd2,  // last attempt wrong, yellow light
    LOCK_ALARM  = 2'd3   // trial limit reached, door alarm, red light
  } lock_state_t;

endpackage
