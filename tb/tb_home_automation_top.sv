// tb_home_automation_top - end-to-end testbench for the whole controller.
//
// Drives all sensor inputs of home_automation_top at its default parameters
// and compares every actuator output, every clock, with a reference model of
// the controller's rules written here. A directed scenario first takes each
// subsystem through its cases (cold, mild, warm, hot and very hot room; dark
// and bright; smoke; right and wrong passwords up to the door alarm and its
// disarming; low, middle and full tank), then a random stretch mixes them.
// Each mechanism is counted when the controller shows it; one that never
// happened counts as a failure.
module tb_home_automation_top;
  import ha_pkg::*;

  localparam logic [11:0] PWD = DEFAULT_PASSWORD;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              pir, smoke, pwd_valid, lock_req;
  logic signed [7:0] temperature;
  logic [15:0]       lux;
  logic [11:0]       pwd_in;
  logic [6:0]        water_level;
  logic              heater, aircon, lamp, fire_alarm_on, door_unlocked;
  logic              green_light, yellow_light, red_light, door_alarm;
  logic              pump, buzzer;
  fan_speed_t        fan_speed;
  logic [1:0]        trial_count;
  int                checks = 0, failures = 0;

  home_automation_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic       e_heater, e_aircon, e_lamp, e_fire, e_open, e_wrong, e_alarm;
  logic       e_pump, e_buzzer, e_ok;
  logic [1:0] e_fan;
  int         e_trials;

  function automatic void model_reset();
    e_heater = 0; e_aircon = 0; e_fan = 0; e_lamp = 0; e_fire = 0;
    e_open = 0; e_wrong = 0; e_alarm = 0; e_trials = 0; e_ok = 0;
    e_pump = 0; e_buzzer = 0;
  endfunction

  function automatic void model_step();
    int t;
    logic ok_prev;
    ok_prev = e_ok;
    t = int'(temperature);
    e_heater = pir && t < 16;
    e_aircon = pir && t >= 32;
    e_fan    = !pir ? 2'd0 : (t >= 16 && t < 22) ? 2'd1 :
               (t >= 22 && t < 27) ? 2'd2 : (t >= 27 && t < 32) ? 2'd3 : 2'd0;
    e_lamp   = pir && lux <= 16'd200;
    e_pump   = water_level < 7'd90;
    e_buzzer = water_level < 7'd50;
    if (smoke) e_fire = 1;
    else if (ok_prev) e_fire = 0;
    e_ok = 0;
    if (e_open) begin
      if (lock_req) e_open = 0;
    end else if (e_alarm) begin
      if (pwd_valid && pwd_in == PWD) begin
        e_alarm = 0; e_open = 1; e_trials = 0; e_ok = 1;
      end
    end else if (pwd_valid) begin
      if (pwd_in == PWD) begin
        e_open = 1; e_wrong = 0; e_trials = 0; e_ok = 1;
      end else begin
        e_trials++;
        if (e_trials >= 3) begin e_alarm = 1; e_wrong = 0; end
        else e_wrong = 1;
      end
    end
  endfunction

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_HEATER, M_FAN1, M_FAN2, M_FAN3, M_AIRCON, M_HVAC_IDLE, M_LAMP,
    M_LAMP_BRIGHT, M_FIRE, M_FIRE_SILENCED, M_UNLOCK, M_WRONG, M_DOOR_ALARM,
    M_DISARM, M_RELOCK, M_TANK_LOW, M_TANK_MID, M_TANK_FULL, M_COUNT
  } mech_t;
  int   seen[M_COUNT];
  logic prev_fire, prev_open, prev_alarm;

  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (heater)                          seen[M_HEATER]++;
      if (fan_speed == FAN_1)              seen[M_FAN1]++;
      if (fan_speed == FAN_2)              seen[M_FAN2]++;
      if (fan_speed == FAN_3)              seen[M_FAN3]++;
      if (aircon)                          seen[M_AIRCON]++;
      if (!heater && !aircon && fan_speed == FAN_OFF && !pir) seen[M_HVAC_IDLE]++;
      if (lamp)                            seen[M_LAMP]++;
      if (!lamp && pir && lux > 16'd200)   seen[M_LAMP_BRIGHT]++;
      if (fire_alarm_on && !prev_fire)     seen[M_FIRE]++;
      if (!fire_alarm_on && prev_fire)     seen[M_FIRE_SILENCED]++;
      if (door_unlocked && !prev_open && !prev_alarm) seen[M_UNLOCK]++;
      if (door_unlocked && prev_alarm)     seen[M_DISARM]++;
      if (!door_unlocked && prev_open)     seen[M_RELOCK]++;
      if (yellow_light)                    seen[M_WRONG]++;
      if (door_alarm && !prev_alarm)       seen[M_DOOR_ALARM]++;
      if (pump && buzzer)                  seen[M_TANK_LOW]++;
      if (pump && !buzzer)                 seen[M_TANK_MID]++;
      if (!pump && !buzzer)                seen[M_TANK_FULL]++;
    end
    prev_fire  = fire_alarm_on;
    prev_open  = door_unlocked;
    prev_alarm = door_alarm;
  end

  // ---------------- stimulus ----------------
  task automatic compare(input string what);
    checks++;
    if (heater !== e_heater || aircon !== e_aircon || fan_speed !== fan_speed_t'(e_fan) ||
        lamp !== e_lamp || fire_alarm_on !== e_fire ||
        door_unlocked !== e_open || green_light !== e_open ||
        yellow_light !== e_wrong || red_light !== e_alarm ||
        door_alarm !== e_alarm || int'(trial_count) != e_trials ||
        pump !== e_pump || buzzer !== e_buzzer) begin
      failures++;
      $display("FAIL %s @%0t: heat=%0b fan=%0d ac=%0b lamp=%0b fire=%0b open=%0b g=%0b y=%0b r=%0b da=%0b tc=%0d pump=%0b buz=%0b",
               what, $time, heater, fan_speed, aircon, lamp, fire_alarm_on,
               door_unlocked, green_light, yellow_light, red_light,
               door_alarm, trial_count, pump, buzzer);
      $display("     expected       heat=%0b fan=%0d ac=%0b lamp=%0b fire=%0b open=%0b y=%0b alarm=%0b tc=%0d pump=%0b buz=%0b",
               e_heater, e_fan, e_aircon, e_lamp, e_fire, e_open, e_wrong,
               e_alarm, e_trials, e_pump, e_buzzer);
    end
  endtask

  // Apply one set of sensor readings for one clock and check the response.
  task automatic cycle(input string what);
    model_step();
    @(posedge clk); #1;
    compare(what);
    @(negedge clk);
    pwd_valid = 1'b0; lock_req = 1'b0;
  endtask

  task automatic enter(input logic [11:0] p, input string what);
    pwd_valid = 1'b1; pwd_in = p;
    cycle(what);
  endtask

  initial begin
    rst_n = 1'b0; pir = 0; temperature = 8'sd20; lux = 16'd500; smoke = 0;
    pwd_valid = 0; pwd_in = '0; lock_req = 0; water_level = 7'd70;
    model_reset();
    prev_fire = 0; prev_open = 0; prev_alarm = 0;
    repeat (3) @(posedge clk); #1;
    compare("reset");
    @(negedge clk) rst_n = 1'b1;

    // HVAC: empty room, then the five temperature bands
    temperature = 8'sd10; cycle("empty room");
    pir = 1;
    foreach (temps[i]) begin
      temperature = temps[i]; cycle($sformatf("T=%0d", temps[i]));
    end
    // Lighting
    lux = 16'd150; cycle("dark with motion");
    lux = 16'd200; cycle("200 lux with motion");
    lux = 16'd201; cycle("bright with motion");
    pir = 0; lux = 16'd50; cycle("dark, no motion");
    // Water tank
    water_level = 7'd20; cycle("tank low");
    water_level = 7'd50; cycle("tank at 50");
    water_level = 7'd89; cycle("tank at 89");
    water_level = 7'd90; cycle("tank at 90");
    water_level = 7'd100; cycle("tank full");
    // Door lock
    enter(PWD, "correct password");
    cycle("door open");
    lock_req = 1; cycle("relock");
    enter(12'h111, "wrong 1");
    enter(12'h222, "wrong 2");
    enter(12'h333, "wrong 3 -> alarm");
    cycle("alarm holds");
    enter(12'h444, "wrong during alarm");
    enter(PWD, "disarm");
    lock_req = 1; cycle("relock after disarm");
    // Fire alarm, silenced by the password once the smoke is gone
    smoke = 1; cycle("smoke");
    smoke = 1; cycle("smoke holds");
    smoke = 0; cycle("smoke gone, latched");
    enter(PWD, "password silences");
    cycle("silenced");
    lock_req = 1; cycle("relock");

    // Random mix of everything
    repeat (3000) begin
      pir         = 1'($urandom);
      temperature = 8'($urandom_range(0, 50) - 5);
      lux         = 16'($urandom_range(100, 300));
      smoke       = ($urandom_range(0, 30) == 0);
      water_level = 7'($urandom_range(0, 110));
      pwd_valid   = ($urandom_range(0, 3) == 0);
      pwd_in      = ($urandom_range(0, 2) == 0) ? PWD : 12'($urandom);
      lock_req    = ($urandom_range(0, 4) == 0);
      cycle("random");
    end

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %-16s seen %0d times", mech_t'(m), seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_t'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0] temps[] = '{-8'sd5, 8'sd15, 8'sd16, 8'sd21, 8'sd22,
                                 8'sd26, 8'sd27, 8'sd31, 8'sd32, 8'sd40};
endmodule
