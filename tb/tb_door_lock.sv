// tb_door_lock - self-checking testbench for door_lock.
//
// A scripted sequence walks through every rule: correct password opens the
// door with the green light, lock_req relocks it, wrong attempts count up
// with the yellow light, the third wrong attempt sounds the door alarm with
// the red light, wrong attempts during the alarm are ignored, and a correct
// password disarms it. A random stretch then compares all outputs with a
// reference model written here. The password under test is overridden to
// 12'h3E7 so the test does not rely on the default.
module tb_door_lock;
  localparam logic [11:0] PWD = 12'h3E7;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        pwd_valid, lock_req;
  logic [11:0] pwd_in;
  logic        unlocked, green, yellow, red, door_alarm, pwd_ok;
  logic [1:0]  trial_count;
  int          checks = 0, failures = 0;

  // reference model state
  int m_trials;
  logic m_open, m_alarm, m_wrong, m_ok;

  door_lock #(.SAVED_PWD(PWD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model_step(input logic v, input logic [11:0] p,
                                     input logic l);
    m_ok = 1'b0;
    if (m_open) begin
      if (l) m_open = 1'b0;
    end else if (m_alarm) begin
      if (v && p == PWD) begin
        m_alarm = 0; m_open = 1; m_trials = 0; m_ok = 1;
      end
    end else if (v) begin
      if (p == PWD) begin
        m_open = 1; m_wrong = 0; m_trials = 0; m_ok = 1;
      end else begin
        m_trials++;
        if (m_trials >= 3) begin m_alarm = 1; m_wrong = 0; end
        else m_wrong = 1;
      end
    end
    if (m_open) m_wrong = 0;
  endfunction

  task automatic step(input logic v, input logic [11:0] p, input logic l,
                      input string what);
    @(negedge clk);
    pwd_valid = v; pwd_in = p; lock_req = l;
    model_step(v, p, l);
    @(posedge clk); #1;
    checks++;
    if (unlocked !== m_open || green !== m_open || yellow !== m_wrong ||
        red !== m_alarm || door_alarm !== m_alarm || pwd_ok !== m_ok ||
        int'(trial_count) != m_trials) begin
      failures++;
      $display("FAIL %s: open=%0b g=%0b y=%0b r=%0b alarm=%0b ok=%0b trials=%0d; want open=%0b y=%0b alarm=%0b ok=%0b trials=%0d",
               what, unlocked, green, yellow, red, door_alarm, pwd_ok,
               trial_count, m_open, m_wrong, m_alarm, m_ok, m_trials);
    end
  endtask

  initial begin
    rst_n = 1'b0; pwd_valid = 1'b0; pwd_in = PWD; lock_req = 1'b0;
    m_trials = 0; m_open = 0; m_alarm = 0; m_wrong = 0; m_ok = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    step(0, PWD, 0, "idle after reset");
    // correct password
    step(1, PWD, 0, "correct password unlocks");
    step(0, 12'h000, 0, "stays open");
    step(1, 12'h123, 0, "attempt ignored while open");
    step(0, 12'h000, 1, "lock request relocks");
    // one wrong, then right: trial count must clear
    step(1, 12'h3E6, 0, "wrong #1");
    step(0, 12'h000, 0, "yellow holds");
    step(1, PWD, 0, "correct clears trials");
    step(0, 12'h000, 1, "relock");
    // three wrong: alarm
    step(1, 12'h000, 0, "wrong #1");
    step(1, 12'hFFF, 0, "wrong #2");
    step(0, 12'h000, 1, "lock_req ignored while locked");
    step(1, 12'h7E3, 0, "wrong #3 sounds alarm");
    step(1, 12'h3E8, 0, "wrong during alarm ignored");
    step(0, PWD, 0, "no strobe, no effect");
    step(1, PWD, 0, "correct password disarms");
    step(0, 12'h000, 1, "relock");
    // random stretch, often the right password
    repeat (2000) begin
      logic v, l; logic [11:0] p;
      v = ($urandom_range(0, 2) == 0);
      l = ($urandom_range(0, 5) == 0);
      p = ($urandom_range(0, 3) == 0) ? PWD : (PWD ^ 12'(1 << $urandom_range(0, 11)));
      step(v, p, l, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
