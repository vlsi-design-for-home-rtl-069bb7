// tb_fire_alarm - self-checking testbench for fire_alarm.
//
// Checks that smoke raises the alarm one clock later, that the alarm stays
// latched after the smoke clears, that silence has no effect while smoke is
// present, and that silence clears it once the smoke is gone. Ends with a
// random stretch compared against a one-line reference model.
module tb_fire_alarm;
  logic clk = 1'b0;
  logic rst_n;
  logic smoke, silence;
  logic alarm;
  logic model;
  int   checks = 0, failures = 0;

  fire_alarm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic q, input logic want,
                      input string what);
    @(negedge clk);
    smoke = s; silence = q;
    @(posedge clk); #1;
    checks++;
    if (alarm !== want) begin
      failures++;
      $display("FAIL %s: alarm=%0b want %0b", what, alarm, want);
    end
  endtask

  initial begin
    rst_n = 1'b0; smoke = 1'b1; silence = 1'b0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (alarm !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1; smoke = 1'b0;
    step(0, 0, 0, "idle");
    step(0, 1, 0, "silence while idle");
    step(1, 0, 1, "smoke raises alarm");
    step(1, 1, 1, "silence ignored during smoke");
    step(0, 0, 1, "alarm latched after smoke");
    step(0, 0, 1, "alarm still latched");
    step(0, 1, 0, "silence clears alarm");
    step(0, 0, 0, "stays clear");
    model = 1'b0;
    repeat (1000) begin
      logic s, q;
      s = ($urandom_range(0, 9) == 0);
      q = ($urandom_range(0, 4) == 0);
      if (s) model = 1'b1;
      else if (q) model = 1'b0;
      step(s, q, model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
