// tb_hvac_ctrl - self-checking testbench for hvac_ctrl.
//
// Sweeps every signed 8-bit temperature with and without motion and compares
// heater, fan speed and air conditioner, one clock after the inputs were
// applied, with the band table worked out here from plain integer limits
// (heater below 16, fan 1/2/3 from 16/22/27, air conditioner from 32). Also
// checks the reset state and that the outputs wait exactly one clock.
module tb_hvac_ctrl;
  import ha_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              motion;
  logic signed [7:0] temperature;
  logic              heater, aircon;
  fan_speed_t        fan_speed;
  int                checks = 0, failures = 0;

  hvac_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic h, input logic [1:0] f, input logic a,
                            input string what);
    checks++;
    if (heater !== h || fan_speed !== fan_speed_t'(f) || aircon !== a) begin
      failures++;
      $display("FAIL %s: got heater=%0b fan=%0d ac=%0b, want %0b %0d %0b",
               what, heater, fan_speed, aircon, h, f, a);
    end
  endtask

  initial begin
    rst_n = 1'b0; motion = 1'b1; temperature = 8'sd10;
    repeat (2) @(posedge clk);
    #1 expect_out(1'b0, 2'd0, 1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      for (int t = -128; t < 128; t++) begin
        logic h, a; logic [1:0] f;
        @(negedge clk);
        motion = m[0]; temperature = 8'(t);
        h = 0; a = 0; f = 0;
        if (m == 1) begin
          if (t <= 15)                 h = 1;
          else if (t >= 16 && t <= 21) f = 1;
          else if (t >= 22 && t <= 26) f = 2;
          else if (t >= 27 && t <= 31) f = 3;
          else                         a = 1;
        end
        @(posedge clk); #1;
        expect_out(h, f, a, $sformatf("motion=%0d T=%0d", m, t));
      end
    end
    // Latency: a change must not show before the next clock edge.
    @(negedge clk) motion = 1'b1; temperature = 8'sd40;
    @(posedge clk); #1 expect_out(0, 0, 1, "ac at 40");
    @(negedge clk) temperature = 8'sd0;
    #2 expect_out(0, 0, 1, "unchanged before edge");
    @(posedge clk); #1 expect_out(1, 0, 0, "heater one clock later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
