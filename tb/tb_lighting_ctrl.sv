// tb_lighting_ctrl - self-checking testbench for lighting_ctrl.
//
// Applies lux readings around the 200 lux limit, at the extremes and at
// random, with and without motion, and checks one clock later that the lamp
// is lit exactly when motion is present and the reading is at most 200.
module tb_lighting_ctrl;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        motion;
  logic [15:0] lux;
  logic        lamp;
  int          checks = 0, failures = 0;
  logic [15:0] lux_points[] = '{16'd0, 16'd1, 16'd199, 16'd200, 16'd201,
                                16'd202, 16'd255, 16'd256, 16'd456, 16'hffff};

  lighting_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic m, input logic [15:0] l);
    logic want;
    @(negedge clk);
    motion = m; lux = l;
    want = m && (l < 16'd201);
    @(posedge clk); #1;
    checks++;
    if (lamp !== want) begin
      failures++;
      $display("FAIL motion=%0b lux=%0d lamp=%0b want %0b", m, l, lamp, want);
    end
  endtask

  initial begin
    rst_n = 1'b0; motion = 1'b1; lux = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (lamp !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    foreach (lux_points[i]) begin
      apply(1'b1, lux_points[i]);
      apply(1'b0, lux_points[i]);
    end
    repeat (1000) apply(1'($urandom), 16'($urandom_range(0, 400)));
    repeat (200)  apply(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
