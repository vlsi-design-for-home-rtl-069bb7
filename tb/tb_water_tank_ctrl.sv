// tb_water_tank_ctrl - self-checking testbench for water_tank_ctrl.
//
// Steps the 7-bit level through every value 0..127, up and back down, and
// checks one clock later: below 50 % pump and buzzer on, 50..89 % pump only,
// 90 % and above both off.
module tb_water_tank_ctrl;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [6:0] level;
  logic       pump, buzzer;
  int         checks = 0, failures = 0;

  water_tank_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int l);
    logic wp, wb;
    @(negedge clk);
    level = 7'(l);
    wb = (l <= 49);
    wp = (l <= 89);
    @(posedge clk); #1;
    checks++;
    if (pump !== wp || buzzer !== wb) begin
      failures++;
      $display("FAIL level=%0d pump=%0b buzzer=%0b want %0b %0b",
               l, pump, buzzer, wp, wb);
    end
  endtask

  initial begin
    rst_n = 1'b0; level = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (pump !== 1'b0 || buzzer !== 1'b0) begin
      failures++; $display("FAIL reset");
    end
    @(negedge clk) rst_n = 1'b1;
    for (int l = 0; l < 128; l++) apply(l);
    for (int l = 127; l >= 0; l--) apply(l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
