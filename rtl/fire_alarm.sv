// fire_alarm - latching fire alarm driven by the smoke sensor.
//
// The alarm sounds as soon as the smoke sensor reads 1, as the controller
// specification requires. This design also latches it: once raised, the
// alarm stays on after the smoke clears until the occupant disarms it by
// entering the correct door password (the door lock's pwd_ok pulse on
// silence). While smoke is still present the alarm cannot be silenced.
// Latching and disarming by password are choices of this design.
//
// Interface: smoke and silence are sampled on the rising edge of clk; alarm
// is registered and rises one clock after smoke. rst_n is an active-low
// synchronous reset that clears the alarm.
module fire_alarm (
  input  logic clk,
  input  logic rst_n,
  input  logic smoke,
  input  logic silence,
  output logic alarm
);

  always_ff @(posedge clk) begin
    if (!rst_n)       alarm <= 1'b0;
    else if (smoke)   alarm <= 1'b1;
    else if (silence) alarm <= 1'b0;
  end

endmodule
