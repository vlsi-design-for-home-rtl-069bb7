// door_lock - 12-bit hexadecimal password door lock with trial counter.
//
// A password attempt is a 12-bit word (three hex digits) on pwd_in with a
// one-cycle pwd_valid strobe. It is compared with the saved password:
//   match      door unlocks, green light, trial count cleared
//   mismatch   trial count + 1, yellow light
//   3rd miss   door alarm and red light
// This follows the controller specification. A correct password also
// disarms the door alarm and opens the door. The rest is this design's own:
// the saved password is the parameter SAVED_PWD; the door stays unlocked
// until lock_req relocks it (attempts are ignored while it is open); wrong
// attempts while the alarm sounds are ignored; the yellow light stays on from
// a wrong attempt until the next attempt.
//
// Interface: inputs are sampled on the rising edge of clk and every output
// is registered, so an attempt shows its result one clock after pwd_valid.
// pwd_ok is a one-cycle pulse in that same cycle for an accepted password.
// rst_n is an active-low synchronous reset: door locked, lights off, trial
// count zero.
module door_lock
  import ha_pkg::*;
#(
  parameter int unsigned     W          = PWD_W,
  parameter logic [W-1:0]    SAVED_PWD  = DEFAULT_PASSWORD,
  parameter int unsigned     TRIALS     = MAX_TRIALS,
  parameter int unsigned     CW         = $clog2(TRIALS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pwd_valid,
  input  logic [W-1:0] pwd_in,
  input  logic         lock_req,
  output logic         unlocked,
  output logic         green,
  output logic         yellow,
  output logic         red,
  output logic         door_alarm,
  output logic [CW-1:0] trial_count,
  output logic         pwd_ok
);

  lock_state_t state, state_d;
  logic [CW-1:0] trials_d;
  logic        ok_d;
  logic        match;

  assign match = (pwd_in == SAVED_PWD);

  always_comb begin
    state_d  = state;
    trials_d = trial_count;
    ok_d     = 1'b0;
    unique case (state)
      LOCK_IDLE, LOCK_WRONG: begin
        if (pwd_valid) begin
          if (match) begin
            state_d  = LOCK_OPEN;
            trials_d = '0;
            ok_d     = 1'b1;
          end else begin
            trials_d = trial_count + 1'b1;
            state_d  = (32'(trials_d) >= TRIALS) ? LOCK_ALARM : LOCK_WRONG;
          end
        end
      end
      LOCK_OPEN: begin
        if (lock_req) state_d = LOCK_IDLE;
      end
      LOCK_ALARM: begin
        if (pwd_valid && match) begin
          state_d  = LOCK_OPEN;
          trials_d = '0;
          ok_d     = 1'b1;
        end
      end
      default: state_d = LOCK_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= LOCK_IDLE;
      trial_count <= '0;
      pwd_ok      <= 1'b0;
    end else begin
      state       <= state_d;
      trial_count <= trials_d;
      pwd_ok      <= ok_d;
    end
  end

  assign unlocked   = (state == LOCK_OPEN);
  assign green      = (state == LOCK_OPEN);
  assign yellow     = (state == LOCK_WRONG);
  assign red        = (state == LOCK_ALARM);
  assign door_alarm = (state == LOCK_ALARM);

  // At most one indicator light, and the trial count never passes the limit.
  a_one_light: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({green, yellow, red}));
  a_trial_limit: assert property (@(posedge clk) disable iff (!rst_n)
    32'(trial_count) <= TRIALS);

endmodule
