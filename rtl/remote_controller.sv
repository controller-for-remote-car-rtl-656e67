// remote_controller: the remote car starter's state machine.
//
// A six-state Moore machine lets the user unlock/lock the doors and trunk,
// start/stop the engine and switch the heater on/off, and shows the car's
// status on three outputs. Its states form two overlapping OR superstates:
//
//   engine on      = {S2, S3, S4, S5}: runs the engine counter, loaded with
//                    ENGINE_COUNT on entry and decremented every tick however
//                    the inputs change; at 0 the engine (and heater) stop,
//                    going to S0 or S1 so the doors keep their lock state.
//   doors unlocked = {S1, S3, S5}: runs the door counter, loaded with
//                    DOOR_COUNT on entry and reloaded whenever unlock is
//                    pressed again; at 0 the doors lock (S1->S0, S3->S2,
//                    S5->S4). Leaving the engine superstate keeps the door
//                    counter where it is.
//
// Engine off and overheat both stop the engine. The heater can only be
// switched on while the engine runs (S2->S4, S3->S5) and stops with it.
// Starting the engine from S1 locks the doors (S1->S2). Each state has an
// explicit guard that requires the other buttons to be released, so several
// buttons pressed together leave the state unchanged unless a counter expires.
// An expired counter overrides the buttons, with one exception: engine_on
// alone in S1 starts the engine even when the door counter has just expired.
//
// The states, their codes, the transitions, their guards and priority, the
// counters and their reload rules follow the design; the guards are written
// out in next-state logic below. Two departures: the overheat exit of S5 is
// the same as that of S3 (overheat alone, with lock, unlock and heater_off
// released), and counters are enabled registers that hold their value where
// the design leaves them unassigned, so no latches are inferred. The engine
// counter saturates at 0. Reset is this implementation's addition.
//
// Interface: all inputs are sampled, and state and counters updated, on the
// rising edge of clk in which `tick` is high (1 kHz in the full design);
// between ticks nothing changes. Outputs are decoded from the state register
// only (Moore). `state`, `state_onehot`, `door_count` and `engine_count`
// expose the internals for display and test.
//
// Timing: a command held across a tick edge takes effect at that edge. After
// entering the engine superstate the engine stays on for ENGINE_COUNT+1
// ticks; an unlock keeps the doors open DOOR_COUNT+1 ticks.
module remote_controller
  import remote_starter_pkg::*;
#(
  parameter int unsigned DOOR_COUNT   = 30000,
  parameter int unsigned ENGINE_COUNT = 120000,
  localparam int unsigned DW = $clog2(DOOR_COUNT + 1),
  localparam int unsigned EW = $clog2(ENGINE_COUNT + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  input  remote_cmd_t   cmd,
  output car_status_t   status,
  output state_t        state,
  output logic [5:0]    state_onehot,
  output logic [DW-1:0] door_count,
  output logic [EW-1:0] engine_count
);

  localparam logic [DW-1:0] DOOR_LOAD   = DW'(DOOR_COUNT);
  localparam logic [EW-1:0] ENGINE_LOAD = EW'(ENGINE_COUNT);

  state_t        state_q, state_d;
  logic [DW-1:0] dc_q, dc_d;
  logic [EW-1:0] ec_q, ec_d;

  // Short names for the commands, as on the state diagram.
  logic u, l, eon, eoff, hon, hoff, oh;
  logic dc_zero, ec_zero;

  assign u    = cmd.unlock;
  assign l    = cmd.lock;
  assign eon  = cmd.engine_on;
  assign eoff = cmd.engine_off;
  assign hon  = cmd.heater_on;
  assign hoff = cmd.heater_off;
  assign oh   = cmd.overheat;

  assign dc_zero = (dc_q == '0);
  assign ec_zero = (ec_q == '0);

  always_comb begin
    state_d = state_q;
    dc_d    = dc_q;
    ec_d    = ec_q;

    // Every state of the engine superstate runs the engine counter.
    if (state_q inside {S2, S3, S4, S5} && !ec_zero)
      ec_d = ec_q - 1'b1;

    unique case (state_q)
      S0: begin
        if (eon && !u) begin
          state_d = S2;
          ec_d    = ENGINE_LOAD;
        end else if (!eon && u) begin
          state_d = S1;
          dc_d    = DOOR_LOAD;
        end
      end

      S1: begin
        if (eon && !l && !u) begin
          state_d = S2;
          ec_d    = ENGINE_LOAD;
        end else if (dc_zero || (!eon && l && !u)) begin
          state_d = S0;
        end else if (!eon && !l && u) begin
          dc_d    = DOOR_LOAD;
        end else begin
          dc_d    = dc_q - 1'b1;
        end
      end

      S2: begin
        if (ec_zero || (oh && !hon && !u) || (eoff && !hon && !u)) begin
          state_d = S0;
        end else if (!oh && hon && !u && !eoff) begin
          state_d = S4;
        end else if (!oh && !hon && u && !eoff) begin
          state_d = S3;
          dc_d    = DOOR_LOAD;
        end
      end

      S3: begin
        if (ec_zero || (oh && !eoff && !l && !u && !hon)
                    || (!oh && eoff && !l && !u && !hon)) begin
          state_d = S1;                     // door counter keeps running
        end else if (dc_zero || (!oh && !eoff && l && !u && !hon)) begin
          state_d = S2;
        end else if (!oh && !eoff && !l && !u && hon) begin
          state_d = S5;
        end else if (!oh && !eoff && !l && u && !hon) begin
          dc_d    = DOOR_LOAD;
        end else begin
          dc_d    = dc_q - 1'b1;
        end
      end

      S4: begin
        if (ec_zero || (oh && !eoff && !hoff && !u)
                    || (!oh && eoff && !hoff && !u)) begin
          state_d = S0;
        end else if (!oh && !eoff && hoff && !u) begin
          state_d = S2;
        end else if (!oh && !eoff && !hoff && u) begin
          state_d = S5;
          dc_d    = DOOR_LOAD;
        end
      end

      S5: begin
        if (ec_zero || (oh && !eoff && !l && !u && !hoff)
                    || (!oh && eoff && !l && !u && !hoff)) begin
          state_d = S1;                     // door counter keeps running
        end else if (dc_zero || (!oh && !eoff && l && !u && !hoff)) begin
          state_d = S4;
        end else if (!oh && !eoff && !l && !u && hoff) begin
          state_d = S3;
        end else if (!oh && !eoff && !l && u && !hoff) begin
          dc_d    = DOOR_LOAD;
        end else begin
          dc_d    = dc_q - 1'b1;
        end
      end

      default: state_d = S0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S0;
      dc_q    <= '0;
      ec_q    <= '0;
    end else if (tick) begin
      state_q <= state_d;
      dc_q    <= dc_d;
      ec_q    <= ec_d;
    end
  end

  assign state        = state_q;
  assign status       = status_of(state_q);
  assign door_count   = dc_q;
  assign engine_count = ec_q;

  always_comb begin
    state_onehot = '0;
    state_onehot[index_of(state_q)] = 1'b1;
  end

  // The heater only runs while the engine runs.
  a_heater_needs_engine: assert property (@(posedge clk) disable iff (rst)
    status.heater |-> status.engine);

  // The door counter never decrements past 0: a zero count in the doors
  // unlocked superstate always leaves the state.
  a_door_counter_no_wrap: assert property (@(posedge clk) disable iff (rst)
    (tick && dc_zero && state_q inside {S1, S3, S5}) |-> (state_d != state_q));

endmodule
