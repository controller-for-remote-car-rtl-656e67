// remote_starter_top: remote car starter on a Basys 3 style board.
//
// Seven slide switches carry the remote's commands and the overheat alarm;
// three LEDs show the car's status, each above the switch that turns the
// function on, and six more LEDs show the controller's state one-hot. A
// clock divider turns the 100 MHz board clock into a 1 kHz tick that paces
// the controller, so its counters run in milliseconds: the doors relock 30 s
// after an unlock and the engine stops 2 min after it was started.
//
//   sw[0] unlock      sw[1] lock        sw[2] engine_on   sw[3] engine_off
//   sw[4] heater_on   sw[5] heater_off  sw[6] overheat
//   led_doors_unlocked = LED0, led_engine = LED2, led_heater = LED4,
//   led_state[i] = LED(10+i) lit in state Si.
//
// The switch and LED assignment, the clock rate, the tick rate and the two
// counts follow the design; the reset input is this implementation's
// addition. Switch levels go to the controller without synchronisers, as in
// the design; they are sampled once per tick. Outputs change only in the
// cycle after a tick. The controller's observation outputs (state code and
// both counter values) are left unconnected on purpose; the one-hot state
// display carries the same state information.
module remote_starter_top
  import remote_starter_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 100000,
  parameter int unsigned DOOR_COUNT   = 30000,
  parameter int unsigned ENGINE_COUNT = 120000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] sw,
  output logic       led_doors_unlocked,
  output logic       led_engine,
  output logic       led_heater,
  output logic [5:0] led_state
);

  logic        tick;
  remote_cmd_t cmd;
  car_status_t status;

  clock_divider #(.DIV(CLK_DIV)) u_clock_divider (
    .clk      (clk),
    .rst      (rst),
    .tick     (tick)
  );

  always_comb begin
    cmd.unlock     = sw[0];
    cmd.lock       = sw[1];
    cmd.engine_on  = sw[2];
    cmd.engine_off = sw[3];
    cmd.heater_on  = sw[4];
    cmd.heater_off = sw[5];
    cmd.overheat   = sw[6];
  end

  remote_controller #(
    .DOOR_COUNT   (DOOR_COUNT),
    .ENGINE_COUNT (ENGINE_COUNT)
  ) u_remote_controller (
    .clk          (clk),
    .rst          (rst),
    .tick         (tick),
    .cmd          (cmd),
    .status       (status),
    .state        (),
    .state_onehot (led_state),
    .door_count   (),
    .engine_count ()
  );

  assign led_doors_unlocked = status.doors_unlocked;
  assign led_engine         = status.engine;
  assign led_heater         = status.heater;

endmodule
