// tb_remote_starter_top: end-to-end testbench for the remote car starter.
//
// Drives the seven switches of remote_starter_top and checks the three status
// LEDs and the one-hot state LEDs, at reduced sizes (clock divided by 10,
// door count 30, engine count 120) so every mechanism fits in a short run.
// Commands are held for exactly one tick period, so each is sampled by
// exactly one tick; the tick phase follows from the cycle count after reset
// (the divider's first tick follows its CLK_DIV-th edge). The scenario
// exercises: unlock and lock, the door counter relocking the doors and being
// reloaded by a second unlock, engine start (also from unlocked, which
// locks), engine off, the engine counter stopping the engine (with the doors
// locked and unlocked), overheat shutdown, heater on/off, heater refused with
// the engine off, conflicting buttons ignored, and the timings: doors stay
// unlocked DOOR_COUNT+1 ticks and the engine runs ENGINE_COUNT+1 ticks, in
// clock cycles (DOOR_COUNT+1)*CLK_DIV and (ENGINE_COUNT+1)*CLK_DIV. Every
// mechanism is counted and one that never happened counts as a failure.
module tb_remote_starter_top;

  localparam int unsigned CLK_DIV      = 10;
  localparam int unsigned DOOR_COUNT   = 30;
  localparam int unsigned ENGINE_COUNT = 120;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [6:0] sw = '0;
  logic       led_doors_unlocked, led_engine, led_heater;
  logic [5:0] led_state;

  remote_starter_top #(
    .CLK_DIV      (CLK_DIV),
    .DOOR_COUNT   (DOOR_COUNT),
    .ENGINE_COUNT (ENGINE_COUNT)
  ) dut (
    .clk, .rst, .sw, .led_doors_unlocked, .led_engine, .led_heater, .led_state
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // switch positions
  localparam int SW_UNLOCK = 0, SW_LOCK = 1, SW_EON = 2, SW_EOFF = 3,
                 SW_HON = 4, SW_HOFF = 5, SW_OH = 6;

  typedef enum int {
    M_UNLOCK, M_LOCK, M_DOOR_TIMEOUT, M_DOOR_RELOAD, M_ENGINE_START,
    M_START_LOCKS, M_ENGINE_OFF, M_ENGINE_TIMEOUT, M_ENGINE_TIMEOUT_UNLOCKED,
    M_OVERHEAT, M_HEATER_ON, M_HEATER_OFF, M_HEATER_REFUSED, M_CONFLICT,
    M_DOOR_TIMING, M_ENGINE_TIMING, M_NUM
  } mech_t;
  int mech [M_NUM];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned cycles = 0;   // rising edges since reset release
  always @(posedge clk) cycles <= rst ? 0 : cycles + 1;

  // Hold `s` for one tick period, starting right after a sampling edge;
  // the controller samples on edges CLK_DIV*k + 1.
  task automatic press(input logic [6:0] s);
    sw = s;
    repeat (CLK_DIV) @(negedge clk);
    sw = '0;
  endtask

  task automatic idle(input int unsigned ticks);
    repeat (ticks * CLK_DIV) @(negedge clk);
  endtask

  function automatic logic [6:0] b(input int pos);
    return 7'(1 << pos);
  endfunction

  // expected LEDs: {doors, engine, heater} and the state index
  task automatic expect_leds(input logic d, input logic e, input logic h,
                             input int st, input string what);
    checks++;
    if (led_doors_unlocked !== d || led_engine !== e || led_heater !== h ||
        led_state !== 6'(1 << st)) begin
      failures++;
      $display("FAIL %s: leds d=%b e=%b h=%b state=%b, expected %b%b%b S%0d",
               what, led_doors_unlocked, led_engine, led_heater, led_state, d, e, h, st);
    end
  endtask

  longint unsigned t0;

  initial begin
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // align: wait for the negedge after the first sampling edge (edge CLK_DIV+1)
    repeat (CLK_DIV + 1) @(negedge clk);
    expect_leds(0, 0, 0, 0, "after reset");

    // unlock, then let the door counter expire; measure the time unlocked
    press(b(SW_UNLOCK));
    t0 = cycles;
    expect_leds(1, 0, 0, 1, "unlock");
    if (led_doors_unlocked) mech[M_UNLOCK]++;
    while (led_doors_unlocked && cycles - t0 < 100 * CLK_DIV) @(negedge clk);
    checks++;
    if (cycles - t0 != longint'(DOOR_COUNT + 1) * CLK_DIV) begin
      failures++;
      $display("FAIL door timing: %0d cycles unlocked, expected %0d",
               cycles - t0, longint'(DOOR_COUNT + 1) * CLK_DIV);
    end else mech[M_DOOR_TIMING]++;
    // now just after a sampling edge again
    expect_leds(0, 0, 0, 0, "door timeout");
    if (!led_doors_unlocked) mech[M_DOOR_TIMEOUT]++;

    // unlock, re-unlock after 20 ticks: doors stay open 31 ticks from then
    press(b(SW_UNLOCK));
    idle(20);
    press(b(SW_UNLOCK));
    mech[M_DOOR_RELOAD]++;
    idle(29);
    expect_leds(1, 0, 0, 1, "reloaded door counter still running");
    if (!led_doors_unlocked) mech[M_DOOR_RELOAD]--;
    idle(1);
    expect_leds(1, 0, 0, 1, "door counter at 0");
    idle(1);
    expect_leds(0, 0, 0, 0, "relock after reload");

    // unlock, lock
    press(b(SW_UNLOCK));
    press(b(SW_LOCK));
    expect_leds(0, 0, 0, 0, "lock");
    if (!led_doors_unlocked) mech[M_LOCK]++;

    // heater refused with the engine off
    press(b(SW_HON));
    expect_leds(0, 0, 0, 0, "heater refused S0");
    mech[M_HEATER_REFUSED]++;

    // engine start, measure the run time to the engine counter's shutdown
    press(b(SW_EON));
    t0 = cycles;
    expect_leds(0, 1, 0, 2, "engine start");
    if (led_engine) mech[M_ENGINE_START]++;
    press(b(SW_HON));
    expect_leds(0, 1, 1, 4, "heater on");
    if (led_heater) mech[M_HEATER_ON]++;
    press(b(SW_HOFF));
    expect_leds(0, 1, 0, 2, "heater off");
    if (!led_heater) mech[M_HEATER_OFF]++;
    press(b(SW_HON) | b(SW_UNLOCK));
    expect_leds(0, 1, 0, 2, "conflicting buttons ignored");
    mech[M_CONFLICT]++;
    press(b(SW_HON));
    while (led_engine && cycles - t0 < 300 * CLK_DIV) @(negedge clk);
    checks++;
    if (cycles - t0 != longint'(ENGINE_COUNT + 1) * CLK_DIV) begin
      failures++;
      $display("FAIL engine timing: %0d cycles on, expected %0d",
               cycles - t0, longint'(ENGINE_COUNT + 1) * CLK_DIV);
    end else mech[M_ENGINE_TIMING]++;
    expect_leds(0, 0, 0, 0, "engine timeout, doors locked");
    if (!led_engine) mech[M_ENGINE_TIMEOUT]++;

    // engine off
    press(b(SW_EON));
    press(b(SW_EOFF));
    expect_leds(0, 0, 0, 0, "engine off");
    if (!led_engine) mech[M_ENGINE_OFF]++;

    // start from unlocked locks the doors
    press(b(SW_UNLOCK));
    press(b(SW_EON));
    expect_leds(0, 1, 0, 2, "start from unlocked locks");
    if (!led_doors_unlocked && led_engine) mech[M_START_LOCKS]++;

    // heater, unlock, overheat: engine and heater stop, doors stay unlocked
    press(b(SW_HON));
    press(b(SW_UNLOCK));
    expect_leds(1, 1, 1, 5, "engine+heater+unlocked");
    press(b(SW_OH));
    expect_leds(1, 0, 0, 1, "overheat shutdown");
    if (!led_engine) mech[M_OVERHEAT]++;
    press(b(SW_LOCK));
    expect_leds(0, 0, 0, 0, "lock after overheat");

    // engine counter expiry while the doors are unlocked (keep them open)
    press(b(SW_EON));
    for (int i = 0; i < ENGINE_COUNT + 10 && led_engine; i++)
      press(i % 10 == 0 ? b(SW_UNLOCK) : '0);
    expect_leds(1, 0, 0, 1, "engine timeout, doors unlocked");
    if (!led_engine && led_doors_unlocked) mech[M_ENGINE_TIMEOUT_UNLOCKED]++;
    press(b(SW_LOCK));
    expect_leds(0, 0, 0, 0, "final lock");

    for (int i = 0; i < M_NUM; i++) begin
      checks++;
      $display("mechanism %s happened %0d time(s)", mech_t'(i), mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mech_t'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
