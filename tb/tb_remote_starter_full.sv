// tb_remote_starter_full: one complete remote session on the full-size design.
//
// remote_starter_top runs with its default parameters: a 100 MHz clock
// divided by 100000 to the 1 kHz tick, door count 30000 and engine count
// 120000. The session: unlock the doors, start the engine (which locks them),
// switch the heater on, unlock again, let 50 ms pass, switch the heater off,
// stop the engine (the doors stay unlocked), lock. After each command the
// LEDs are checked, and the test measures that each command takes effect at
// the first tick after it is applied and that the status LEDs do not change
// between ticks. Waiting out the 30 s door and 2 min engine timeouts takes
// 3e9 and 1.2e10 clock cycles and is left to the reduced-size testbench.
module tb_remote_starter_full;

  localparam int unsigned TICK = 100000;   // clock cycles per tick at the defaults

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [6:0] sw = '0;
  logic       led_doors_unlocked, led_engine, led_heater;
  logic [5:0] led_state;

  remote_starter_top dut (
    .clk, .rst, .sw, .led_doors_unlocked, .led_engine, .led_heater, .led_state
  );

  always #5 clk = ~clk;   // 100 MHz with a 1 ns time unit

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (30 * 1000 * 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SW_UNLOCK = 0, SW_LOCK = 1, SW_EON = 2, SW_EOFF = 3,
                 SW_HON = 4, SW_HOFF = 5, SW_OH = 6;

  // Apply `s` right after a sampling edge and wait for the LEDs to react;
  // they must change exactly TICK cycles later (the next sampling edge).
  task automatic press(input logic [6:0] s, input logic [5:0] want_state,
                       input string what);
    logic [5:0] prev_state;
    int unsigned n;
    prev_state = led_state;
    sw = s;
    n = 0;
    while (led_state == prev_state && n < 2 * TICK) begin
      @(negedge clk);
      n++;
    end
    sw = '0;
    checks++;
    if (n != TICK || led_state !== want_state) begin
      failures++;
      $display("FAIL %s: state %b after %0d cycles, expected %b after %0d",
               what, led_state, n, want_state, TICK);
    end
  endtask

  task automatic expect_leds(input logic d, input logic e, input logic h,
                             input string what);
    checks++;
    if ({led_doors_unlocked, led_engine, led_heater} !== {d, e, h}) begin
      failures++;
      $display("FAIL %s: leds %b%b%b expected %b%b%b", what,
               led_doors_unlocked, led_engine, led_heater, d, e, h);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // first sampling edge is edge TICK+1 after reset
    repeat (TICK + 1) @(negedge clk);
    expect_leds(0, 0, 0, "idle");

    press(7'(1 << SW_UNLOCK), 6'b000010, "unlock");
    expect_leds(1, 0, 0, "doors unlocked");
    repeat (10 * TICK) @(negedge clk);
    expect_leds(1, 0, 0, "doors still unlocked after 10 ms");

    press(7'(1 << SW_EON), 6'b000100, "engine start");
    expect_leds(0, 1, 0, "engine on, doors locked");

    press(7'(1 << SW_HON), 6'b010000, "heater on");
    expect_leds(0, 1, 1, "heater on");

    press(7'(1 << SW_UNLOCK), 6'b100000, "unlock with engine running");
    expect_leds(1, 1, 1, "all on");
    repeat (50 * TICK) @(negedge clk);
    expect_leds(1, 1, 1, "all on after 50 ms");

    press(7'(1 << SW_HOFF), 6'b001000, "heater off");
    expect_leds(1, 1, 0, "heater off");

    press(7'(1 << SW_EOFF), 6'b000010, "engine off");
    expect_leds(1, 0, 0, "engine off, doors stay unlocked");

    press(7'(1 << SW_LOCK), 6'b000001, "lock");
    expect_leds(0, 0, 0, "locked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
