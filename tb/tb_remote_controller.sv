// tb_remote_controller: self-checking testbench for remote_controller.
//
// Runs with the short counts the design was first simulated with (door 30,
// engine 120 ticks) and a tick every third clock, so the test also sees that
// nothing moves between ticks. Part 1 replays the design's two reference scenarios
// tick by tick: an unlock that times out and relocks (with a held unlock
// reloading the counter), and an engine start with the heater, an unlock, a
// second unlock that reloads the door counter and an engine-off that keeps
// the doors open. Part 2 walks through every other transition: lock, heater
// off, overheat from each engine state, both counters expiring in each
// superstate, ignored and conflicting commands. Part 3 drives random
// commands for many ticks against a reference model kept in this file
// (written as a transition table per state) and compares state, outputs and
// both counters after every tick. Expected values in parts 1 and 2 are
// worked out by hand from the state diagram.
module tb_remote_controller;
  import remote_starter_pkg::*;

  localparam int unsigned DOOR_COUNT   = 30;
  localparam int unsigned ENGINE_COUNT = 120;
  localparam int unsigned DW = $clog2(DOOR_COUNT + 1);
  localparam int unsigned EW = $clog2(ENGINE_COUNT + 1);

  logic          clk = 1'b0;
  logic          rst;
  logic          tick;
  remote_cmd_t   cmd;
  car_status_t   status;
  state_t        state;
  logic [5:0]    state_onehot;
  logic [DW-1:0] door_count;
  logic [EW-1:0] engine_count;

  int checks = 0;
  int failures = 0;

  remote_controller #(
    .DOOR_COUNT   (DOOR_COUNT),
    .ENGINE_COUNT (ENGINE_COUNT)
  ) dut (
    .clk, .rst, .tick, .cmd, .status, .state, .state_onehot,
    .door_count, .engine_count
  );

  always #5 clk = ~clk;

  // Tick on every third clock.
  int unsigned phase = 0;
  always_ff @(posedge clk) phase <= (phase == 2) ? 0 : phase + 1;
  assign tick = (phase == 2);

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  function automatic remote_cmd_t none();
    return '0;
  endfunction
  function automatic remote_cmd_t c_u();    remote_cmd_t c = '0; c.unlock = 1;     return c; endfunction
  function automatic remote_cmd_t c_l();    remote_cmd_t c = '0; c.lock = 1;       return c; endfunction
  function automatic remote_cmd_t c_eon();  remote_cmd_t c = '0; c.engine_on = 1;  return c; endfunction
  function automatic remote_cmd_t c_eoff(); remote_cmd_t c = '0; c.engine_off = 1; return c; endfunction
  function automatic remote_cmd_t c_hon();  remote_cmd_t c = '0; c.heater_on = 1;  return c; endfunction
  function automatic remote_cmd_t c_hoff(); remote_cmd_t c = '0; c.heater_off = 1; return c; endfunction
  function automatic remote_cmd_t c_oh();   remote_cmd_t c = '0; c.overheat = 1;   return c; endfunction

  // Apply a command across exactly one tick edge, then release it.
  task automatic step(input remote_cmd_t c);
    state_t s_before;
    @(negedge clk);
    cmd = c;
    while (!tick) begin
      // between ticks nothing may move
      s_before = state;
      @(negedge clk);
      checks++;
      if (state !== s_before) begin
        failures++;
        $display("FAIL: state moved without tick");
      end
    end
    @(negedge clk);   // the tick edge has passed
    cmd = '0;
  endtask

  task automatic expect_state(input state_t s, input string what);
    car_status_t st;
    st = status_of(s);
    checks++;
    if (state !== s || status !== st || state_onehot !== 6'(1 << index_of(s))) begin
      failures++;
      $display("FAIL %s: state %s status %b onehot %b, expected %s %b",
               what, state.name(), status, state_onehot, s.name(), st);
    end
  endtask

  task automatic expect_dc(input int unsigned v, input string what);
    checks++;
    if (door_count !== DW'(v)) begin
      failures++;
      $display("FAIL %s: door_count %0d expected %0d", what, door_count, v);
    end
  endtask

  task automatic expect_ec(input int unsigned v, input string what);
    checks++;
    if (engine_count !== EW'(v)) begin
      failures++;
      $display("FAIL %s: engine_count %0d expected %0d", what, engine_count, v);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    cmd = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    expect_state(S0, "reset");
  endtask

  // ------------------------------------------------------- reference model
  typedef struct {
    state_t      s;
    int unsigned dc;
    int unsigned ec;
  } model_t;

  function automatic model_t model_next(model_t m, remote_cmd_t c);
    model_t n = m;
    bit u = c.unlock, l = c.lock, eon = c.engine_on, eoff = c.engine_off;
    bit hon = c.heater_on, hoff = c.heater_off, oh = c.overheat;
    bit dz = (m.dc == 0), ez = (m.ec == 0);
    bit stop_h = (oh ^ eoff);     // exactly one of overheat / engine_off
    bit engine_state = (m.s == S2 || m.s == S3 || m.s == S4 || m.s == S5);
    if (engine_state && !ez) n.ec = m.ec - 1;
    case (m.s)
      S0: if (eon & ~u) begin n.s = S2; n.ec = ENGINE_COUNT; end
          else if (u & ~eon) begin n.s = S1; n.dc = DOOR_COUNT; end
      S1: if (eon & ~l & ~u) begin n.s = S2; n.ec = ENGINE_COUNT; end
          else if (dz) n.s = S0;
          else if (l & ~eon & ~u) n.s = S0;
          else if (u & ~eon & ~l) n.dc = DOOR_COUNT;
          else n.dc = m.dc - 1;
      S2: if (ez) n.s = S0;
          else if ((oh | eoff) & ~hon & ~u) n.s = S0;
          else if (hon & ~oh & ~u & ~eoff) n.s = S4;
          else if (u & ~oh & ~hon & ~eoff) begin n.s = S3; n.dc = DOOR_COUNT; end
      S3: if (ez) n.s = S1;
          else if (stop_h & ~l & ~u & ~hon) n.s = S1;
          else if (dz) n.s = S2;
          else if ({oh, eoff, l, u, hon} == 5'b00100) n.s = S2;
          else if ({oh, eoff, l, u, hon} == 5'b00001) n.s = S5;
          else if ({oh, eoff, l, u, hon} == 5'b00010) n.dc = DOOR_COUNT;
          else n.dc = m.dc - 1;
      S4: if (ez) n.s = S0;
          else if (stop_h & ~hoff & ~u) n.s = S0;
          else if ({oh, eoff, hoff, u} == 4'b0010) n.s = S2;
          else if ({oh, eoff, hoff, u} == 4'b0001) begin n.s = S5; n.dc = DOOR_COUNT; end
      S5: if (ez) n.s = S1;
          else if (stop_h & ~l & ~u & ~hoff) n.s = S1;
          else if (dz) n.s = S4;
          else if ({oh, eoff, l, u, hoff} == 5'b00100) n.s = S4;
          else if ({oh, eoff, l, u, hoff} == 5'b00001) n.s = S3;
          else if ({oh, eoff, l, u, hoff} == 5'b00010) n.dc = DOOR_COUNT;
          else n.dc = m.dc - 1;
      default: n.s = S0;
    endcase
    return n;
  endfunction

  // ------------------------------------------------------------------ test
  initial begin
    rst = 1'b1;
    cmd = '0;
    do_reset();

    // ---- Scenario 1: unlock, count down 30..0, relock.
    step(c_u());
    expect_state(S1, "w1 unlock");
    expect_dc(30, "w1 load");
    for (int i = 29; i >= 0; i--) begin
      step(none());
      expect_state(S1, "w1 counting");
      expect_dc(i, "w1 counting");
    end
    step(none());
    expect_state(S0, "w1 relock after 31 ticks");
    // unlock held across two ticks: enters S1, then reloads once.
    step(c_u());
    step(c_u());
    expect_state(S1, "w1 held unlock");
    expect_dc(30, "w1 held unlock reload");
    step(none());
    expect_dc(29, "w1 count after reload");
    step(c_l());
    expect_state(S0, "lock from S1");

    // ---- Scenario 2: engine, heater, unlock, re-unlock, engine off.
    step(c_eon());
    expect_state(S2, "w2 engine on");
    expect_ec(120, "w2 engine load");
    for (int i = 0; i < 4; i++) step(c_eon());   // held: no reload
    expect_state(S2, "w2 engine_on held");
    expect_ec(116, "w2 engine counter keeps running");
    step(c_hon());
    expect_state(S4, "w2 heater on");
    expect_ec(115, "w2 ec");
    step(c_u());
    expect_state(S5, "w2 unlock in S4");
    expect_dc(30, "w2 door load");
    for (int i = 0; i < 10; i++) step(none());
    expect_dc(20, "w2 door counting");
    expect_ec(104, "w2 ec");
    step(c_u());
    expect_state(S5, "w2 re-unlock");
    expect_dc(30, "w2 door reload");
    for (int i = 0; i < 5; i++) step(none());
    expect_dc(25, "w2 door counting 2");
    step(c_eoff());
    expect_state(S1, "w2 engine off keeps doors");
    expect_dc(25, "w2 door count kept");
    step(none());
    expect_dc(24, "w2 door keeps counting in S1");

    // ---- S1 -> S2: engine on locks the doors.
    step(c_eon());
    expect_state(S2, "engine on from S1");
    expect_ec(120, "engine load from S1");

    // ---- S2: heater and unlock together are ignored.
    step(c_hon() | c_u());
    expect_state(S2, "S2 conflicting inputs");
    // ---- S2 -> S3 -> S2 by lock, S3 -> S5 -> S3 by heater on/off
    step(c_u());
    expect_state(S3, "S2 unlock");
    step(c_hon());
    expect_state(S5, "S3 heater on");
    step(c_hoff());
    expect_state(S3, "S5 heater off");
    step(c_l());
    expect_state(S2, "S3 lock");
    step(c_hon());
    expect_state(S4, "S2 heater on");
    step(c_hoff());
    expect_state(S2, "S4 heater off");
    step(c_u());
    step(c_hon());
    expect_state(S5, "S3 heater on 2");
    step(c_l());
    expect_state(S4, "S5 lock");

    // ---- overheat from each engine state.
    step(c_oh());
    expect_state(S0, "S4 overheat");
    step(c_eon());
    step(c_oh());
    expect_state(S0, "S2 overheat");
    step(c_eon());
    step(c_u());
    step(c_oh());
    expect_state(S1, "S3 overheat");
    step(c_eon());
    step(c_u());
    step(c_hon());
    expect_state(S5, "to S5");
    step(c_oh());
    expect_state(S1, "S5 overheat");
    // engine off from S3 and S4, heater ignored with engine off
    step(c_hon());
    expect_state(S1, "heater ignored in S1");
    step(c_eon());
    step(c_u());
    step(c_eoff());
    expect_state(S1, "S3 engine off");
    step(c_l());
    step(c_hon());
    expect_state(S0, "heater ignored in S0");
    step(c_eon());
    step(c_hon());
    step(c_eoff());
    expect_state(S0, "S4 engine off");
    // overheat with unlock held in S2: the guard needs unlock released
    step(c_eon());
    step(c_oh() | c_u());
    expect_state(S2, "S2 overheat with unlock held");
    step(c_eoff());
    expect_state(S0, "S2 engine off");

    // ---- door counter expiry in S3 and S5, engine counter expiry.
    step(c_eon());
    step(c_u());
    for (int i = 0; i < 30; i++) step(none());
    expect_state(S3, "S3 door count at 0");
    expect_dc(0, "S3 door count 0");
    step(none());
    expect_state(S2, "S3 door timeout relocks");
    step(c_hon());
    step(c_u());
    for (int i = 0; i < 31; i++) step(none());
    expect_state(S4, "S5 door timeout relocks");
    // 65 ticks since the engine counter was loaded: u, 30 waits, 1 wait,
    // hon, u, 31 waits
    expect_ec(55, "engine counter after 65 ticks");
    for (int i = 0; i < 55; i++) step(none());
    expect_state(S4, "engine still on at EC=0");
    expect_ec(0, "engine counter 0");
    step(none());
    expect_state(S0, "S4 engine timeout");

    // engine timeout in S3 goes to S1, door counter keeps its value
    step(c_eon());
    for (int i = 0; i < 110; i++) step(none());
    step(c_u());     // EC 120-111 = 9, DC 30
    expect_state(S3, "late unlock");
    expect_ec(9, "ec before timeout");
    for (int i = 0; i < 9; i++) step(none());
    expect_ec(0, "ec 0 in S3");
    expect_dc(21, "dc in S3");
    step(none());
    expect_state(S1, "S3 engine timeout");
    expect_dc(21, "dc kept on engine timeout");
    // engine timeout in S5
    step(c_eon());
    step(c_u());
    step(c_hon());
    for (int i = 0; i < 20; i++) begin
      // keep the doors open with an unlock every 10 ticks
      step((i % 10 == 0) ? c_u() : none());
    end
    for (int i = 0; i < 200 && state != S1; i++)
      step((i % 10 == 0) ? c_u() : none());
    expect_state(S1, "S5 engine timeout");
    step(c_l());
    expect_state(S0, "lock at end");

    // ---- random walk against the model, short counts.
    begin
      model_t m;
      remote_cmd_t c;
      int unsigned r;
      do_reset();
      m.s = S0; m.dc = 0; m.ec = 0;
      for (int t = 0; t < 20000; t++) begin
        r = $urandom_range(0, 99);
        c = '0;
        if (r < 50) c = '0;
        else if (r < 90) c = remote_cmd_t'(7'(1 << $urandom_range(0, 6)));
        else c = remote_cmd_t'(7'($urandom()));
        // model and RTL counters start from reset 0
        step(c);
        m = model_next(m, c);
        checks++;
        if (state !== m.s || door_count !== DW'(m.dc) || engine_count !== EW'(m.ec)) begin
          failures++;
          if (failures < 10)
            $display("FAIL random t=%0d cmd=%b: rtl %s dc=%0d ec=%0d model %s dc=%0d ec=%0d",
                     t, c, state.name(), door_count, engine_count, m.s.name(), m.dc, m.ec);
          m.s = state; m.dc = int'(door_count); m.ec = int'(engine_count);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
