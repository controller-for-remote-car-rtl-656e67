// Types shared by the remote car starter controller, its top level and
// their testbenches.
//
// state_t: the six states of the controller. The numeric codes are the
// three-bit labels printed on the state diagram of the design and are used
// directly as the state register encoding. Two superstates overlap on them:
// "engine on" = {S2, S3, S4, S5} and "doors unlocked" = {S1, S3, S5}.
//
// remote_cmd_t: the seven command inputs (six remote buttons plus the
// engine overheat alarm), all active high and level sensitive.
//
// car_status_t: the three Moore outputs that drive the car and the remote's
// indicator LEDs.
package remote_starter_pkg;

  typedef enum logic [2:0] {
    S0 = 3'b000,   // engine off, doors locked
    S1 = 3'b001,   // engine off, doors unlocked
    S2 = 3'b100,   // engine on,  doors locked,   heater off
    S3 = 3'b110,   // engine on,  doors unlocked, heater off
    S4 = 3'b101,   // engine on,  doors locked,   heater on
    S5 = 3'b111    // engine on,  doors unlocked, heater on
  } state_t;

  typedef struct packed {
    logic unlock;
    logic lock;
    logic engine_on;
    logic engine_off;
    logic heater_on;
    logic heater_off;
    logic overheat;
  } remote_cmd_t;

  typedef struct packed {
    logic doors_unlocked;
    logic engine;
    logic heater;
  } car_status_t;

  // Moore output decode of a state.
  function automatic car_status_t status_of(state_t s);
    car_status_t st;
    st.doors_unlocked = (s == S1) || (s == S3) || (s == S5);
    st.engine         = (s == S2) || (s == S3) || (s == S4) || (s == S5);
    st.heater         = (s == S4) || (s == S5);
    return st;
  endfunction

  // Index 0..5 of a state, for the one-hot state display.
  function automatic int unsigned index_of(state_t s);
    case (s)
      S0: return 0;
      S1: return 1;
      S2: return 2;
      S3: return 3;
      S4: return 4;
      S5: return 5;
      default: return 0;
    endcase
  endfunction

endpackage
