// updn_fsm: motion state machine of the elevator main controller.
//
// Eight states in two mirrored halves, one per direction. Going up:
//   UP_FULL  full speed between floors. When nr_flr rises: if the car must
//            go on (keep_going high, stop_here low) -> CONT_UP, otherwise
//            (stop_here high, or keep_going low because a down call waits
//            here) -> UP_SLOW.
//   CONT_UP  passing a floor at speed; back to UP_FULL once nr_flr falls.
//   UP_SLOW  slow approach; at_flr -> STOP_UP.
//   STOP_UP  brake on. On start: keep_going -> CONT_UP, else the direction
//            flips -> STOP_DN. With no calls the machine alternates between
//            STOP_UP and STOP_DN on each start.
// The DN half is the same with the direction reversed.
// Outputs are Moore outputs decoded from the state bits: run in the moving
// phases, slow in the *_SLOW states, brake in the STOP_* states, up/dn from the
// direction bit. They change one clk edge after the input that caused the step.
// The transition rules, state encoding and outputs follow the original design.
// DN_FULL -> CONT_DN uses the same AND condition as the up side (a drawing of
// the diagram shows OR there; the mirrored AND form is the one implemented).
// The asynchronous reset (rst, active high, into STOP_DN) is this design's own:
// the original has no reset.
module updn_fsm
  import elevator_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    keep_going,
  input  logic    start,
  input  logic    stop_here,
  input  logic    nr_flr,
  input  logic    at_flr,
  output motion_t mo
);

  state_t state, next;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= STOP_DN;
    else     state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      UP_FULL: if (nr_flr) next = (keep_going && !stop_here) ? CONT_UP : UP_SLOW;
      CONT_UP: if (!nr_flr) next = UP_FULL;
      UP_SLOW: if (at_flr) next = STOP_UP;
      STOP_UP: if (start) next = keep_going ? CONT_UP : STOP_DN;
      DN_FULL: if (nr_flr) next = (keep_going && !stop_here) ? CONT_DN : DN_SLOW;
      CONT_DN: if (!nr_flr) next = DN_FULL;
      DN_SLOW: if (at_flr) next = STOP_DN;
      STOP_DN: if (start) next = keep_going ? CONT_DN : STOP_UP;
      default: next = STOP_DN;
    endcase
  end

  // Output decode straight from the encoding (see elevator_pkg).
  always_comb begin
    mo.up    = state[2];
    mo.dn    = !state[2];
    mo.run   = state[1] | state[0];
    mo.slow  = !state[1] & state[0];
    mo.brake = !state[1] & !state[0];
  end

endmodule
