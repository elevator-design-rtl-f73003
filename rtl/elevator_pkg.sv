// Shared types of the elevator main controller.
//
// state_t is the controller's state register. The encoding is the hand-chosen
// assignment of the original design, picked so the outputs fall straight out of
// the bits: bit 2 is the travel direction (1 = up, 0 = down) and bits 1:0 are
// the motion phase (00 stopped with the brake on, 01 slow approach, 10 passing a
// floor at speed, 11 full speed between floors).
package elevator_pkg;

  typedef enum logic [2:0] {
    STOP_DN = 3'b000,
    DN_SLOW = 3'b001,
    CONT_DN = 3'b010,
    DN_FULL = 3'b011,
    STOP_UP = 3'b100,
    UP_SLOW = 3'b101,
    CONT_UP = 3'b110,
    UP_FULL = 3'b111
  } state_t;

  // Motion outputs, all decoded from the state alone (Moore machine).
  typedef struct packed {
    logic run;    // motor on
    logic slow;   // reduced speed for the final approach
    logic brake;  // brake applied, car stopped
    logic up;     // direction of travel / service is up
    logic dn;     // direction of travel / service is down
  } motion_t;

endpackage
