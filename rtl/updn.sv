// updn: elevator main controller, top level.
//
// The controller moves the car between floors. The shaft front end turns the
// raw shaft sensors (floor code f with its strobe stb, and here at the exact
// stopping point) into a registered floor number flr and the two clocked
// conditions nr_flr (approaching a floor) and at_flr (level with it). The
// motion state machine combines them with three commands from the rest of the
// elevator:
//   keep_going  some call lies further on in the present direction,
//   stop_here   a call in the present direction at the floor being approached,
//   start       the car controller has finished at a stop (doors closed),
// and drives run, slow, brake, up and dn for the motor, brake and the floor
// and car call logic (which watch up/dn to learn the direction).
// nr_flr and at_flr stay internal, as in the original design. All outputs
// except flr are registered one clk edge behind their cause; flr follows the
// falling edge of stb. rst (active high) is this design's addition.
module updn
  import elevator_pkg::*;
#(
  parameter int unsigned FLR_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             keep_going,
  input  logic             start,
  input  logic             stop_here,
  input  logic [FLR_W-1:0] f,
  input  logic             here,
  input  logic             stb,
  output logic [FLR_W-1:0] flr,
  output logic             brake,
  output logic             dn,
  output logic             run,
  output logic             slow,
  output logic             up
);

  logic    nr_flr, at_flr;
  motion_t mo;

  shaft #(.FLR_W(FLR_W)) u_shaft (
    .clk, .rst, .f, .here, .stb, .flr, .at_flr, .nr_flr
  );

  updn_fsm u_fsm (
    .clk, .rst, .keep_going, .start, .stop_here, .nr_flr, .at_flr, .mo
  );

  assign brake = mo.brake;
  assign dn    = mo.dn;
  assign run   = mo.run;
  assign slow  = mo.slow;
  assign up    = mo.up;

endmodule
