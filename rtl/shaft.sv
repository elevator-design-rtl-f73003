// shaft: front end of the elevator main controller.
//
// It conditions the three kinds of signal that come from position sensors in
// the shaft:
//   * f[FLR_W-1:0] is all ones except while the car is near a floor, when it
//     carries that floor's code. A low pulse on stb strobes it: the floor
//     register flr loads f on the falling edge of stb. This register is clocked
//     by stb, not by clk, as in the original design.
//   * nr_flr ("near floor") is set on the clk edge at which stb is low and
//     cleared on the clk edge at which here is high; otherwise it holds. Set
//     wins if both are active.
//   * at_flr is here delayed by one clk flip-flop, a synchronized copy of here.
// Timing: nr_flr and at_flr change one clk rising edge after their inputs;
// flr changes on the falling edge of stb.
// The reset (rst, active high, asynchronous) is this design's addition: the
// original has none. It is asynchronous so that flr clears even though stb
// may not toggle while the circuit is in reset.
module shaft #(
  parameter int unsigned FLR_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [FLR_W-1:0] f,
  input  logic             here,
  input  logic             stb,
  output logic [FLR_W-1:0] flr,
  output logic             at_flr,
  output logic             nr_flr
);

  // Floor register, loaded by the falling edge of the strobe.
  always_ff @(negedge stb or posedge rst) begin
    if (rst) flr <= '0;
    else     flr <= f;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      at_flr <= 1'b0;
      nr_flr <= 1'b0;
    end else begin
      at_flr <= here;
      if (!stb)      nr_flr <= 1'b1;
      else if (here) nr_flr <= 1'b0;
    end
  end

endmodule
