// tb_shaft: self-checking test of the shaft front end.
//
// Part 1 replays the approach to a floor: the floor bus idles at all ones,
// the car nears floor 5, a low strobe loads 5 into flr and sets nr_flr, then
// here marks arrival; at_flr must follow here one clock later and nr_flr
// must clear on that same clock edge.
// Part 2 drives random f, here and strobe pulses, with the strobe edges placed
// between clock edges as they would come from the shaft, and checks flr,
// at_flr and nr_flr after every clock edge against values worked out from the
// stimulus history.
`timescale 1ns/1ps
module tb_shaft;
  localparam int unsigned FLR_W = 5;

  logic clk = 1'b0, rst;
  logic [FLR_W-1:0] f, flr;
  logic here, stb, at_flr, nr_flr;

  int checks = 0, failures = 0;

  shaft dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [FLR_W-1:0] exp_flr;
  logic exp_nr, exp_at;

  initial begin
    int nr_rise, nr_fall, at_rise;
    rst = 1'b0;
    #1 rst = 1'b1; f = '1; here = 1'b0; stb = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(flr == '0 && !nr_flr && !at_flr, "reset values");

    // ---- Part 1: approach to floor 5 ----
    repeat (3) @(posedge clk);
    @(negedge clk) f = 5'h05;             // floor code appears
    @(negedge clk) #2 stb = 1'b0;         // strobe goes low between clock edges
    #1 check(flr == 5'h05, "flr loads on falling stb");
    check(!nr_flr, "nr_flr waits for a clock edge");
    @(posedge clk) #1 check(nr_flr, "nr_flr set by low stb");
    repeat (2) @(negedge clk);
    #2 stb = 1'b1;
    @(negedge clk) f = '1;                // car leaves the code window
    #1 check(flr == 5'h05, "flr holds after strobe");
    repeat (4) @(posedge clk);
    #1 check(nr_flr && !at_flr, "nr_flr holds until here");
    @(negedge clk) here = 1'b1;
    @(posedge clk) #1 check(at_flr, "at_flr one clock after here");
    check(!nr_flr, "nr_flr cleared on the same edge");
    @(negedge clk) here = 1'b0;
    @(posedge clk) #1 check(!at_flr && !nr_flr, "at_flr follows here down");
    check(flr == 5'h05, "flr unchanged by here");

    // ---- Part 2: random stimulus against a history model ----
    exp_flr = flr; exp_nr = nr_flr; exp_at = at_flr;
    nr_rise = 0; nr_fall = 0; at_rise = 0;
    for (int i = 0; i < 8000; i++) begin
      logic pre_stb, pre_here;
      @(negedge clk);
      f    = FLR_W'($urandom);
      here = ($urandom % 4) == 0;
      #2;
      if (($urandom % 5) == 0) begin
        if (stb) exp_flr = f;             // falling strobe loads f
        stb = ~stb;
      end
      #1 check(flr == exp_flr, "flr after strobe");
      // f may change while the strobe is steady: flr must not follow
      if (($urandom % 2) == 0) f = FLR_W'($urandom);
      pre_stb = stb; pre_here = here;
      @(posedge clk);
      if (!pre_stb)      exp_nr = 1'b1;
      else if (pre_here) exp_nr = 1'b0;
      if (exp_nr && !nr_flr) nr_rise++;
      if (!exp_nr && nr_flr) nr_fall++;
      if (pre_here && !at_flr) at_rise++;
      exp_at = pre_here;
      #1;
      check(at_flr == exp_at, "at_flr");
      check(nr_flr == exp_nr, "nr_flr");
      check(flr == exp_flr, "flr");
    end
    check(nr_rise > 100 && nr_fall > 100 && at_rise > 100, "random coverage");
    $display("nr_flr set %0d times, cleared %0d times", nr_rise, nr_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
