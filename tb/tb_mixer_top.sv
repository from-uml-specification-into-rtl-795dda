// tb_mixer_top: end-to-end testbench of the beverage-mixer controller.
//
// The controller (mixer_top, at its default and only configuration) is
// connected to a behavioural plant (mixer_plant_model) and mixing timer
// (mixing_timer_model), and is taken through complete production cycles:
// start, filling and preparation of both ingredients while the trolley is
// loaded and moved left, mixing, filling of both containers, return of the
// trolley. Each cycle uses different plant timings so that every join of the
// concurrent machines is exercised with either side finishing last.
//
// Checked on every cycle, against timings worked out from the clocked
// hand-over between the machines (a sensor sampled at edge n produces the
// next actuator change after edge n+k, seen by this monitor at edge n+k+1):
//   x1 & !x4 -> y3 after 2 edges, y10 and y11 after 3
//   x5 / x7  -> y1 / y2 after 1;  x4 -> y12 after 1
//   later of x2, x3 -> y4, y5, y6 after 2
//   later of (x6, x8, x9 all low) and x13 -> y7 and y8 after 3
//   later of x10, x11 -> y9 after 2;  x12 -> back to Start after 1
// and, on every edge, that y4/y5/y6 move together, that no tank is filled
// and drained at once and that the trolley is never driven both ways.
// Also checked: x1 while x4 is active does not start a cycle, and reset in
// the middle of mixing returns every output to its inactive level.
// Each of these mechanisms is counted; one that never happens is a failure.
module tb_mixer_top;
  logic clk = 1'b0, reset = 1'b1;
  logic x1 = 1'b0, x4_force = 1'b0;
  logic x2, x3, x4p, x4, x5, x6, x7, x8, x9, x10, x11, x12, x13;
  logic y1, y2, y3, y4, y5, y6, y7, y8, y9, y10, y11, y12;
  int fill1, fill2, prep1, prep2, load, travel, cont1, cont2, mix_time;
  int checks = 0, failures = 0;

  assign x4 = x4p | x4_force;

  mixer_top dut (.*);

  mixer_plant_model plant (
    .clk, .reset, .y1, .y2, .y3, .y5, .y6, .y7, .y8, .y9, .y10, .y11, .y12,
    .fill1, .fill2, .prep1, .prep2, .load, .travel, .cont1, .cont2,
    .x2, .x3, .x4(x4p), .x5, .x6, .x7, .x8, .x10, .x11, .x12, .x13
  );

  mixing_timer_model timer (.clk, .reset, .y4, .duration(mix_time), .x9);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- monitor
  int cyc = 0;
  int t_x1, t_y3, t_y10, t_y11, t_x5, t_x7, t_y1, t_y2, t_x4, t_y12;
  int t_x2, t_x3, t_y4, t_mix, t_left, t_y7, t_y8, t_x10, t_x11, t_y9, t_x12;
  logic mix_timer_last;
  logic prev_x9;

  // Mechanism counters.
  int n_blocked_start = 0, n_cycles = 0, n_reset_abort = 0;
  int n_tank1_last = 0, n_tank2_last = 0, n_tanks_tie = 0;
  int n_trolley_last = 0, n_mixing_last = 0;
  int n_cont1_last = 0, n_cont2_last = 0, n_cont_tie = 0;
  int n_timer_last = 0, n_drain_last = 0;

  task automatic clear_times();
    t_x1 = -1;  t_y3 = -1;  t_y10 = -1; t_y11 = -1; t_x5 = -1;  t_x7 = -1;
    t_y1 = -1;  t_y2 = -1;  t_x4 = -1;  t_y12 = -1; t_x2 = -1;  t_x3 = -1;
    t_y4 = -1;  t_mix = -1; t_left = -1; t_y7 = -1; t_y8 = -1;  t_x10 = -1;
    t_x11 = -1; t_y9 = -1;  t_x12 = -1;
  endtask

  function automatic void first(ref int t, input logic cond);
    if (cond && t < 0) t = cyc;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!reset) begin
      first(t_x1, x1 && !x4);
      first(t_y3, y3);   first(t_y10, y10); first(t_y11, y11);
      first(t_x5, y10 && x5); first(t_x7, y11 && x7);
      first(t_y1, y1);   first(t_y2, y2);
      first(t_x4, y3 && x4); first(t_y12, y12);
      first(t_x2, y1 && x2); first(t_x3, y2 && x3);
      first(t_y4, y4);
      if (t_mix < 0 && y4 && !x6 && !x8 && !x9) begin
        t_mix = cyc;
        mix_timer_last = prev_x9;
      end
      first(t_left, y12 && x13);
      first(t_y7, y7);   first(t_y8, y8);
      first(t_x10, y7 && x10); first(t_x11, y8 && x11);
      first(t_y9, y9);
      first(t_x12, y9 && x12);
      // Rules that hold on every edge.
      checks++;
      if (!(y4 == y5 && y5 == y6) || (y10 && y5) || (y11 && y6) || (y9 && y12)) begin
        failures++;
        if (failures < 20) $display("FAIL edge %0d: y4=%b y5=%b y6=%b y10=%b y11=%b y9=%b y12=%b",
                                    cyc, y4, y5, y6, y10, y11, y9, y12);
      end
    end
    prev_x9 <= x9;
  end

  // ---------------------------------------------------------------- helpers
  task automatic step(); @(negedge clk); endtask

  task automatic expect_eq(int got, int want, string tag);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", tag, got, want);
    end
  endtask

  task automatic expect_idle(string tag);
    checks++;
    if ({y1, y2, y3, y4, y5, y6, y7, y8, y9, y10, y11, y12} != 12'b0) begin
      failures++;
      if (failures < 20) $display("FAIL %s: outputs not all inactive", tag);
    end
  endtask

  function automatic int max2(int a, int b); return a > b ? a : b; endfunction

  // One complete production cycle with the given plant timings.
  task automatic run_cycle(int f1, int f2, int p1, int p2, int ld, int d,
                           int c1, int c2, int mt);
    int guard;
    fill1 = f1; fill2 = f2; prep1 = p1; prep2 = p2; load = ld; travel = d;
    cont1 = c1; cont2 = c2; mix_time = mt;
    clear_times();
    step();
    expect_idle("idle before start");
    x1 = 1'b1; step(); x1 = 1'b0;
    guard = 0;
    while (t_x12 < 0 && guard < 2000) begin step(); guard++; end
    step();
    expect_idle("back in Start one edge after x12");
    expect_eq(t_x12 < 0 ? 0 : 1, 1, "cycle completed");
    expect_eq(t_y3,  t_x1 + 2, "x1 -> y3");
    expect_eq(t_y10, t_x1 + 3, "x1 -> y10");
    expect_eq(t_y11, t_x1 + 3, "x1 -> y11");
    expect_eq(t_y1,  t_x5 + 1, "x5 -> y1");
    expect_eq(t_y2,  t_x7 + 1, "x7 -> y2");
    expect_eq(t_y12, t_x4 + 1, "x4 -> y12");
    expect_eq(t_y4,  max2(t_x2, t_x3) + 2, "x2, x3 -> y4");
    expect_eq(t_y7,  max2(t_mix, t_left) + 3, "mixing and trolley done -> y7");
    expect_eq(t_y8,  max2(t_mix, t_left) + 3, "mixing and trolley done -> y8");
    expect_eq(t_y9,  max2(t_x10, t_x11) + 2, "x10, x11 -> y9");
    expect_eq(t_x13_seen() ? 1 : 0, 1, "trolley reached the left end");
    // Which side of each join finished last.
    if (t_x2 > t_x3) n_tank1_last++; else if (t_x3 > t_x2) n_tank2_last++; else n_tanks_tie++;
    if (t_left > t_mix) n_trolley_last++; else if (t_mix > t_left) n_mixing_last++;
    if (t_x10 > t_x11) n_cont1_last++; else if (t_x11 > t_x10) n_cont2_last++; else n_cont_tie++;
    if (mix_timer_last) n_timer_last++; else n_drain_last++;
    n_cycles++;
  endtask

  function automatic logic t_x13_seen(); return t_left >= 0; endfunction

  // ---------------------------------------------------------------- stimulus
  initial begin
    fill1 = 4; fill2 = 6; prep1 = 3; prep2 = 2; load = 2; travel = 5;
    cont1 = 3; cont2 = 4; mix_time = 3;
    clear_times();
    repeat (3) step();
    reset = 1'b0;
    step();
    expect_idle("idle after reset");

    // Start button while containers still sit on the trolley: no start.
    x4_force = 1'b1; x1 = 1'b1; step(); x1 = 1'b0;
    repeat (8) step();
    expect_idle("x1 with x4 active does not start");
    if (t_y3 < 0 && t_y10 < 0) n_blocked_start++;
    x4_force = 1'b0;

    //        fill1 fill2 prep1 prep2 load travel cont1 cont2 mix
    run_cycle(4,    6,    3,    2,    2,   5,   3,    4,    9);   // tank2 last, timer last
    run_cycle(7,    3,    5,    2,    1,   3,   6,    2,    2);   // tank1 last, drain last
    run_cycle(2,    2,    2,    2,    3,   40,  5,    5,    1);   // ties, trolley last
    run_cycle(5,    8,    1,    4,    1,   2,   1,    7,    12);  // mixing last
    run_cycle(3,    3,    6,    6,    2,   6,   9,    2,    3);

    // Reset in the middle of mixing.
    fill1 = 3; fill2 = 3; prep1 = 2; prep2 = 2; load = 1; travel = 2;
    cont1 = 2; cont2 = 2; mix_time = 20;
    x1 = 1'b1; step(); x1 = 1'b0;
    begin
      automatic int guard = 0;
      while (!y4 && guard < 500) begin step(); guard++; end
    end
    if (y4) begin
      reset = 1'b1; step(); step(); reset = 1'b0;
      step();
      expect_idle("reset during mixing");
      n_reset_abort++;
    end
    // A clean cycle after the reset.
    run_cycle(2, 4, 2, 3, 1, 3, 2, 3, 4);

    // Every mechanism must have happened at least once.
    expect_eq(int'(n_blocked_start > 0), 1, "mechanism: start blocked by x4");
    expect_eq(int'(n_cycles >= 6), 1, "mechanism: complete production cycles");
    expect_eq(int'(n_tank1_last > 0), 1, "mechanism: tank 1 finishes last");
    expect_eq(int'(n_tank2_last > 0), 1, "mechanism: tank 2 finishes last");
    expect_eq(int'(n_tanks_tie > 0), 1, "mechanism: both tanks finish together");
    expect_eq(int'(n_trolley_last > 0), 1, "mechanism: trolley finishes after mixing");
    expect_eq(int'(n_mixing_last > 0), 1, "mechanism: mixing finishes after trolley");
    expect_eq(int'(n_cont1_last > 0), 1, "mechanism: container 1 finishes last");
    expect_eq(int'(n_cont2_last > 0), 1, "mechanism: container 2 finishes last");
    expect_eq(int'(n_timer_last > 0), 1, "mechanism: mixing ended by the timer");
    expect_eq(int'(n_drain_last > 0), 1, "mechanism: mixing ended by emptied tanks");
    expect_eq(int'(n_reset_abort > 0), 1, "mechanism: reset during operation");
    $display("mechanisms: cycles=%0d blocked_start=%0d tank1_last=%0d tank2_last=%0d tanks_tie=%0d",
             n_cycles, n_blocked_start, n_tank1_last, n_tank2_last, n_tanks_tie);
    $display("            trolley_last=%0d mixing_last=%0d cont1_last=%0d cont2_last=%0d cont_tie=%0d",
             n_trolley_last, n_mixing_last, n_cont1_last, n_cont2_last, n_cont_tie);
    $display("            timer_last=%0d drain_last=%0d reset_abort=%0d",
             n_timer_last, n_drain_last, n_reset_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
