// tb_tanks_fsm: self-checking testbench for tanks_fsm.
//
// A reference model kept as a step counter (0 idle, 1 preparing ingredients,
// 2 filling tank 3 and mixing, 3 done) runs alongside the DUT. Inputs change
// on the falling clock edge and outputs are compared just before each
// change. The directed pass checks that mixing starts only when both tanks
// report completion, that it ends only when x6, x8 and x9 are all inactive,
// the one-clock latency of each step and the return to Idle when in_bev_prep
// drops. A random pass follows.
module tb_tanks_fsm;
  logic clk = 1'b0, reset = 1'b1;
  logic x6 = 1'b0, x8 = 1'b0, x9 = 1'b0;
  logic in_bev_prep = 1'b0, ce_tank1 = 1'b0, ce_tank2 = 1'b0;
  logic y4, y5, y6, in_prep, ce_tanks;
  int checks = 0, failures = 0;
  int ref_step;

  tanks_fsm dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (reset || !in_bev_prep) ref_step <= 0;
    else if (ref_step == 0) ref_step <= 1;
    else if (ref_step == 1 && ce_tank1 && ce_tank2) ref_step <= 2;
    else if (ref_step == 2 && !(x6 || x8 || x9)) ref_step <= 3;
  end

  task automatic expect_step(int s, string tag);
    checks++;
    if ({in_prep, y4, y5, y6, ce_tanks} !==
        {s == 1, s == 2, s == 2, s == 2, s == 3}) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: want step %0d, got in_prep=%b y4=%b y5=%b y6=%b ce=%b",
                 tag, s, in_prep, y4, y5, y6, ce_tanks);
    end
  endtask

  task automatic step(); @(negedge clk); endtask

  initial begin
    repeat (3) step();
    reset = 1'b0;
    step();
    expect_step(0, "idle after reset");
    in_bev_prep = 1'b1; step();
    expect_step(1, "preparing one clock after activation");
    ce_tank1 = 1'b1; step();
    expect_step(1, "one tank done is not enough");
    ce_tank1 = 1'b0; ce_tank2 = 1'b1; step();
    expect_step(1, "other tank alone is not enough");
    ce_tank1 = 1'b1; x6 = 1'b1; x8 = 1'b1; x9 = 1'b1; step();
    ce_tank1 = 1'b0; ce_tank2 = 1'b0;
    expect_step(2, "mixing one clock after both tanks done");
    x6 = 1'b0; step(); expect_step(2, "x8 and x9 still active");
    x8 = 1'b0; step(); expect_step(2, "x9 still active");
    x9 = 1'b0; x6 = 1'b1; step(); expect_step(2, "x6 active again");
    x6 = 1'b0; step();
    expect_step(3, "done one clock after x6, x8, x9 all inactive");
    x9 = 1'b1; step(); expect_step(3, "stays done"); x9 = 1'b0;
    in_bev_prep = 1'b0; step();
    expect_step(0, "idle one clock after deactivation");
    in_bev_prep = 1'b1; ce_tank1 = 1'b1; ce_tank2 = 1'b1; step(); step();
    ce_tank1 = 1'b0; ce_tank2 = 1'b0;
    expect_step(2, "mixing again");
    in_bev_prep = 1'b0; step();
    expect_step(0, "abort from mixing");
    in_bev_prep = 1'b1; step(); in_bev_prep = 1'b0; ce_tank1 = 1'b1; ce_tank2 = 1'b1; step();
    ce_tank1 = 1'b0; ce_tank2 = 1'b0;
    expect_step(0, "abort from preparing has priority");
    in_bev_prep = 1'b1; step(); reset = 1'b1; step(); reset = 1'b0; in_bev_prep = 1'b0;
    expect_step(0, "reset returns to idle");
    repeat (4000) begin
      expect_step(ref_step, "random");
      in_bev_prep = ($urandom_range(0, 19) != 0);
      ce_tank1    = ($urandom_range(0, 1) == 0);
      ce_tank2    = ($urandom_range(0, 1) == 0);
      x6          = ($urandom_range(0, 2) == 0);
      x8          = ($urandom_range(0, 2) == 0);
      x9          = ($urandom_range(0, 2) == 0);
      reset       = ($urandom_range(0, 199) == 0);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
