// tb_trolley_fsm: self-checking testbench for trolley_fsm.
//
// A reference model kept as a step counter (0 idle, 1 loading, 2 moving
// left, 3 done) runs alongside the DUT. Inputs change on the falling clock
// edge and outputs are compared just before each change. A directed pass
// checks the one-clock latency of each step and the return to Idle when
// in_bev_prep drops in every state; a random pass follows.
module tb_trolley_fsm;
  logic clk = 1'b0, reset = 1'b1;
  logic x4 = 1'b0, x13 = 1'b0, in_bev_prep = 1'b0;
  logic y3, y12, ce_trolley;
  int checks = 0, failures = 0;
  int ref_step;

  trolley_fsm dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (reset || !in_bev_prep) ref_step <= 0;
    else if (ref_step == 0) ref_step <= 1;
    else if (ref_step == 1 && x4) ref_step <= 2;
    else if (ref_step == 2 && x13) ref_step <= 3;
  end

  task automatic expect_outputs(logic e_y3, logic e_y12, logic e_ce, string tag);
    checks++;
    if ({y3, y12, ce_trolley} !== {e_y3, e_y12, e_ce}) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got y3=%b y12=%b ce=%b", tag, y3, y12, ce_trolley);
    end
  endtask

  task automatic step(); @(negedge clk); endtask

  initial begin
    repeat (3) step();
    reset = 1'b0;
    step();
    expect_outputs(0, 0, 0, "idle after reset");
    in_bev_prep = 1'b1; step();
    expect_outputs(1, 0, 0, "loading one clock after activation");
    x13 = 1'b1; step(); x13 = 1'b0;
    expect_outputs(1, 0, 0, "x13 alone does not leave loading");
    x4 = 1'b1; step(); x4 = 1'b0;
    expect_outputs(0, 1, 0, "moving left one clock after x4");
    step(); expect_outputs(0, 1, 0, "keeps moving until x13");
    x13 = 1'b1; step(); x13 = 1'b0;
    expect_outputs(0, 0, 1, "done one clock after x13");
    step(); expect_outputs(0, 0, 1, "stays done");
    in_bev_prep = 1'b0; step();
    expect_outputs(0, 0, 0, "idle one clock after deactivation");
    in_bev_prep = 1'b1; step(); in_bev_prep = 1'b0; x4 = 1'b1; step(); x4 = 1'b0;
    expect_outputs(0, 0, 0, "abort from loading");
    in_bev_prep = 1'b1; x4 = 1'b1; step(); step(); x4 = 1'b0;
    expect_outputs(0, 1, 0, "moving left again");
    in_bev_prep = 1'b0; x13 = 1'b1; step(); x13 = 1'b0;
    expect_outputs(0, 0, 0, "abort from moving left");
    in_bev_prep = 1'b1; step(); reset = 1'b1; step(); reset = 1'b0; in_bev_prep = 1'b0;
    expect_outputs(0, 0, 0, "reset returns to idle");
    repeat (4000) begin
      expect_outputs(ref_step == 1, ref_step == 2, ref_step == 3, "random");
      in_bev_prep = ($urandom_range(0, 19) != 0);
      x4          = ($urandom_range(0, 3) == 0);
      x13         = ($urandom_range(0, 3) == 0);
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
