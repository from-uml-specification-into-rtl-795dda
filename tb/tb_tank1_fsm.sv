// tb_tank1_fsm: self-checking testbench for tank1_fsm.
//
// A reference model kept as a plain step counter (0 idle, 1 filling,
// 2 preparing, 3 done) runs alongside the DUT. Inputs change on the falling
// clock edge and outputs are compared just before each change. A directed
// pass checks the one-clock latency of every step and the return to Idle when
// the activation drops in each state; a random pass then drives in_prep,
// x5 and x2 with biased random values for many cycles.
module tb_tank1_fsm;
  logic clk = 1'b0, reset = 1'b1;
  logic x2 = 1'b0, x5 = 1'b0, in_prep = 1'b0;
  logic y1, y10, ce_tank1;
  int checks = 0, failures = 0;
  int ref_step;

  tank1_fsm dut (.*);

  always #5 clk = ~clk;

  // Reference model: advances on the rising edge from the sampled inputs.
  always @(posedge clk) begin
    if (reset || !in_prep) ref_step <= 0;
    else if (ref_step == 0) ref_step <= 1;
    else if (ref_step == 1 && x5) ref_step <= 2;
    else if (ref_step == 2 && x2) ref_step <= 3;
  end

  task automatic compare(string tag);
    checks++;
    if (y10 !== (ref_step == 1) || y1 !== (ref_step == 2) || ce_tank1 !== (ref_step == 3)) begin
      failures++;
      if (failures < 20) $display("FAIL %s: step=%0d y10=%b y1=%b ce=%b", tag, ref_step, y10, y1, ce_tank1);
    end
  endtask

  task automatic expect_outputs(logic e_fill, logic e_prep, logic e_ce, string tag);
    checks++;
    if ({y10, y1, ce_tank1} !== {e_fill, e_prep, e_ce}) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got y10=%b y1=%b ce=%b", tag, y10, y1, ce_tank1);
    end
  endtask

  task automatic step(); @(negedge clk); endtask

  initial begin
    repeat (3) step();
    reset = 1'b0;
    step();
    expect_outputs(0, 0, 0, "idle after reset");
    // Full sequence, one clock per step.
    in_prep = 1'b1; step();
    expect_outputs(1, 0, 0, "filling one clock after activation");
    step(); expect_outputs(1, 0, 0, "keeps filling until full");
    x5 = 1'b1; step(); x5 = 1'b0;
    expect_outputs(0, 1, 0, "preparing one clock after full");
    step(); expect_outputs(0, 1, 0, "keeps preparing until ready");
    x2 = 1'b1; step(); x2 = 1'b0;
    expect_outputs(0, 0, 1, "done one clock after ready");
    x5 = 1'b1; x2 = 1'b1; step();
    expect_outputs(0, 0, 1, "stays done");
    x5 = 1'b0; x2 = 1'b0;
    in_prep = 1'b0; step();
    expect_outputs(0, 0, 0, "idle one clock after deactivation");
    // Deactivation from the filling and the preparing state.
    in_prep = 1'b1; step(); in_prep = 1'b0; step();
    expect_outputs(0, 0, 0, "abort from filling");
    in_prep = 1'b1; x5 = 1'b1; step(); step(); x5 = 1'b0;
    expect_outputs(0, 1, 0, "preparing again");
    in_prep = 1'b0; x2 = 1'b1; step(); x2 = 1'b0;
    expect_outputs(0, 0, 0, "deactivation has priority over ready");
    // Reset in the middle of a run.
    in_prep = 1'b1; step(); reset = 1'b1; step(); reset = 1'b0;
    expect_outputs(0, 0, 0, "reset returns to idle");
    // Random pass against the reference model.
    repeat (4000) begin
      compare("random");
      in_prep = ($urandom_range(0, 19) != 0);
      x5    = ($urandom_range(0, 3) == 0);
      x2    = ($urandom_range(0, 3) == 0);
      reset   = ($urandom_range(0, 199) == 0);
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
