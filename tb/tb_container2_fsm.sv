// tb_container2_fsm: self-checking testbench for container2_fsm.
//
// A reference model kept as a step counter (0 idle, 1 filling, 2 done) runs
// alongside the DUT. Inputs change on the falling clock edge and outputs are
// compared just before each change. A directed pass checks the one-clock
// latency of each step and the return to Idle when in_filling drops; a
// random pass then drives in_filling and x11 with biased random values.
module tb_container2_fsm;
  logic clk = 1'b0, reset = 1'b1;
  logic x11 = 1'b0, in_filling = 1'b0;
  logic y8, ce_container2;
  int checks = 0, failures = 0;
  int ref_step;

  container2_fsm dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (reset || !in_filling) ref_step <= 0;
    else if (ref_step == 0) ref_step <= 1;
    else if (ref_step == 1 && x11) ref_step <= 2;
  end

  task automatic expect_outputs(logic e_fill, logic e_ce, string tag);
    checks++;
    if ({y8, ce_container2} !== {e_fill, e_ce}) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got y8=%b ce=%b", tag, y8, ce_container2);
    end
  endtask

  task automatic step(); @(negedge clk); endtask

  initial begin
    repeat (3) step();
    reset = 1'b0;
    step();
    expect_outputs(0, 0, "idle after reset");
    in_filling = 1'b1; step();
    expect_outputs(1, 0, "filling one clock after activation");
    step(); expect_outputs(1, 0, "keeps filling until x11");
    x11 = 1'b1; step();
    expect_outputs(0, 1, "done one clock after x11");
    step(); expect_outputs(0, 1, "stays done");
    x11 = 1'b0; in_filling = 1'b0; step();
    expect_outputs(0, 0, "idle one clock after deactivation");
    in_filling = 1'b1; step(); expect_outputs(1, 0, "filling again");
    in_filling = 1'b0; x11 = 1'b1; step(); x11 = 1'b0;
    expect_outputs(0, 0, "deactivation has priority over x11");
    in_filling = 1'b1; step(); reset = 1'b1; step(); reset = 1'b0;
    expect_outputs(0, 0, "reset returns to idle");
    repeat (4000) begin
      expect_outputs(ref_step == 1, ref_step == 2, "random");
      in_filling = ($urandom_range(0, 9) != 0);
      x11        = ($urandom_range(0, 3) == 0);
      reset      = ($urandom_range(0, 199) == 0);
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
