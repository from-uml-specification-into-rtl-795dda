// tb_process_fsm: self-checking testbench for process_fsm, the master FSM.
//
// A reference model kept as a step counter (0 start, 1 beverage preparation
// and movement to the left, 2 filling of containers, 3 movement to the
// right) runs alongside the DUT. Inputs change on the falling clock edge and
// outputs are compared just before each change. The directed pass checks the
// start guard x1 & !x4, that each composite state waits for both of its
// completion signals, that x12 closes the cycle, and the one-clock latency of
// every transition. A random pass follows.
module tb_process_fsm;
  logic clk = 1'b0, reset = 1'b1;
  logic x1 = 1'b0, x4 = 1'b0, x12 = 1'b0;
  logic ce_tanks = 1'b0, ce_trolley = 1'b0, ce_container1 = 1'b0, ce_container2 = 1'b0;
  logic y9, in_bev_prep, in_filling;
  int checks = 0, failures = 0;
  int ref_step;

  process_fsm dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (reset) ref_step <= 0;
    else case (ref_step)
      0: if (x1 && !x4) ref_step <= 1;
      1: if (ce_tanks && ce_trolley) ref_step <= 2;
      2: if (ce_container1 && ce_container2) ref_step <= 3;
      3: if (x12) ref_step <= 0;
      default: ref_step <= 0;
    endcase
  end

  task automatic expect_step(int s, string tag);
    checks++;
    if ({in_bev_prep, in_filling, y9} !== {s == 1, s == 2, s == 3}) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: want step %0d, got in_bev_prep=%b in_filling=%b y9=%b",
                 tag, s, in_bev_prep, in_filling, y9);
    end
  endtask

  task automatic step(); @(negedge clk); endtask

  initial begin
    repeat (3) step();
    reset = 1'b0;
    step();
    expect_step(0, "start after reset");
    x1 = 1'b1; x4 = 1'b1; step();
    expect_step(0, "x1 with x4 active does not start");
    x4 = 1'b0; step(); x1 = 1'b0;
    expect_step(1, "start one clock after x1 & !x4");
    ce_tanks = 1'b1; step();
    expect_step(1, "tanks done alone is not enough");
    ce_tanks = 1'b0; ce_trolley = 1'b1; step();
    expect_step(1, "trolley done alone is not enough");
    ce_tanks = 1'b1; step(); ce_tanks = 1'b0; ce_trolley = 1'b0;
    expect_step(2, "filling one clock after both done");
    ce_container1 = 1'b1; x12 = 1'b1; step();
    expect_step(2, "container 1 alone is not enough");
    ce_container1 = 1'b0; ce_container2 = 1'b1; step();
    expect_step(2, "container 2 alone is not enough");
    ce_container1 = 1'b1; x12 = 1'b0; step(); ce_container1 = 1'b0; ce_container2 = 1'b0;
    expect_step(3, "moving right one clock after both containers");
    step(); expect_step(3, "keeps moving right until x12");
    x12 = 1'b1; step(); x12 = 1'b0;
    expect_step(0, "start one clock after x12");
    x1 = 1'b1; step(); x1 = 1'b0; reset = 1'b1; step(); reset = 1'b0;
    expect_step(0, "reset returns to start");
    repeat (4000) begin
      expect_step(ref_step, "random");
      x1            = ($urandom_range(0, 3) == 0);
      x4            = ($urandom_range(0, 1) == 0);
      x12           = ($urandom_range(0, 3) == 0);
      ce_tanks      = ($urandom_range(0, 1) == 0);
      ce_trolley    = ($urandom_range(0, 1) == 0);
      ce_container1 = ($urandom_range(0, 1) == 0);
      ce_container2 = ($urandom_range(0, 1) == 0);
      reset         = ($urandom_range(0, 199) == 0);
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
