// mixer_top: logic controller of an industrial beverage mixer.
//
// The controller starts on the start button x1, fills tanks 1 and 2 (y10,
// y11) while containers are loaded onto a trolley (y3) that then moves left
// (y12), prepares the two ingredients (y1, y2), pours and mixes them in
// tank 3 (y5, y6, y4), fills the two containers (y7, y8) and finally moves
// the trolley back to the right (y9) until x12 reports it home.
//
// It is a hierarchical concurrent FSM made of seven small machines:
//
//   process_fsm (master)
//     |-- in_bev_prep --> tanks_fsm   --ce_tanks-->   process_fsm
//     |                     |-- in_prep --> tank1_fsm --ce_tank1--> tanks_fsm
//     |                     `-- in_prep --> tank2_fsm --ce_tank2--> tanks_fsm
//     |-- in_bev_prep --> trolley_fsm --ce_trolley--> process_fsm
//     |-- in_filling  --> container1_fsm --ce_container1--> process_fsm
//     `-- in_filling  --> container2_fsm --ce_container2--> process_fsm
//
// A superior machine activates a subordinate one by holding its in* signal
// high for as long as it stays in the corresponding composite state; the
// subordinate leaves Idle on the next clock, runs its sequence and parks in
// End with its ce* signal high. When the superior moves on, in* falls and the
// subordinate goes back to Idle on the next clock. This hierarchy, the
// module split and the signal names follow the reference decomposition of
// the mixer; the port list keeps the plant's signal names x1..x13 and
// y1..y12.
//
// Interface: 13 single-bit sensor inputs and 12 single-bit actuator outputs,
// all synchronous to clk; reset is active high and synchronous. Mixing time
// is measured outside: y4 starts an external timer whose output returns as
// x9 (active while mixing must go on).
//
// Timing: every machine is a registered Moore FSM, so each level of the
// hierarchy adds one clock. If the rising edge n samples x1 & !x4 in Start,
// the master changes state at edge n, y3 is high after edge n+1 and y10/y11
// after edge n+2. Likewise, the edge that samples the last of x2/x3 is
// followed by y4/y5/y6 one edge later; the edge that samples the later of
// "mixing done" (x6, x8, x9 all low) and x13 is followed by y7/y8 two edges
// later; the edge that samples the later of x10/x11 is followed by y9 one
// edge later; x12 returns the master to Start at the edge that samples it.
module mixer_top (
  input  logic clk,
  input  logic reset,
  input  logic x1,  input  logic x2,  input  logic x3,  input  logic x4,
  input  logic x5,  input  logic x6,  input  logic x7,  input  logic x8,
  input  logic x9,  input  logic x10, input  logic x11, input  logic x12,
  input  logic x13,
  output logic y1,  output logic y2,  output logic y3,  output logic y4,
  output logic y5,  output logic y6,  output logic y7,  output logic y8,
  output logic y9,  output logic y10, output logic y11, output logic y12
);

  // Activation (in*) and completion (ce*) signals between the machines.
  logic in_bev_prep, in_filling, in_prep;
  logic ce_tanks, ce_trolley, ce_tank1, ce_tank2;
  logic ce_container1, ce_container2;

  process_fsm u_process (
    .clk, .reset, .x1, .x4, .x12,
    .ce_tanks, .ce_trolley, .ce_container1, .ce_container2,
    .y9, .in_bev_prep, .in_filling
  );

  tanks_fsm u_tanks (
    .clk, .reset, .x6, .x8, .x9, .in_bev_prep, .ce_tank1, .ce_tank2,
    .y4, .y5, .y6, .in_prep, .ce_tanks
  );

  trolley_fsm u_trolley (
    .clk, .reset, .x4, .x13, .in_bev_prep, .y3, .y12, .ce_trolley
  );

  tank1_fsm u_tank1 (
    .clk, .reset, .x2, .x5, .in_prep, .y1, .y10, .ce_tank1
  );

  tank2_fsm u_tank2 (
    .clk, .reset, .x3, .x7, .in_prep, .y2, .y11, .ce_tank2
  );

  container1_fsm u_container1 (
    .clk, .reset, .x10, .in_filling, .y7, .ce_container1
  );

  container2_fsm u_container2 (
    .clk, .reset, .x11, .in_filling, .y8, .ce_container2
  );

  // Rules of the activation/completion handshake: a machine reports
  // completion only while (or one clock after) its superior activates it, the
  // two composite states of the master never overlap, and the trolley is
  // never driven both ways.
  a_ce_tanks_act: assert property (@(posedge clk) disable iff (reset)
    ce_tanks |-> $past(in_bev_prep));
  a_ce_trolley_act: assert property (@(posedge clk) disable iff (reset)
    ce_trolley |-> $past(in_bev_prep));
  a_ce_tank1_act: assert property (@(posedge clk) disable iff (reset)
    ce_tank1 |-> $past(in_prep));
  a_ce_tank2_act: assert property (@(posedge clk) disable iff (reset)
    ce_tank2 |-> $past(in_prep));
  a_ce_cont1_act: assert property (@(posedge clk) disable iff (reset)
    ce_container1 |-> $past(in_filling));
  a_ce_cont2_act: assert property (@(posedge clk) disable iff (reset)
    ce_container2 |-> $past(in_filling));
  a_master_excl: assert property (@(posedge clk) disable iff (reset)
    !(in_bev_prep && in_filling));
  a_trolley_dir: assert property (@(posedge clk) disable iff (reset)
    !(y9 && y12));

endmodule
