// process_fsm: master (coordinating) FSM of the beverage-mixer controller.
//
// It walks the top level of the mixer's state machine:
//   Start --[x1 & !x4]--> Beverage preparation and movement to the left
//         --[ceTanks & ceTrolley]--> Filling of containers
//         --[ceContainer1 & ceContainer2]--> Movement to the right (y9)
//         --[x12]--> Start
// While in "Beverage preparation ..." it holds in_bev_prep high, which
// activates the Tanks and Trolley FSMs; while in "Filling of containers" it
// holds in_filling high, which activates Container1 and Container2. The
// composite states end when all their concurrent sub-machines report
// completion; those completion signals replace the UML completion
// transitions.
//
// States, guards and outputs follow the top level of the mixer's state
// machine, including the start guard x1 & !x4 (a cycle starts only when no
// containers are left on the trolley). The state codes are this design's
// choice.
//
// Timing: Moore machine written as two processes (state register plus a
// combinational next-state/output block). Guards are sampled on the rising
// clock edge; outputs follow the registered state, so each transition takes
// one clock. Reset (active high, synchronous) returns to Start; the reset
// style is this design's choice.
module process_fsm
  import mixer_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x1,            // start button
  input  logic x4,            // containers placed on the trolley
  input  logic x12,           // trolley back in its initial position
  input  logic ce_tanks,      // Tanks FSM completed
  input  logic ce_trolley,    // Trolley FSM completed
  input  logic ce_container1, // Container1 FSM completed
  input  logic ce_container2, // Container2 FSM completed
  output logic y9,            // trolley movement to the right
  output logic in_bev_prep,   // activation of Tanks and Trolley
  output logic in_filling     // activation of Container1 and Container2
);

  process_state_t state, state_nx;

  always_ff @(posedge clk) begin
    if (reset) state <= P_START;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      P_START:      if (x1 && !x4)                     state_nx = P_BEV_PREP;
      P_BEV_PREP:   if (ce_tanks && ce_trolley)        state_nx = P_FILL_CONT;
      P_FILL_CONT:  if (ce_container1 && ce_container2) state_nx = P_MOVE_RIGHT;
      P_MOVE_RIGHT: if (x12)                           state_nx = P_START;
      default:                                         state_nx = P_START;
    endcase
  end

  assign in_bev_prep = (state == P_BEV_PREP);
  assign in_filling  = (state == P_FILL_CONT);
  assign y9          = (state == P_MOVE_RIGHT);

endmodule
