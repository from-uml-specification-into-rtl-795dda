// tanks_fsm: subordinate FSM "Tanks" of the beverage-mixer controller.
//
// Activated by the master through in_bev_prep. From Idle it enters
// "Preparation of ingredients", where it holds in_prep high to run the Tank1
// and Tank2 FSMs concurrently. When both report completion (ce_tank1 &
// ce_tank2) it moves to "Filling of tank 3 and mixing", opening the outlet
// valves y5, y6 and running the mixer y4 (y4 also starts the external mixing
// timer). When tanks 1 and 2 are empty and the timer has run out
// (!x6 & !x8 & !x9) it enters End and raises ce_tanks. Whenever in_bev_prep
// drops, every state returns to Idle; this exit has priority over the
// forward transitions.
//
// The states, guards and outputs follow the Tanks region of the mixer's
// state machine, with the Idle and End states and the exits to Idle that the
// decomposition adds; giving the exit to Idle priority is this design's choice.
//
// Timing: two-process Moore machine, one clock per transition; outputs are
// decoded from the registered state. Reset (active high, synchronous) goes
// to Idle; the reset style is this design's choice.
module tanks_fsm
  import mixer_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x6,          // tank 1 lower level sensor
  input  logic x8,          // tank 2 lower level sensor
  input  logic x9,          // mixing timer still running
  input  logic in_bev_prep, // activation from the master FSM
  input  logic ce_tank1,    // Tank1 FSM completed
  input  logic ce_tank2,    // Tank2 FSM completed
  output logic y4,          // mixer motor (and timer start)
  output logic y5,          // tank 1 outlet valve
  output logic y6,          // tank 2 outlet valve
  output logic in_prep,     // activation of Tank1 and Tank2
  output logic ce_tanks     // completion to the master FSM
);

  tanks_state_t state, state_nx;

  always_ff @(posedge clk) begin
    if (reset) state <= TK_IDLE;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    if (!in_bev_prep) begin
      state_nx = TK_IDLE;
    end else begin
      unique case (state)
        TK_IDLE: state_nx = TK_PREP;
        TK_PREP: if (ce_tank1 && ce_tank2) state_nx = TK_MIX;
        TK_MIX:  if (!x6 && !x8 && !x9)    state_nx = TK_END;
        TK_END:  state_nx = TK_END;
        default: state_nx = TK_IDLE;
      endcase
    end
  end

  assign in_prep  = (state == TK_PREP);
  assign y4       = (state == TK_MIX);
  assign y5       = (state == TK_MIX);
  assign y6       = (state == TK_MIX);
  assign ce_tanks = (state == TK_END);

endmodule
