// tank1_fsm: subordinate FSM "Tank1" of the beverage-mixer controller.
//
// One of the two concurrent regions of "Preparation of ingredients",
// activated by the Tanks FSM through in_prep. From Idle it enters "Filling
// of tank 1" and opens the inlet valve y10; when the upper level sensor
// x5 reports the tank full it enters "Preparation of ingredient 1"
// (y1); when sensor x2 reports the ingredient ready it enters End and
// raises ce_tank1. Whenever in_prep drops, every state returns to Idle,
// with priority over the forward transitions.
//
// The states, guards and outputs follow the Tank 1 region of the mixer's
// state machine; the Idle and End states and the exits to Idle follow the
// decomposition rule applied to every subordinate machine.
//
// Timing: two-process Moore machine, one clock per transition; outputs are
// decoded from the registered state. Reset (active high, synchronous) goes
// to Idle; the reset style is this design's choice.
module tank1_fsm
  import mixer_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x2,         // ingredient 1 prepared
  input  logic x5,         // tank 1 full (upper level sensor)
  input  logic in_prep,    // activation from the Tanks FSM
  output logic y1,         // preparation of ingredient 1
  output logic y10,        // tank 1 inlet valve
  output logic ce_tank1    // completion to the Tanks FSM
);

  tank_state_t state, state_nx;

  always_ff @(posedge clk) begin
    if (reset) state <= T_IDLE;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    if (!in_prep) begin
      state_nx = T_IDLE;
    end else begin
      unique case (state)
        T_IDLE:  state_nx = T_FILL;
        T_FILL:  if (x5) state_nx = T_PREP;
        T_PREP:  if (x2) state_nx = T_END;
        T_END:   state_nx = T_END;
        default: state_nx = T_IDLE;
      endcase
    end
  end

  assign y10      = (state == T_FILL);
  assign y1       = (state == T_PREP);
  assign ce_tank1 = (state == T_END);

endmodule
