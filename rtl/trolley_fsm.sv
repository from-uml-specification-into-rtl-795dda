// trolley_fsm: subordinate FSM "Trolley" of the beverage-mixer controller.
//
// Activated by the master through in_bev_prep, concurrently with the Tanks
// FSM. From Idle it enters "Loading of containers" (y3, containers are
// delivered onto the trolley); when they sit correctly (x4) it enters
// "Movement to the left" (y12); when the trolley reaches the left sensor
// (x13) it enters End and raises ce_trolley. Whenever in_bev_prep drops,
// every state returns to Idle, with priority over the forward transitions.
//
// The states, guards and outputs follow the Trolley region of the mixer's
// state machine, with the Idle and End states and the exits to Idle that the
// decomposition adds; giving the exit to Idle priority is this design's choice.
//
// Timing: two-process Moore machine, one clock per transition; outputs are
// decoded from the registered state. Reset (active high, synchronous) goes
// to Idle; the reset style is this design's choice.
module trolley_fsm
  import mixer_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x4,          // containers placed on the trolley
  input  logic x13,         // trolley at the left end position
  input  logic in_bev_prep, // activation from the master FSM
  output logic y3,          // delivery of containers
  output logic y12,         // trolley movement to the left
  output logic ce_trolley   // completion to the master FSM
);

  trolley_state_t state, state_nx;

  always_ff @(posedge clk) begin
    if (reset) state <= TR_IDLE;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    if (!in_bev_prep) begin
      state_nx = TR_IDLE;
    end else begin
      unique case (state)
        TR_IDLE: state_nx = TR_LOAD;
        TR_LOAD: if (x4)  state_nx = TR_LEFT;
        TR_LEFT: if (x13) state_nx = TR_END;
        TR_END:  state_nx = TR_END;
        default: state_nx = TR_IDLE;
      endcase
    end
  end

  assign y3         = (state == TR_LOAD);
  assign y12        = (state == TR_LEFT);
  assign ce_trolley = (state == TR_END);

endmodule
