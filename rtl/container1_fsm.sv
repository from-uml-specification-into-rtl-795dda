// container1_fsm: subordinate FSM "Container1" of the beverage-mixer
// controller.
//
// One of the two concurrent regions of "Filling of containers", activated by
// the master FSM through in_filling. From Idle it enters "Filling of
// container 1" and opens the tank 3 outlet y7; when sensor x10 reports the
// container filled and closed it enters End and raises ce_container1.
// Whenever in_filling drops, every state returns to Idle, with priority over
// the forward transition.
//
// The states, guard and output follow the Container 1 region of the
// mixer's state machine; the Idle and End states and the exits to Idle follow
// the decomposition rule applied to every subordinate machine.
//
// Timing: two-process Moore machine, one clock per transition; outputs are
// decoded from the registered state. Reset (active high, synchronous) goes
// to Idle; the reset style is this design's choice.
module container1_fsm
  import mixer_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x10,             // container 1 filled and closed
  input  logic in_filling,      // activation from the master FSM
  output logic y7,             // filling of container 1
  output logic ce_container1  // completion to the master FSM
);

  container_state_t state, state_nx;

  always_ff @(posedge clk) begin
    if (reset) state <= C_IDLE;
    else       state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    if (!in_filling) begin
      state_nx = C_IDLE;
    end else begin
      unique case (state)
        C_IDLE:  state_nx = C_FILL;
        C_FILL:  if (x10) state_nx = C_END;
        C_END:   state_nx = C_END;
        default: state_nx = C_IDLE;
      endcase
    end
  end

  assign y7            = (state == C_FILL);
  assign ce_container1 = (state == C_END);

endmodule
