// container2_fsm: subordinate FSM "Container2" of the beverage-mixer
// controller.
//
// One of the two concurrent regions of "Filling of containers", activated by
// the master FSM through in_filling. From Idle it enters "Filling of
// container 2" and opens the tank 3 outlet y8; when sensor x11 reports the
// container filled and closed it enters End and raises ce_container2.
// Whenever in_filling drops, every state returns to Idle, with priority over
// the forward transition.
//
// The states, guard and output follow the Container 2 region of the
// mixer's state machine; the Idle and End states and the exits to Idle follow
// the decomposition rule applied to every subordinate machine.
//
// Timing: two-process Moore machine, one clock per transition; outputs are
// decoded from the registered state. Reset (active high, synchronous) goes
// to Idle; the reset style is this design's choice.
module container2_fsm
  import mixer_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x11,             // container 2 filled and closed
  input  logic in_filling,      // activation from the master FSM
  output logic y8,             // filling of container 2
  output logic ce_container2  // completion to the master FSM
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
        C_FILL:  if (x11) state_nx = C_END;
        C_END:   state_nx = C_END;
        default: state_nx = C_IDLE;
      endcase
    end
  end

  assign y8            = (state == C_FILL);
  assign ce_container2 = (state == C_END);

endmodule
