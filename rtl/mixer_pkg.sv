// mixer_pkg: state types shared by the FSMs of the beverage-mixer controller.
//
// The controller is a hierarchical, concurrent set of finite state machines:
// one master FSM (process_fsm) and six subordinate FSMs, each activated by
// its superior through an "in<State>" signal and reporting completion back
// through a "ce<Name>" signal. Each FSM has its own enumerated state type
// here. The states and their names follow the state machine diagrams of the
// mixer; the Idle and End states of the subordinate machines are the ones the
// decomposition adds. The encodings are plain binary (2 bits per machine),
// which gives the 14 state flip-flops the reference implementation reports
// for the whole controller; the codes themselves are this design's choice.
package mixer_pkg;

  // Master FSM (top level of the hierarchy).
  typedef enum logic [1:0] {
    P_START      = 2'd0,  // waiting for the start button
    P_BEV_PREP   = 2'd1,  // beverage preparation and movement to the left
    P_FILL_CONT  = 2'd2,  // filling of containers
    P_MOVE_RIGHT = 2'd3   // movement to the right (y9)
  } process_state_t;

  // Tanks: preparation of ingredients, then filling of tank 3 and mixing.
  typedef enum logic [1:0] {
    TK_IDLE = 2'd0,
    TK_PREP = 2'd1,  // preparation of ingredients (Tank1 and Tank2 active)
    TK_MIX  = 2'd2,  // filling of tank 3 and mixing (y4, y5, y6)
    TK_END  = 2'd3   // completed (ceTanks)
  } tanks_state_t;

  // Trolley: loading of containers, then movement to the left.
  typedef enum logic [1:0] {
    TR_IDLE = 2'd0,
    TR_LOAD = 2'd1,  // loading of containers (y3)
    TR_LEFT = 2'd2,  // movement to the left (y12)
    TR_END  = 2'd3   // completed (ceTrolley)
  } trolley_state_t;

  // Tank1 / Tank2: filling of the tank, then preparation of the ingredient.
  typedef enum logic [1:0] {
    T_IDLE = 2'd0,
    T_FILL = 2'd1,  // filling of the tank (y10 / y11)
    T_PREP = 2'd2,  // preparation of the ingredient (y1 / y2)
    T_END  = 2'd3   // completed (ceTank1 / ceTank2)
  } tank_state_t;

  // Container1 / Container2: filling of the container.
  typedef enum logic [1:0] {
    C_IDLE = 2'd0,
    C_FILL = 2'd1,  // filling of the container (y7 / y8)
    C_END  = 2'd2   // completed (ceContainer1 / ceContainer2)
  } container_state_t;

endpackage
