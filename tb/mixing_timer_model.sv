// mixing_timer_model: behavioural model of the external mixing timer.
//
// Not part of the controller: it stands in for the timer that the mixer's
// block diagram places outside the controller, between output y4 and input
// x9. While y4 (mixer running) is high it counts clock cycles and holds x9
// high until duration cycles have passed; x9 is low whenever y4 is low. The
// duration is an input so that a testbench can vary it between runs.
module mixing_timer_model (
  input  logic clk,
  input  logic reset,
  input  logic y4,        // mixer running: timer runs
  input  int   duration,  // mixing time in clock cycles
  output logic x9         // mixing still in progress
);
  int count;

  always_ff @(posedge clk) begin
    if (reset || !y4) count <= 0;
    else if (count < duration) count <= count + 1;
  end

  assign x9 = y4 && (count < duration);
endmodule
