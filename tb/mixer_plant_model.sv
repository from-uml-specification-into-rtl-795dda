// mixer_plant_model: behavioural model of the beverage mixer plant.
//
// Not part of the controller: it answers the controller's actuator outputs
// with the sensor signals a real plant would produce, so that the controller
// can be run through whole production cycles. Every quantity moves by one
// unit per clock:
//   tank i level   rises while its inlet valve is open (y10 / y11), falls
//                  while its outlet valve is open (y5 / y6); x5 / x7 report
//                  "full" (level >= fill_i), x6 / x8 "not empty" (level > 0)
//   ingredient i   prepared (x2 / x3) after prep_i cycles of y1 / y2; the
//                  count restarts when the tank is refilled
//   containers     placed on the trolley (x4) after load cycles of y3;
//                  container i is filled and closed (x10 / x11) after cont_i
//                  cycles of y7 / y8
//   trolley        position moves left under y12 and right under y9; x13 is
//                  the left end (position == travel), x12 the home position
//                  (position == 0). Arriving home under y9 unloads the
//                  containers, which clears x4 and the container fills.
// All durations are inputs, so that one testbench can vary them per run.
module mixer_plant_model (
  input  logic clk,
  input  logic reset,
  input  logic y1, y2, y3, y5, y6, y7, y8, y9, y10, y11, y12,
  input  int   fill1, fill2, prep1, prep2, load, travel, cont1, cont2,
  output logic x2, x3, x4, x5, x6, x7, x8, x10, x11, x12, x13
);
  int level1, level2, p1, p2, loaded, pos, c1, c2;

  always_ff @(posedge clk) begin
    if (reset) begin
      level1 <= 0; level2 <= 0; p1 <= 0; p2 <= 0;
      loaded <= 0; pos <= 0; c1 <= 0; c2 <= 0;
    end else begin
      if (y10 && level1 < fill1) level1 <= level1 + 1;
      else if (y5 && level1 > 0) level1 <= level1 - 1;
      if (y11 && level2 < fill2) level2 <= level2 + 1;
      else if (y6 && level2 > 0) level2 <= level2 - 1;
      if (y10) p1 <= 0; else if (y1 && p1 < prep1) p1 <= p1 + 1;
      if (y11) p2 <= 0; else if (y2 && p2 < prep2) p2 <= p2 + 1;
      if (y3 && loaded < load) loaded <= loaded + 1;
      if (y7 && c1 < cont1) c1 <= c1 + 1;
      if (y8 && c2 < cont2) c2 <= c2 + 1;
      if (y12 && pos < travel) pos <= pos + 1;
      else if (y9 && pos > 0) pos <= pos - 1;
      if (y9 && pos == 0) begin
        loaded <= 0; c1 <= 0; c2 <= 0;
      end
    end
  end

  assign x5  = level1 >= fill1;
  assign x6  = level1 > 0;
  assign x7  = level2 >= fill2;
  assign x8  = level2 > 0;
  assign x2  = p1 >= prep1;
  assign x3  = p2 >= prep2;
  assign x4  = loaded >= load;
  assign x10 = c1 >= cont1;
  assign x11 = c2 >= cont2;
  assign x13 = pos >= travel;
  assign x12 = pos == 0;
endmodule
