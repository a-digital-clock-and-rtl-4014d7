// slicer_model: behavioural model of one clocked comparator. On each
// rising edge of clk it decides whether the analog input vin is above the
// programmable offset voltage and holds the answer until the next edge.
// Voltages are real numbers in units of the signal amplitude A.
module slicer_model (
  input  logic clk,
  input  real  vin,
  input  real  offset,
  output logic q
);
  initial q = 1'b0;
  always @(posedge clk) q <= (vin > offset);
endmodule
