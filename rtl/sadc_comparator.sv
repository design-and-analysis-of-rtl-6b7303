// sadc_comparator: behavioural model of one stochastic comparator cell.
//
// The real cell is built from standard cells only: two NAND3 gates
// (NAND3X1), each taking one analog input, the clock and the other gate's
// output, are cross-coupled into a clocked regenerative stage, and two NOR2
// gates (NOR2X2) form the latch that drives Q. No threshold is set on
// purpose: device mismatch gives every cell a random input offset, and the
// cell decides whether the differential input exceeds it. That analog
// behaviour cannot be written as logic, so this file models it.
//
// Model: the differential input is the signed code inp - inn (see sadc_pkg for
// the scale); OFFSET is this cell's offset in the same codes. At every rising
// clock edge the cell decides q = (inp - inn > OFFSET) and holds the decision
// for the whole cycle. The counter downstream samples it at the following
// falling edge, inside the evaluation phase of the real cell, so holding the
// value through the low phase (where the real cell returns to zero) changes
// nothing the counter sees. The sign convention (q high for a positive
// inp - inn) is this model's choice.
module sadc_comparator
  import sadc_pkg::*;
#(
  parameter int OFFSET = 0
) (
  input  logic clk,
  input  vin_t inn,
  input  vin_t inp,
  output logic q
);
  logic signed [VIN_W:0] diff;

  always_comb diff = (VIN_W+1)'(inp) - (VIN_W+1)'(inn);

  always_ff @(posedge clk) q <= (diff > (VIN_W+1)'(OFFSET));
endmodule
