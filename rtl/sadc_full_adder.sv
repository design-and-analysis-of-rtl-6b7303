// sadc_full_adder: one-bit full adder, the 3:2 compressor cell of the
// Wallace-tree ones-counter (an ADDFXL standard cell in the gate-level
// netlist). Purely combinational: s is the parity of a, b and ci, co is their
// majority.
module sadc_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
