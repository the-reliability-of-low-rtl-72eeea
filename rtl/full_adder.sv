// full_adder: one-bit full adder, the cell of the main block's carry-save
// array. Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
