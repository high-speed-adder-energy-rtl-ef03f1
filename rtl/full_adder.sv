// full_adder: one-bit full adder, the cell that the ripple-carry blocks of
// the carry skip adder are chained from.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
