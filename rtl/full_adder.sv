// full_adder - one-bit full adder.
// s = x ^ y ^ ci, co = x.y + x.ci + y.ci (majority). Purely combinational;
// ci is the carry from the next lower position C(i-1), co is C(i).
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ ci;
  assign co = (x & y) | (x & ci) | (y & ci);
endmodule
