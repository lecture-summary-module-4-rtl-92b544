// half_adder - one-bit half adder: s = x ^ y, c = x & y.
// Purely combinational. It is also the "PG box" of a carry look-ahead adder:
// its carry is the generate function G and its sum the propagate function P.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
