// nines_complement - diminished radix (nines') complement of a BCD digit.
// y = 9 - x for x = 0..9; the six unused codes (10..15) give 0000.
// Combinational, written as the arithmetic rather than a table.
module nines_complement (
  input  logic [3:0] x,
  output logic [3:0] y
);
  assign y = (x <= 4'd9) ? 4'(4'd9 - x) : 4'd0;
endmodule
