// vote_counter - five-voter population counter.
//
// Counts how many of the five one-bit votes V, W, X, Y, Z are 1 and gives the
// count as a 3-bit number S2 S1 S0 (0..5). It is the array of one half adder
// and two full adders of the vote-counting example: the first full adder adds
// V, W and X, the second adds Y and Z to the first's sum bit and gives S0; the
// two weight-2 carries meet in the half adder, whose sum is S1 and carry S2.
// Which votes go into which adder is read from the example's drawing; the
// arithmetic is the same for any assignment. Combinational.
module vote_counter (
  input  logic [4:0] v,  // {V, W, X, Y, Z}
  output logic [2:0] s   // number of ones
);
  logic s_a, c_a, c_b;

  full_adder u_fa_vwx (.x(v[4]), .y(v[3]), .ci(v[2]), .s(s_a),  .co(c_a));
  full_adder u_fa_yz  (.x(v[1]), .y(v[0]), .ci(s_a),  .s(s[0]), .co(c_b));
  half_adder u_ha     (.x(c_a),  .y(c_b),             .s(s[1]), .c(s[2]));
endmodule
