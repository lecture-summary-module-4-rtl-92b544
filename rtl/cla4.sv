// cla4 - 4-bit carry look-ahead adder.
//
// A half adder per bit position forms generate G(i) = X(i).Y(i) and propagate
// P(i) = X(i) ^ Y(i). Every carry is then a two-level sum of products of the
// G's, P's and the carry in (successive expansion of C(i) = G(i) + C(i-1).P(i)),
// so all carries, and all sums S(i) = P(i) ^ C(i-1), are ready after the same
// delay. cout is C(3). The group propagate pg (all four P's) and group
// generate gg (C(3) with cin = 0) are extra outputs of this design for
// cascading. Combinational.
module cla4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout,
  output logic       pg,
  output logic       gg
);
  logic [3:0] g, p, c;

  for (genvar i = 0; i < 4; i++) begin : g_pg
    half_adder u_pg (.x(x[i]), .y(y[i]), .s(p[i]), .c(g[i]));
  end

  assign gg   = g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]) | (g[0] & p[1] & p[2] & p[3]);
  assign pg   = &p;

  assign c[0] = g[0] | (cin & p[0]);
  assign c[1] = g[1] | (g[0] & p[1]) | (cin & p[0] & p[1]);
  assign c[2] = g[2] | (g[1] & p[2]) | (g[0] & p[1] & p[2]) | (cin & p[0] & p[1] & p[2]);
  assign c[3] = gg | (cin & p[0] & p[1] & p[2] & p[3]);

  assign s    = p ^ {c[2:0], cin};
  assign cout = c[3];
endmodule
