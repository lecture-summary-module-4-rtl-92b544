// mag_comparator - magnitude comparator built from a subtractor.
//
// Computes A-B with addsub_cc and derives the three relations from its
// condition codes only, as the lecture material does:
//   signed (2's complement):  A=B = Z,  A<B = N ^ V,  A>B = V.N + V'.N'.Z'
//   unsigned:                  A=B = Z,  A<B = C',     A>B = C.Z'
// (after a subtraction C is the complement of the borrow). The signed
// equations are the ones the material derives; the unsigned ones are this
// design's addition for its "signed or unsigned" comparator. Combinational.
module mag_comparator #(
  parameter int WIDTH  = 4,
  parameter bit SIGNED = 1'b1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq,
  output logic             lt,
  output logic             gt
);
  logic [WIDTH-1:0] diff;
  logic c, n, z, v;

  addsub_cc #(.WIDTH(WIDTH)) u_sub (
    .a(a), .b(b), .m(1'b1), .s(diff), .c(c), .n(n), .z(z), .v(v)
  );

  assign eq = z;
  if (SIGNED) begin : g_signed
    assign lt = n ^ v;
    assign gt = (v & n) | (~v & ~n & ~z);
  end else begin : g_unsigned
    assign lt = ~c;
    assign gt = c & ~z;
  end
endmodule
