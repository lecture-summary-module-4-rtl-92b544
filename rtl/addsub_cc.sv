// addsub_cc - WIDTH-bit ripple adder/subtractor with condition codes.
//
// A chain of full adders. Each B bit passes through an XOR with the mode
// input m, and m is also the carry into the least significant adder, so m=0
// gives A+B and m=1 gives A + ~B + 1 = A-B (radix complement of the
// subtrahend, then add). Condition codes:
//   c - carry out of the sign position (after a subtraction: 1 = no borrow)
//   n - sign bit of the result
//   z - all result bits zero
//   v - overflow: carry into the sign position XOR carry out of it
// This is the ripple adder/subtractor of the lecture material, at its
// 4-bit default width. Combinational; delay grows with WIDTH.
module addsub_cc #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             m,  // 0 add, 1 subtract
  output logic [WIDTH-1:0] s,
  output logic             c,
  output logic             n,
  output logic             z,
  output logic             v
);
  logic [WIDTH:0] cy;  // cy[i] is the carry into bit i

  assign cy[0] = m;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i] ^ m), .ci(cy[i]), .s(s[i]), .co(cy[i+1]));
  end

  assign c = cy[WIDTH];
  assign n = s[WIDTH-1];
  assign z = ~|s;
  assign v = cy[WIDTH] ^ cy[WIDTH-1];
endmodule
