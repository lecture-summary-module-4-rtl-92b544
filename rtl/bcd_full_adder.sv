// bcd_full_adder - decimal full adder for one BCD digit.
//
// A 4-bit binary adder forms the direct sum Z4..Z0 = X + Y + cin (0..19).
// If that sum exceeds 9 the digit must be corrected by adding six; the
// correction function, which is also the decimal carry out, is
//   F = Z4 + Z3.Z2 + Z3.Z1.
// A second 4-bit adder adds 0 F F 0 (0110 when F=1) to Z3..Z0; its own carry
// is discarded. Both binary adders are cla4 blocks, whose group P/G outputs
// are not needed here (lint lists them as unused). Combinational.
module bcd_full_adder (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] z;
  logic       z4, fcorr;
  logic       c2_unused, pg0, gg0, pg1, gg1;

  cla4 u_add (.x(x), .y(y), .cin(cin), .s(z), .cout(z4), .pg(pg0), .gg(gg0));

  assign fcorr = z4 | (z[3] & z[2]) | (z[3] & z[1]);

  cla4 u_corr (.x(z), .y({1'b0, fcorr, fcorr, 1'b0}), .cin(1'b0),
               .s(s), .cout(c2_unused), .pg(pg1), .gg(gg1));

  assign cout = fcorr;
endmodule
