// bcd_addsub - DIGITS-digit BCD (radix 10) adder/subtractor.
//
// A ripple of bcd_full_adder cells, one per decimal digit. To subtract, each
// digit of B goes through a nines' complement circuit and the carry into the
// least significant digit is 1, so A - B is formed as A + (10^DIGITS - B),
// the decimal counterpart of the binary "complement and add one". The mode
// input m selects the operation (0 add, 1 subtract). After an addition c is
// the decimal carry out; after a subtraction c = 1 means A >= B (no borrow)
// and c = 0 means the result is the ten's complement of B - A. The default
// of 4 digits is this design's choice. Combinational.
module bcd_addsub #(
  parameter int DIGITS = 4
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                m,
  output logic [4*DIGITS-1:0] s,
  output logic                c
);
  logic [DIGITS:0] dc;  // decimal carry into each digit

  assign dc[0] = m;
  for (genvar d = 0; d < DIGITS; d++) begin : g_dig
    logic [3:0] b9, bsel;
    nines_complement u_nc (.x(b[4*d +: 4]), .y(b9));
    assign bsel = m ? b9 : b[4*d +: 4];
    bcd_full_adder u_bfa (.x(a[4*d +: 4]), .y(bsel), .cin(dc[d]), .s(s[4*d +: 4]), .cout(dc[d+1]));
  end
  assign c = dc[DIGITS];
endmodule
