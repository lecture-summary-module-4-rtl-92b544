// alu - accumulator ALU of the base Simple Computer (ADD, SUB, LDA, AND).
//
// The A register (aq) and the four flags are updated on the rising clock
// edge when ale is asserted; with ale low everything is kept. alx/aly choose
// the function:
//   alx aly  function           flags changed
//    0   0   A <- A + bus        C V N Z
//    0   1   A <- A - bus        C V N Z
//    1   0   A <- bus  (LDA)     N Z
//    1   1   A <- A & bus        N Z
// SUB is A + ~bus + 1: the bus operand is XORed with aly and aly is the carry
// into bit 0. C is the carry out of bit 7 (after SUB: 1 = no borrow), V the
// carry into bit 7 XOR the carry out, N bit 7 of the result, Z result == 0.
// Driving A onto the data bus (AOE) is done by simple_computer from aq.
// The asynchronous clear on START is this design's choice; the specified
// ALU has no reset.
module alu
  import sc_pkg::*;
#(
  parameter int DW = DATA_W
) (
  input  logic          clk,
  input  logic          ars,
  input  logic          ale,
  input  logic          alx,
  input  logic          aly,
  input  logic [DW-1:0] db_in,
  output logic [DW-1:0] aq,
  output logic          cf,
  output logic          vf,
  output logic          nf,
  output logic          zf
);
  logic [DW-1:0] b_eff, sum, logic_res, res;
  logic          c_out, c_msb;

  assign b_eff          = db_in ^ {DW{aly}};
  assign {c_out, sum}   = {1'b0, aq} + {1'b0, b_eff} + {{DW{1'b0}}, aly};
  assign c_msb          = aq[DW-1] ^ b_eff[DW-1] ^ sum[DW-1];  // carry into the sign bit
  assign logic_res      = aly ? (aq & db_in) : db_in;
  assign res            = alx ? logic_res : sum;

  always_ff @(posedge clk or posedge ars) begin
    if (ars) begin
      aq <= '0;
      {cf, vf, nf, zf} <= '0;
    end else if (ale) begin
      aq <= res;
      nf <= res[DW-1];
      zf <= (res == '0);
      if (!alx) begin
        cf <= c_out;
        vf <= c_out ^ c_msb;
      end
    end
  end
endmodule
