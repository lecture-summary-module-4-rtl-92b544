// alu_shift - accumulator ALU version 2 of the Simple Computer (shifts).
//
// Same interface as alu, with the arithmetic and AND functions replaced by
// shifts of the A register:
//   alx aly  function                                   flags changed
//    0   0   LDA: A <- bus                              N Z
//    0   1   LSR: A <- 0,A7..A1       C <- A0           C N Z
//    1   0   ASL: A <- A6..A0,0       C <- A7           C N Z
//    1   1   ASR: A <- A7,A7..A1      C <- A0           C N Z
// V is never changed. Registers update on the rising clock edge when ale is
// asserted and keep their value otherwise (the specification's rule that
// with ALE = 0 all register bits are retained). The asynchronous clear on
// START is this design's choice.
module alu_shift
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
  logic [DW-1:0] res;
  logic          c_next;

  always_comb begin
    unique case ({alx, aly})
      2'b00: begin res = db_in;                  c_next = cf;       end
      2'b01: begin res = {1'b0, aq[DW-1:1]};     c_next = aq[0];    end
      2'b10: begin res = {aq[DW-2:0], 1'b0};     c_next = aq[DW-1]; end
      2'b11: begin res = {aq[DW-1], aq[DW-1:1]}; c_next = aq[0];    end
    endcase
  end

  always_ff @(posedge clk or posedge ars) begin
    if (ars) begin
      aq <= '0;
      {cf, vf, nf, zf} <= '0;
    end else if (ale) begin
      aq <= res;
      cf <= c_next;
      nf <= res[DW-1];
      zf <= (res == '0);
    end
  end
endmodule
