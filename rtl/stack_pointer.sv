// stack_pointer - 5-bit stack pointer of the Simple Computer.
//
// Holds the address of the top stack item. The stack lives at the top of
// memory and grows toward lower addresses; an asynchronous reset (ars, wired
// to START) sets SP to 00000, the empty stack, so the first push (decrement
// then write) uses location 11111. On a rising clock edge SP increments when
// spi, decrements when spd (mutually exclusive; spi wins if both are set),
// and otherwise keeps its value. simple_computer puts sp on the address bus
// when SPA is asserted.
module stack_pointer
  import sc_pkg::*;
#(
  parameter int AW = ADDR_W
) (
  input  logic          clk,
  input  logic          ars,
  input  logic          spi,
  input  logic          spd,
  output logic [AW-1:0] sp
);
  always_ff @(posedge clk or posedge ars) begin
    if (ars)      sp <= '0;
    else if (spi) sp <= sp + 1'b1;
    else if (spd) sp <= sp - 1'b1;
  end
endmodule
