// program_counter - 5-bit program counter of the Simple Computer.
//
// A binary up counter with asynchronous reset (ars, wired to START) that
// holds the address of the next instruction. On a rising clock edge it
//   loads the address bus     when pla  (jumps, JSR),
//   loads the data bus        when pld  (RTS; the 8-bit word is truncated to 5 bits),
//   counts up by one          when pcc  (fetch cycle),
// and otherwise keeps its value. The three enables are mutually exclusive;
// if several were asserted, pla wins over pld and pld over pcc. The tri-state
// outputs of the specified counter (POA onto the address bus, POD onto the
// data bus zero-padded) are made by the bus multiplexers of simple_computer,
// which read the pc output. This is the most complete counter of the
// specification; machines that do not jump tie pla/pld low.
module program_counter
  import sc_pkg::*;
#(
  parameter int AW = ADDR_W,
  parameter int DW = DATA_W
) (
  input  logic          clk,
  input  logic          ars,
  input  logic          pcc,
  input  logic          pla,
  input  logic          pld,
  input  logic [AW-1:0] adr_in,
  input  logic [DW-1:0] db_in,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk or posedge ars) begin
    if (ars)
      pc <= '0;
    else if (pla)
      pc <= adr_in;
    else if (pld)
      pc <= db_in[AW-1:0];
    else if (pcc)
      pc <= pc + 1'b1;
  end
endmodule
