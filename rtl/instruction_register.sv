// instruction_register - 8-bit instruction register of the Simple Computer.
//
// Loads the data bus on the rising clock edge when irl is asserted (end of
// the fetch cycle) and otherwise keeps its value. The upper three bits
// (opcode) go straight to the instruction decoder; the lower five bits are
// the operand address, which simple_computer puts on the address bus when
// IRA is asserted. As specified, the register has no reset: it is always
// loaded before it is used.
module instruction_register
  import sc_pkg::*;
#(
  parameter int AW = ADDR_W,
  parameter int DW = DATA_W
) (
  input  logic             clk,
  input  logic             irl,
  input  logic [DW-1:0]    db_in,
  output logic [DW-AW-1:0] opcode,
  output logic [AW-1:0]    addr
);
  logic [DW-1:0] ir;

  always_ff @(posedge clk) begin
    if (irl) ir <= db_in;
  end

  assign opcode = ir[DW-1:AW];
  assign addr   = ir[AW-1:0];
endmodule
