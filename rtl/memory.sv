// memory - 32 x 8 static read/write memory of the Simple Computer.
//
// Holds program, operands and results. Three active-high controls:
//   msl - memory select (the memory takes part in this cycle at all)
//   moe - output enable: with msl, the addressed word is driven on the data
//         bus (dout_en = msl & moe); the read is combinational
//   mwe - write enable: with msl, the data bus word is written at the rising
//         clock edge that ends the cycle
// moe and mwe are never asserted together by the controller.
// The write is edge-triggered here, the synchronous equivalent of the
// specified latch-style write; this is a design choice. The loader port
// (ld_*) and the observation port (dbg_*) are additions of this design for
// filling the memory with a program while the machine is halted and for
// reading results; they are not part of the specified machine.
module memory
  import sc_pkg::*;
#(
  parameter int AW = ADDR_W,
  parameter int DW = DATA_W
) (
  input  logic          clk,
  input  logic          msl,
  input  logic          moe,
  input  logic          mwe,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  output logic          dout_en,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [DW-1:0] ld_data,
  input  logic [AW-1:0] dbg_addr,
  output logic [DW-1:0] dbg_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we)
      mem[ld_addr] <= ld_data;
    else if (msl && mwe)
      mem[addr] <= din;
  end

  assign dout     = mem[addr];
  assign dout_en  = msl & moe;
  assign dbg_data = mem[dbg_addr];
endmodule
