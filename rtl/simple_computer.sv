// simple_computer - the Simple Computer: a stored-program accumulator machine.
//
// Blocks: 32x8 memory, program counter, instruction register, accumulator
// ALU with flags, and the instruction decoder / micro-sequencer (idms); the
// I/O port (VAR_IO) and the stack pointer (VAR_STACK, VAR_SUBR) are added
// for the versions that use them, and VAR_JUMP uses the shift ALU. They
// share a 5-bit address bus and an 8-bit data bus. The specified buses are
// tri-state; here each driver has an enable from the control bundle and a
// bus is the OR of its enabled drivers. An assertion checks the rule that
// only one device drives a bus in a cycle.
//
// Timing: every instruction takes a fetch cycle S0 and one (two or three for
// PSH and JSR) execute cycles. In S0 the PC drives the address bus, the
// memory drives the instruction onto the data bus, and the edge that ends S0
// both loads IR (with the value on the bus before the edge) and increments
// PC. In the execute cycles the IR address field (or SP) addresses memory.
// START is an asynchronous reset: PC, SP, A, flags and the state counter
// clear and RUN is set; on release the machine fetches from address 00000.
// HLT clears RUN; the machine then idles until the next START.
//
// The ld_* port writes memory directly and the dbg_* port reads it; they are
// this design's means of loading a program and inspecting results.
// START is also named in the assertions' disable clause; lint reports that
// as a net used both asynchronously and synchronously, and it stands.
module simple_computer
  import sc_pkg::*;
#(
  parameter variant_e VARIANT = VAR_BASE
) (
  input  logic              clk,
  input  logic              start,
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_data,
  input  logic [ADDR_W-1:0] dbg_addr,
  output logic [DATA_W-1:0] dbg_data,
  input  logic [DATA_W-1:0] in_port,
  output logic [DATA_W-1:0] out_port,
  output logic              run,
  output logic [1:0]        state,
  output ctrl_t             ctl,
  output logic [ADDR_W-1:0] pc,
  output logic [ADDR_W-1:0] sp,
  output logic [DATA_W-1:0] acc,
  output logic [3:0]        flags   // {CF, VF, NF, ZF}
);
  logic [ADDR_W-1:0] adr_bus, ir_addr;
  logic [DATA_W-1:0] data_bus, mem_dout, io_dout;
  logic [OP_W-1:0]   opcode;
  logic              mem_en, io_en;
  logic              cf, vf, nf, zf;

  // ---------------- buses ----------------
  assign adr_bus  = (ctl.poa ? pc      : '0)
                  | (ctl.ira ? ir_addr : '0)
                  | (ctl.spa ? sp      : '0);
  assign data_bus = (mem_en  ? mem_dout                                 : '0)
                  | (ctl.aoe ? acc                                      : '0)
                  | (ctl.pod ? {{(DATA_W-ADDR_W){1'b0}}, pc}            : '0)
                  | (io_en   ? io_dout                                  : '0);

  a_one_adr_driver: assert property (@(posedge clk) disable iff (start)
    $onehot0({ctl.poa, ctl.ira, ctl.spa}));
  a_one_data_driver: assert property (@(posedge clk) disable iff (start)
    $onehot0({mem_en, ctl.aoe, ctl.pod, io_en}));

  // ---------------- blocks ----------------
  idms #(.VARIANT(VARIANT)) u_idms (
    .clk(clk), .start(start), .opcode(opcode), .zf(zf), .ctl(ctl), .run(run), .state(state)
  );

  program_counter u_pc (
    .clk(clk), .ars(start), .pcc(ctl.pcc), .pla(ctl.pla), .pld(ctl.pld),
    .adr_in(adr_bus), .db_in(data_bus), .pc(pc)
  );

  instruction_register u_ir (
    .clk(clk), .irl(ctl.irl), .db_in(data_bus), .opcode(opcode), .addr(ir_addr)
  );

  memory u_mem (
    .clk(clk), .msl(ctl.msl), .moe(ctl.moe), .mwe(ctl.mwe), .addr(adr_bus),
    .din(data_bus), .dout(mem_dout), .dout_en(mem_en),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .dbg_addr(dbg_addr), .dbg_data(dbg_data)
  );

  if (VARIANT == VAR_JUMP) begin : g_alu_shift
    alu_shift u_alu (
      .clk(clk), .ars(start), .ale(ctl.ale), .alx(ctl.alx), .aly(ctl.aly),
      .db_in(data_bus), .aq(acc), .cf(cf), .vf(vf), .nf(nf), .zf(zf)
    );
  end else begin : g_alu
    alu u_alu (
      .clk(clk), .ars(start), .ale(ctl.ale), .alx(ctl.alx), .aly(ctl.aly),
      .db_in(data_bus), .aq(acc), .cf(cf), .vf(vf), .nf(nf), .zf(zf)
    );
  end
  assign flags = {cf, vf, nf, zf};

  if (VARIANT == VAR_IO) begin : g_io
    io_port u_io (
      .addr(adr_bus), .ior(ctl.ior), .iow(ctl.iow), .db_in(data_bus),
      .in_pins(in_port), .db_out(io_dout), .db_out_en(io_en), .out_pins(out_port)
    );
  end else begin : g_no_io
    assign io_dout  = '0;
    assign io_en    = 1'b0;
    assign out_port = '0;
  end

  if (VARIANT == VAR_STACK || VARIANT == VAR_SUBR) begin : g_sp
    stack_pointer u_sp (.clk(clk), .ars(start), .spi(ctl.spi), .spd(ctl.spd), .sp(sp));
  end else begin : g_no_sp
    assign sp = '0;
  end
endmodule
