// sc_pkg - shared types and constants of the Simple Computer.
//
// The Simple Computer is an 8-bit accumulator machine with a 5-bit address
// space (32 words of 8 bits) and 3-bit opcodes; an instruction is one memory
// word: opcode in bits 7:5, operand address in bits 4:0. These widths are the
// ones the machine is specified with. The package also holds the bundle of
// active-high system control signals the instruction decoder drives
// (ctrl_t), and the list of machine versions (variant_e): the base machine
// and four extensions that each give the two spare opcodes (110, 111) their
// own meaning. Giving PSH/POP and JSR/RTS the spare opcodes is this design's
// choice; the specification does not assign them codes.
package sc_pkg;

  localparam int ADDR_W = 5;
  localparam int DATA_W = 8;
  localparam int OP_W   = 3;

  typedef enum logic [OP_W-1:0] {
    OP_HLT = 3'b000,
    OP_LDA = 3'b001,
    OP_ADD = 3'b010,  // LSR in the shift/jump machine
    OP_SUB = 3'b011,  // ASL in the shift/jump machine
    OP_AND = 3'b100,  // ASR in the shift/jump machine
    OP_STA = 3'b101,
    OP_X6  = 3'b110,  // IN / JMP / PSH / JSR depending on the variant
    OP_X7  = 3'b111   // OUT / JZF / POP / RTS depending on the variant
  } opcode_e;

  typedef enum logic [2:0] {
    VAR_BASE  = 3'd0,  // HLT LDA ADD SUB AND STA
    VAR_IO    = 3'd1,  // base + IN (110), OUT (111)
    VAR_JUMP  = 3'd2,  // shift ALU: HLT LDA LSR ASL ASR STA + JMP (110), JZF (111)
    VAR_STACK = 3'd3,  // base + PSH (110), POP (111)
    VAR_SUBR  = 3'd4   // base + JSR (110), RTS (111)
  } variant_e;

  // System control signals, all active high.
  typedef struct packed {
    logic msl;  // memory select
    logic moe;  // memory output enable
    logic mwe;  // memory write enable
    logic pcc;  // PC count enable
    logic poa;  // PC onto address bus
    logic pla;  // PC load from address bus
    logic pod;  // PC onto data bus
    logic pld;  // PC load from data bus
    logic irl;  // IR load
    logic ira;  // IR address field onto address bus
    logic aoe;  // A register onto data bus
    logic ale;  // ALU enable
    logic alx;  // ALU function select
    logic aly;  // ALU function select
    logic ior;  // I/O read
    logic iow;  // I/O write
    logic spi;  // SP increment
    logic spd;  // SP decrement
    logic spa;  // SP onto address bus
    logic rst;  // synchronous state counter reset (last execute state)
  } ctrl_t;

endpackage
