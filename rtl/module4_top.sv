// module4_top - all circuits of the arithmetic and computer-logic module,
// side by side.
//
// The circuits are independent designs, so nothing connects them; each has
// its own ports, prefixed by the circuit's name:
//   sc_*    five Simple Computers, one per machine version, indexed by
//           SC_VARIANTS: [0] base, [1] I/O, [2] shift + jump, [3] stack,
//           [4] subroutine. All share clk; each has its own START, loader,
//           memory observation port and I/O pins.
//   vote_*  five-voter counter            dvm_*  Digi-Vota-Matic score tabulator
//   as_*    adder/subtractor with C N Z V  cmp_*  signed magnitude comparator
//   ucmp_*  unsigned magnitude comparator gra_*  group ripple (CLA block) adder
//   mul_*   N x M array multiplier        bcd_*  BCD adder/subtractor
// The arithmetic circuits are combinational; their widths are the defaults
// of the blocks (4-bit adder/subtractor and comparators, 16-bit group
// ripple adder, 4x4 multiplier, 4-digit BCD adder/subtractor).
// Lint reports sc_start as used both asynchronously and synchronously: it
// is the computers' asynchronous START, which their assertions also name.
module module4_top
  import sc_pkg::*;
(
  input  logic              clk,
  // Simple Computers
  input  logic              sc_start    [5],
  input  logic              sc_ld_we    [5],
  input  logic [ADDR_W-1:0] sc_ld_addr  [5],
  input  logic [DATA_W-1:0] sc_ld_data  [5],
  input  logic [ADDR_W-1:0] sc_dbg_addr [5],
  output logic [DATA_W-1:0] sc_dbg_data [5],
  input  logic [DATA_W-1:0] sc_in_port  [5],
  output logic [DATA_W-1:0] sc_out_port [5],
  output logic              sc_run      [5],
  output logic [1:0]        sc_state    [5],
  output ctrl_t             sc_ctl      [5],
  output logic [ADDR_W-1:0] sc_pc       [5],
  output logic [ADDR_W-1:0] sc_sp       [5],
  output logic [DATA_W-1:0] sc_acc      [5],
  output logic [3:0]        sc_flags    [5],
  // vote counter
  input  logic [4:0]        vote_v,
  output logic [2:0]        vote_s,
  // Digi-Vota-Matic
  input  logic [1:0]        dvm_score [3],
  output logic [3:0]        dvm_sum,
  output logic [6:0]        dvm_seg,
  // adder/subtractor with condition codes
  input  logic [3:0]        as_a,
  input  logic [3:0]        as_b,
  input  logic              as_m,
  output logic [3:0]        as_s,
  output logic              as_c,
  output logic              as_n,
  output logic              as_z,
  output logic              as_v,
  // magnitude comparators
  input  logic [3:0]        cmp_a,
  input  logic [3:0]        cmp_b,
  output logic              cmp_eq,
  output logic              cmp_lt,
  output logic              cmp_gt,
  output logic              ucmp_eq,
  output logic              ucmp_lt,
  output logic              ucmp_gt,
  // group ripple adder
  input  logic [15:0]       gra_x,
  input  logic [15:0]       gra_y,
  input  logic              gra_cin,
  output logic [15:0]       gra_s,
  output logic              gra_cout,
  // array multiplier
  input  logic [3:0]        mul_x,
  input  logic [3:0]        mul_y,
  output logic [7:0]        mul_p,
  // BCD adder/subtractor
  input  logic [15:0]       bcd_a,
  input  logic [15:0]       bcd_b,
  input  logic              bcd_m,
  output logic [15:0]       bcd_s,
  output logic              bcd_c
);
  localparam variant_e SC_VARIANTS [5] = '{VAR_BASE, VAR_IO, VAR_JUMP, VAR_STACK, VAR_SUBR};

  for (genvar k = 0; k < 5; k++) begin : g_sc
    simple_computer #(.VARIANT(SC_VARIANTS[k])) u_sc (
      .clk(clk), .start(sc_start[k]),
      .ld_we(sc_ld_we[k]), .ld_addr(sc_ld_addr[k]), .ld_data(sc_ld_data[k]),
      .dbg_addr(sc_dbg_addr[k]), .dbg_data(sc_dbg_data[k]),
      .in_port(sc_in_port[k]), .out_port(sc_out_port[k]),
      .run(sc_run[k]), .state(sc_state[k]), .ctl(sc_ctl[k]),
      .pc(sc_pc[k]), .sp(sc_sp[k]), .acc(sc_acc[k]), .flags(sc_flags[k])
    );
  end

  vote_counter u_vote (.v(vote_v), .s(vote_s));

  digi_vota_matic u_dvm (.score(dvm_score), .sum(dvm_sum), .seg(dvm_seg));

  addsub_cc #(.WIDTH(4)) u_as (
    .a(as_a), .b(as_b), .m(as_m), .s(as_s), .c(as_c), .n(as_n), .z(as_z), .v(as_v)
  );

  mag_comparator #(.WIDTH(4), .SIGNED(1'b1)) u_cmp (
    .a(cmp_a), .b(cmp_b), .eq(cmp_eq), .lt(cmp_lt), .gt(cmp_gt)
  );
  mag_comparator #(.WIDTH(4), .SIGNED(1'b0)) u_ucmp (
    .a(cmp_a), .b(cmp_b), .eq(ucmp_eq), .lt(ucmp_lt), .gt(ucmp_gt)
  );

  group_ripple_adder #(.WIDTH(16)) u_gra (
    .x(gra_x), .y(gra_y), .cin(gra_cin), .s(gra_s), .cout(gra_cout)
  );

  mult_array #(.N(4), .M(4)) u_mul (.x(mul_x), .y(mul_y), .p(mul_p));

  bcd_addsub #(.DIGITS(4)) u_bcd (.a(bcd_a), .b(bcd_b), .m(bcd_m), .s(bcd_s), .c(bcd_c));
endmodule
