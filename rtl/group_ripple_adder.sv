// group_ripple_adder - WIDTH-bit "group ripple" adder of 4-bit CLA blocks.
//
// Large single-level look-ahead adders are impractical (product-term
// explosion), so WIDTH/4 cla4 blocks are cascaded: carries are looked ahead
// inside each block and ripple from block to block. Delay grows with
// WIDTH/4 block delays instead of WIDTH bit delays. WIDTH must be a multiple
// of 4; its default of 16 is this design's choice. Combinational.
module group_ripple_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int NBLK = WIDTH / 4;
  logic [NBLK:0] bc;  // bc[k] is the carry into block k

  initial assert (WIDTH % 4 == 0 && WIDTH >= 4) else $error("WIDTH must be a multiple of 4");

  assign bc[0] = cin;
  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic pg_unused, gg_unused;
    cla4 u_cla (
      .x(x[4*k +: 4]), .y(y[4*k +: 4]), .cin(bc[k]),
      .s(s[4*k +: 4]), .cout(bc[k+1]), .pg(pg_unused), .gg(gg_unused)
    );
  end
  assign cout = bc[NBLK];
endmodule
