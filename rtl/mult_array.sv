// mult_array - N x M unsigned array multiplier of AND gates and full adders.
//
// x (N bits) is the multiplicand, y (M bits) the multiplier, p the N+M-bit
// product. N x M AND gates form the product component bits x(i).y(j), and
// the product components are added by M rows of N-1 full adders, i.e. N-1
// "diagonals", which are the counts the shift-and-add array is specified
// with. How the cells are wired is this design's choice:
//   rows 1..M-1 are carry-save rows: cell (j,i) adds x(i).y(j), the sum bit
//     of weight i+j left by the row above and the carry of the same weight
//     from cell (j-1,i); the lowest sum bit of each row is product bit j;
//   the last row is a ripple-carry adder of N-1 full adders that merges the
//     remaining sum and carry vectors into product bits M..N+M-1.
// Row 1 has no incoming carries (they are 0). Worst-case path: M-1 carry-save
// cells plus N-1 ripple cells. Combinational. Needs N >= 2 and M >= 2.
module mult_array #(
  parameter int N = 4,
  parameter int M = 4
) (
  input  logic [N-1:0]   x,
  input  logic [M-1:0]   y,
  output logic [N+M-1:0] p
);
  logic [N-1:0] pp  [M];  // product component bits, pp[j][i] = x[i] & y[j]
  logic [N-1:0] ssv [M];  // sum vector after row j
  logic [N-2:0] csv [M];  // carry vector after row j
  logic [N-1:0] rc;       // carries of the final ripple row

  initial assert (N >= 2 && M >= 2) else $error("mult_array needs N >= 2 and M >= 2");

  for (genvar j = 0; j < M; j++) begin : g_pp
    assign pp[j] = x & {N{y[j]}};
  end

  assign ssv[0] = pp[0];
  assign csv[0] = '0;
  assign p[0]   = pp[0][0];

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < N-1; i++) begin : g_cell
      full_adder u_fa (.x(pp[j][i]), .y(ssv[j-1][i+1]), .ci(csv[j-1][i]),
                       .s(ssv[j][i]), .co(csv[j][i]));
    end
    assign ssv[j][N-1] = pp[j][N-1];
    assign p[j]        = ssv[j][0];
  end

  assign rc[0] = 1'b0;
  for (genvar i = 0; i < N-1; i++) begin : g_final
    full_adder u_fa (.x(ssv[M-1][i+1]), .y(csv[M-1][i]), .ci(rc[i]),
                     .s(p[M+i]), .co(rc[i+1]));
  end
  assign p[N+M-1] = rc[N-1];
endmodule
