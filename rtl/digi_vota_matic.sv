// digi_vota_matic - three-judge score tabulator with 7-segment display.
//
// Each of three judges sets a score 0..3 on two switches; the circuit adds the
// three 2-bit scores (sum 0..9) and shows the sum on one 7-segment digit.
// The adder is an array of full adders and one half adder: bit 0 of the three
// scores is one full adder; bit 1 of the three scores is a second
// full adder whose sum meets the weight-1 carry in a half adder; the two
// weight-4 carries that result are combined by a last half adder.
// The segment code is this design's choice: active high, seg = {a,b,c,d,e,f,g}.
// Combinational.
module digi_vota_matic (
  input  logic [1:0] score [3],
  output logic [3:0] sum,   // 0..9
  output logic [6:0] seg    // {a,b,c,d,e,f,g}, 1 = lit
);
  logic c0, s1a, c1a, c1b;

  // weight 1: three score LSBs
  full_adder u_b0 (.x(score[0][0]), .y(score[1][0]), .ci(score[2][0]), .s(sum[0]), .co(c0));
  // weight 2: three score MSBs plus the carry from weight 1
  full_adder u_b1 (.x(score[0][1]), .y(score[1][1]), .ci(score[2][1]), .s(s1a), .co(c1a));
  half_adder u_b1h (.x(s1a), .y(c0), .s(sum[1]), .c(c1b));
  // weight 4 and 8: the two weight-4 carries
  half_adder u_b2 (.x(c1a), .y(c1b), .s(sum[2]), .c(sum[3]));

  always_comb begin
    unique case (sum)
      4'd0:    seg = 7'b1111110;
      4'd1:    seg = 7'b0110000;
      4'd2:    seg = 7'b1101101;
      4'd3:    seg = 7'b1111001;
      4'd4:    seg = 7'b0110011;
      4'd5:    seg = 7'b1011011;
      4'd6:    seg = 7'b1011111;
      4'd7:    seg = 7'b1110000;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1111011;
      default: seg = 7'b0000000;  // sums above 9 cannot occur
    endcase
  end
endmodule
