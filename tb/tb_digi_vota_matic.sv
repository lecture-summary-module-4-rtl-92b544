// tb_digi_vota_matic - all 64 score combinations: the sum is compared with
// the integer sum of the scores and the segments with a reference digit font.
module tb_digi_vota_matic;
  logic [1:0] score [3];
  logic [3:0] sum;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  // reference font {a,b,c,d,e,f,g} for 0..9
  localparam logic [6:0] FONT [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33, 7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};
  digi_vota_matic dut (.score(score), .sum(sum), .seg(seg));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      int e;
      score[0] = 2'(i); score[1] = 2'(i >> 2); score[2] = 2'(i >> 4);
      e = int'(score[0]) + int'(score[1]) + int'(score[2]);
      #1;
      checks += 2;
      if (int'(sum) != e) begin failures++; $display("FAIL sum %0d exp %0d", sum, e); end
      if (seg !== FONT[e]) begin failures++; $display("FAIL seg %b for %0d", seg, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
