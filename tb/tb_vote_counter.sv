// tb_vote_counter - all 32 vote patterns, count compared with $countones.
module tb_vote_counter;
  logic [4:0] v;
  logic [2:0] s;
  int checks = 0, failures = 0;
  vote_counter dut (.v(v), .s(s));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) begin
      v = 5'(i);
      #1;
      checks++;
      if (int'(s) != $countones(v)) begin failures++; $display("FAIL v=%b s=%0d", v, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
