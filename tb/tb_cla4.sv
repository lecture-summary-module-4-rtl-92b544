// tb_cla4 - exhaustive check of the 4-bit CLA (sum, carry out, group P/G).
module tb_cla4;
  logic [3:0] x, y, s;
  logic cin, cout, pg, gg;
  int checks = 0, failures = 0;
  cla4 dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout), .pg(pg), .gg(gg));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      int r;
      {cin, x, y} = 9'(i);
      r = int'(x) + int'(y) + int'(cin);
      #1;
      checks++;
      if ({cout, s} !== 5'(r) || pg !== ((x ^ y) == 4'hF) || gg !== (int'(x) + int'(y) > 15)) begin
        failures++; $display("FAIL %0d+%0d+%0d -> %b %b pg%b gg%b", x, y, cin, cout, s, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
