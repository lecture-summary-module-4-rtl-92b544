// tb_bcd_full_adder - every digit pair with both carries in (200 cases),
// decimal reference; includes 9+9+1 = 19 (carry 1, digit 1001) and
// 8+5+1 = 14 (carry 1, digit 0100).
module tb_bcd_full_adder;
  logic [3:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;
  bcd_full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        for (int k = 0; k < 2; k++) begin
          int r;
          x = 4'(i); y = 4'(j); cin = 1'(k);
          r = i + j + k;
          #1;
          checks++;
          if (int'(cout) != r / 10 || int'(s) != r % 10) begin
            failures++; $display("FAIL %0d+%0d+%0d -> %b %b", i, j, k, cout, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
