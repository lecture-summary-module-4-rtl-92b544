// tb_nines_complement - all 16 input codes: 9-x for digits, 0 for 10..15.
module tb_nines_complement;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  nines_complement dut (.x(x), .y(y));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (int'(y) != (i <= 9 ? 9 - i : 0)) begin failures++; $display("FAIL %0d -> %0d", x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
