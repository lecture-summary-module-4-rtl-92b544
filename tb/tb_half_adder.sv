// tb_half_adder - exhaustive check of half_adder against x+y.
module tb_half_adder;
  logic x, y, s, c;
  int checks = 0, failures = 0;
  half_adder dut (.x(x), .y(y), .s(s), .c(c));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({c, s} !== 2'(x + y)) begin failures++; $display("FAIL x=%b y=%b -> c=%b s=%b", x, y, c, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
