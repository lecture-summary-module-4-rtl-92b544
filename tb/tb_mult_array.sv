// tb_mult_array - exhaustive products for 4x4 (default), 6x4, 4x6, 4x2 and
// 2x4 arrays (the sizes the worked exercises use), compared with integer
// multiplication. Combinational: one operand pair per nanosecond.
module tb_mult_array;
  logic [3:0] x44, y44; logic [7:0] p44;
  logic [5:0] x64; logic [3:0] y64; logic [9:0] p64;
  logic [3:0] x46; logic [5:0] y46; logic [9:0] p46;
  logic [3:0] x42; logic [1:0] y42; logic [5:0] p42;
  logic [1:0] x24; logic [3:0] y24; logic [5:0] p24;
  int checks = 0, failures = 0;
  mult_array #(.N(4), .M(4)) d44 (.x(x44), .y(y44), .p(p44));
  mult_array #(.N(6), .M(4)) d64 (.x(x64), .y(y64), .p(p64));
  mult_array #(.N(4), .M(6)) d46 (.x(x46), .y(y46), .p(p46));
  mult_array #(.N(4), .M(2)) d42 (.x(x42), .y(y42), .p(p42));
  mult_array #(.N(2), .M(4)) d24 (.x(x24), .y(y24), .p(p24));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 1024; i++) begin
      {x64, y64} = 10'(i);
      {x46, y46} = 10'(i);
      {x44, y44} = 8'(i);
      {x42, y42} = 6'(i);
      {x24, y24} = 6'(i);
      #1;
      checks += 2;
      if (int'(p64) != int'(x64) * int'(y64)) begin failures++; $display("FAIL 6x4 %0d*%0d=%0d", x64, y64, p64); end
      if (int'(p46) != int'(x46) * int'(y46)) begin failures++; $display("FAIL 4x6 %0d*%0d=%0d", x46, y46, p46); end
      if (i < 256) begin
        checks++;
        if (int'(p44) != int'(x44) * int'(y44)) begin failures++; $display("FAIL 4x4 %0d*%0d=%0d", x44, y44, p44); end
      end
      if (i < 64) begin
        checks++;
        if (int'(p42) != int'(x42) * int'(y42)) begin failures++; $display("FAIL 4x2 %0d*%0d=%0d", x42, y42, p42); end
        checks++;
        if (int'(p24) != int'(x24) * int'(y24)) begin failures++; $display("FAIL 2x4 %0d*%0d=%0d", x24, y24, p24); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
