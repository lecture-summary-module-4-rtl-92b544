// tb_addsub_cc - exhaustive 4-bit add and subtract with all four condition
// codes, reference computed with integers; plus the 5-bit worked examples
// of radix addition (+6 + +10 overflows, -4 + -10 = -14, -13 + -15 overflows,
// +11 - +12 = -1, +11 - -16 overflows, -15 - +2 overflows).
module tb_addsub_cc;
  logic [3:0] a, b, s;
  logic m, c, n, z, v;
  logic [4:0] a5, b5, s5;
  logic m5, c5, n5, z5, v5;
  int checks = 0, failures = 0;
  addsub_cc #(.WIDTH(4)) dut  (.a(a),  .b(b),  .m(m),  .s(s),  .c(c),  .n(n),  .z(z),  .v(v));
  addsub_cc #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .m(m5), .s(s5), .c(c5), .n(n5), .z(z5), .v(v5));

  task automatic ex5(int x, int y, bit sub, bit exp_v, int exp_val);
    a5 = 5'(x); b5 = 5'(y); m5 = sub;
    #1;
    checks++;
    if (v5 !== exp_v || (!exp_v && int'($signed(s5)) != exp_val)) begin
      failures++; $display("FAIL 5-bit %0d %s %0d -> %b v=%b", x, sub ? "-" : "+", y, s5, v5);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      int sa, sb, r, ur;
      logic ec, ev;
      {m, a, b} = 9'(i);
      sa = int'($signed(a)); sb = int'($signed(b));
      r  = m ? sa - sb : sa + sb;
      ur = m ? int'(a) + int'(4'(~b)) + 1 : int'(a) + int'(b);
      ec = ur > 15;
      ev = (r > 7) || (r < -8);
      #1;
      checks++;
      if (s !== 4'(r) || c !== ec || v !== ev || n !== s[3] || z !== (4'(r) == 0)) begin
        failures++;
        $display("FAIL m=%b a=%b b=%b -> s=%b c%b n%b z%b v%b", m, a, b, s, c, n, z, v);
      end
    end
    ex5(6, 10, 0, 1, 0);
    ex5(2, 10, 0, 0, 12);
    ex5(-4, -10, 0, 0, -14);
    ex5(-13, -15, 0, 1, 0);
    ex5(11, 12, 1, 0, -1);
    ex5(11, -16, 1, 1, 0);
    ex5(-15, 2, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
