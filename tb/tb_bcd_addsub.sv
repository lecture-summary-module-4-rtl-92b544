// tb_bcd_addsub - 4-digit BCD add and subtract on 4000 random decimal
// operands plus edge cases, reference computed in decimal integers.
module tb_bcd_addsub;
  logic [15:0] a, b, s;
  logic m, c;
  int checks = 0, failures = 0;
  bcd_addsub #(.DIGITS(4)) dut (.a(a), .b(b), .m(m), .s(s), .c(c));

  function automatic logic [15:0] to_bcd(int v);
    logic [15:0] r;
    for (int d = 0; d < 4; d++) begin r[4*d +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  task automatic chk(int av, int bv, bit sub);
    int r, ec;
    a = to_bcd(av); b = to_bcd(bv); m = sub;
    if (sub) begin r = av - bv; ec = int'(r >= 0); if (r < 0) r += 10000; end
    else     begin r = av + bv; ec = int'(r >= 10000); r %= 10000; end
    #1;
    checks++;
    if (s !== to_bcd(r) || int'(c) != ec) begin
      failures++; $display("FAIL %0d %s %0d -> %h c=%b", av, sub ? "-" : "+", bv, s, c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    chk(9999, 1, 0); chk(9999, 9999, 0); chk(0, 0, 1); chk(0, 1, 1); chk(1234, 1234, 1); chk(5000, 4999, 1);
    for (int i = 0; i < 4000; i++) chk($urandom_range(9999), $urandom_range(9999), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
