// tb_group_ripple_adder - 16-bit group ripple adder: corner cases (full
// carry ripple through all four blocks) and 5000 random sums.
module tb_group_ripple_adder;
  logic [15:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;
  group_ripple_adder #(.WIDTH(16)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));
  task automatic chk();
    logic [16:0] r;
    r = {1'b0, x} + {1'b0, y} + 17'(cin);
    #1;
    checks++;
    if ({cout, s} !== r) begin failures++; $display("FAIL %h+%h+%b -> %b %h", x, y, cin, cout, s); end
  endtask
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    x = 16'hFFFF; y = 16'h0000; cin = 1; chk();
    x = 16'hFFFF; y = 16'hFFFF; cin = 1; chk();
    x = 16'h0F0F; y = 16'h00F1; cin = 0; chk();
    for (int i = 0; i < 5000; i++) begin
      x = 16'($urandom); y = 16'($urandom); cin = 1'($urandom);
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
