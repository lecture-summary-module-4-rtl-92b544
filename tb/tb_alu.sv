// tb_alu - random operations of the base ALU against an integer model of
// A and the four flags (including "flag not affected" for LDA/AND and hold
// when ALE = 0), plus the worked example 10101010 - 01010101 = 01010101
// with CF=1, NF=0, VF=1, ZF=0.
module tb_alu;
  logic clk = 0, ars, ale, alx, aly;
  logic [7:0] db_in, aq, ma;
  logic cf, vf, nf, zf, mc, mv, mn, mz;
  int checks = 0, failures = 0, cycles = 0;
  alu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic step(logic e, logic x, logic y, logic [7:0] d);
    int sa, sb, r;
    @(negedge clk);
    ale = e; alx = x; aly = y; db_in = d;
    if (e) begin
      if (!x) begin
        sa = int'($signed(ma)); sb = int'($signed(d));
        r  = y ? sa - sb : sa + sb;
        mc = y ? (int'(ma) >= int'(d)) : (int'(ma) + int'(d) > 255);
        mv = (r > 127) || (r < -128);
        ma = 8'(r);
      end else ma = y ? (ma & d) : d;
      mn = ma[7]; mz = (ma == 0);
    end
    @(posedge clk); #1;
    checks++;
    if ({aq, cf, vf, nf, zf} !== {ma, mc, mv, mn, mz}) begin
      failures++;
      $display("FAIL ale%b alx%b aly%b d=%h: A=%h CVNZ=%b%b%b%b exp %h %b%b%b%b", e, x, y, d, aq, cf, vf, nf, zf, ma, mc, mv, mn, mz);
    end
  endtask
  initial begin
    ale = 0; alx = 0; aly = 0; db_in = 0;
    ars = 0; #1; ars = 1; #2; ars = 0;
    {ma, mc, mv, mn, mz} = '0;
    step(1, 1, 0, 8'b1010_1010);   // LDA
    step(1, 0, 1, 8'b0101_0101);   // SUB
    checks++;
    if ({aq, cf, nf, vf, zf} !== {8'b0101_0101, 4'b1010}) begin failures++; $display("FAIL worked example"); end
    for (int i = 0; i < 2000; i++) step(1'($urandom), 1'($urandom), 1'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
