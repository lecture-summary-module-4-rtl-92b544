// tb_mag_comparator - exhaustive 4-bit signed and unsigned comparison,
// and the 16-row 2-bit signed table of the comparator derivation.
module tb_mag_comparator;
  logic [3:0] a, b;
  logic eq, lt, gt, ueq, ult, ugt;
  logic [1:0] a2, b2;
  logic eq2, lt2, gt2;
  int checks = 0, failures = 0;
  mag_comparator #(.WIDTH(4), .SIGNED(1'b1)) dut_s (.a(a), .b(b), .eq(eq), .lt(lt), .gt(gt));
  mag_comparator #(.WIDTH(4), .SIGNED(1'b0)) dut_u (.a(a), .b(b), .eq(ueq), .lt(ult), .gt(ugt));
  mag_comparator #(.WIDTH(2), .SIGNED(1'b1)) dut_2 (.a(a2), .b(b2), .eq(eq2), .lt(lt2), .gt(gt2));
  // expected relation for the 2-bit table rows A1A0B1B0 = 0..15: 0 '=', 1 '<', 2 '>'
  localparam int TABLE [16] = '{0, 1, 2, 2, 2, 0, 2, 2, 1, 1, 0, 1, 1, 1, 2, 0};
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks += 2;
      if ({eq, lt, gt} !== {$signed(a) == $signed(b), $signed(a) < $signed(b), $signed(a) > $signed(b)}) begin
        failures++; $display("FAIL signed a=%b b=%b -> %b%b%b", a, b, eq, lt, gt);
      end
      if ({ueq, ult, ugt} !== {a == b, a < b, a > b}) begin
        failures++; $display("FAIL unsigned a=%b b=%b -> %b%b%b", a, b, ueq, ult, ugt);
      end
    end
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      checks++;
      if ({eq2, lt2, gt2} !== {TABLE[i] == 0, TABLE[i] == 1, TABLE[i] == 2}) begin
        failures++; $display("FAIL table row %0d -> %b%b%b", i, eq2, lt2, gt2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
