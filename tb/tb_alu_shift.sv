// tb_alu_shift - random LDA/LSR/ASL/ASR operations of ALU version 2 against
// a model (VF never changes, CF unchanged by LDA, all held when ALE = 0).
module tb_alu_shift;
  logic clk = 0, ars, ale, alx, aly;
  logic [7:0] db_in, aq, ma;
  logic cf, vf, nf, zf, mc, mn, mz;
  int checks = 0, failures = 0, cycles = 0;
  alu_shift dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic step(logic e, logic x, logic y, logic [7:0] d);
    @(negedge clk);
    ale = e; alx = x; aly = y; db_in = d;
    if (e) begin
      unique case ({x, y})
        2'b00: ma = d;
        2'b01: begin mc = ma[0]; ma = ma >> 1; end
        2'b10: begin mc = ma[7]; ma = ma << 1; end
        2'b11: begin mc = ma[0]; ma = 8'($signed(ma) >>> 1); end
      endcase
      mn = ma[7]; mz = (ma == 0);
    end
    @(posedge clk); #1;
    checks++;
    if ({aq, cf, vf, nf, zf} !== {ma, mc, 1'b0, mn, mz}) begin
      failures++;
      $display("FAIL ale%b f=%b%b: A=%h CVNZ=%b%b%b%b exp %h %b0%b%b", e, x, y, aq, cf, vf, nf, zf, ma, mc, mn, mz);
    end
  endtask
  initial begin
    ale = 0; alx = 0; aly = 0; db_in = 0;
    ars = 0; #1; ars = 1; #2; ars = 0;
    {ma, mc, mn, mz} = '0;
    step(1, 0, 0, 8'h81);  // LDA 81
    step(1, 1, 1, 8'h00);  // ASR -> C0, C=1
    step(1, 1, 0, 8'h00);  // ASL -> 80, C=1
    step(1, 0, 1, 8'h00);  // LSR -> 40, C=0
    for (int i = 0; i < 2000; i++) step(1'($urandom), 1'($urandom), 1'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
