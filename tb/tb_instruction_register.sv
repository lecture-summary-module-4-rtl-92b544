// tb_instruction_register - load on IRL, hold otherwise, field split.
module tb_instruction_register;
  logic clk = 0, irl;
  logic [7:0] db_in, model;
  logic [2:0] opcode;
  logic [4:0] addr;
  int checks = 0, failures = 0, cycles = 0;
  instruction_register dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    irl = 1; db_in = 8'hA5; model = 8'hA5;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      irl = 1'($urandom); db_in = 8'($urandom);
      if (irl) model = db_in;
      @(posedge clk); #1;
      checks++;
      if ({opcode, addr} !== model) begin failures++; $display("FAIL ir=%b%b exp %b", opcode, addr, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
