// tb_program_counter - async reset, count, hold, load from address bus,
// load from data bus (truncated to 5 bits), wrap-around, against a model.
module tb_program_counter;
  logic clk = 0, ars, pcc, pla, pld;
  logic [4:0] adr_in, pc, model;
  logic [7:0] db_in;
  int checks = 0, failures = 0, cycles = 0;
  int unsigned sel;
  program_counter dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    {pcc, pla, pld} = '0; adr_in = 0; db_in = 0;
    ars = 0; #1; ars = 1; #2;
    checks++; if (pc !== 0) begin failures++; $display("FAIL async reset"); end
    ars = 0; model = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel = $urandom_range(3);
      case (sel)
        0: {pla, pld, pcc} = 3'b100;
        1: {pla, pld, pcc} = 3'b010;
        2: {pla, pld, pcc} = 3'b001;
        default: {pla, pld, pcc} = 3'b000;
      endcase
      if (i < 100) {pla, pld, pcc} = 3'b001;  // long count run with wrap-around
      adr_in = 5'($urandom); db_in = 8'($urandom);
      if (pla) model = adr_in; else if (pld) model = db_in[4:0]; else if (pcc) model = model + 1;
      @(posedge clk); #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%0d exp %0d", pc, model); end
    end
    @(negedge clk); ars = 1; #1; checks++; if (pc !== 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
