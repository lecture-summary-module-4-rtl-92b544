// tb_stack_pointer - reset to 00000, first decrement to 11111, random
// increments/decrements/holds against a model.
module tb_stack_pointer;
  logic clk = 0, ars, spi, spd;
  logic [4:0] sp, model;
  int checks = 0, failures = 0, cycles = 0;
  int unsigned sel;
  stack_pointer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    spi = 0; spd = 0;
    ars = 0; #1; ars = 1; #2; checks++; if (sp !== 0) begin failures++; $display("FAIL reset"); end
    ars = 0; model = 0;
    @(negedge clk); spd = 1; model = 5'd31;
    @(posedge clk); #1; checks++; if (sp !== 5'd31) begin failures++; $display("FAIL first push address %0d", sp); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      sel = $urandom_range(2);
      case (sel)
        0: {spi, spd} = 2'b10;
        1: {spi, spd} = 2'b01;
        default: {spi, spd} = 2'b00;
      endcase
      if (spi) model++; else if (spd) model--;
      @(posedge clk); #1;
      checks++;
      if (sp !== model) begin failures++; $display("FAIL sp=%0d exp %0d", sp, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
