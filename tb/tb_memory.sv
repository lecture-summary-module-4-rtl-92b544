// tb_memory - memory: loader writes, combinational reads, MSL/MWE writes at
// the clock edge, no write without MSL, dout_en = MSL & MOE. A model array
// in the testbench holds the expected contents.
module tb_memory;
  logic clk = 0;
  logic msl, moe, mwe, ld_we;
  logic [4:0] addr, ld_addr, dbg_addr;
  logic [7:0] din, dout, ld_data, dbg_data;
  logic dout_en;
  logic [7:0] model [32];
  int checks = 0, failures = 0, cycles = 0;
  memory dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk_all();
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i); dbg_addr = 5'(31 - i); #1;
      checks += 2;
      if (dout !== model[i]) begin failures++; $display("FAIL read %0d = %h exp %h", i, dout, model[i]); end
      if (dbg_data !== model[31 - i]) begin failures++; $display("FAIL dbg %0d", 31 - i); end
    end
  endtask
  initial begin
    {msl, moe, mwe, ld_we} = '0; addr = 0; din = 0; ld_addr = 0; ld_data = 0; dbg_addr = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 5'(i); ld_data = 8'($urandom); model[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    chk_all();
    // bus writes
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr = 5'($urandom); din = 8'($urandom); msl = 1'($urandom); mwe = 1'($urandom); moe = ~mwe & 1'($urandom);
      #1;
      checks++;
      if (dout_en !== (msl & moe)) begin failures++; $display("FAIL dout_en"); end
      if (msl && mwe) model[addr] = din;
    end
    @(negedge clk); {msl, moe, mwe} = '0;
    chk_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
