// tb_simple_computer - runs one program on each of the five machine
// versions and checks memory results, registers, flags and the number of
// cycles from START to halt.
//   base:  the ADD/AND/SUB program: (01101)=11111111, (01110)=00000000,
//          (01111)=01010101, flags after SUB: C=1 V=1 N=0 Z=0; 19 cycles
//   I/O:   IN 3C, add 05, OUT -> output pins 41 (and kept after the OUT)
//   jump:  shift 08 right to 0 (JZF not taken 3 times, taken once, JMP 3
//          times), then 81 ASR -> C0, ASL -> 80 with C=1
//   stack: push 11, push 22, pop, pop -> 22 then 11; SP back to 00000;
//          stack words at 11111 and 11110
//   subr:  nested JSR/RTS, A = 30 + 0C stored at 20; return addresses 01
//          and 0A on the stack
// The base machine is then restarted and its first six cycles (fetch and
// execute of LDA, ADD, STA) are traced as on the instruction trace
// worksheets: during each cycle the state, address bus and data bus; after
// its clock edge PC, IR, A and the flags the worksheets print (C and V are
// not known before the ADD). The buses are read hierarchically because the
// computer has no bus ports.
module tb_simple_computer;
  import sc_pkg::*;
  import tb_programs_pkg::*;
  localparam variant_e VARS [5] = '{VAR_BASE, VAR_IO, VAR_JUMP, VAR_STACK, VAR_SUBR};

  logic clk = 0;
  logic start [5];
  logic ld_we [5];
  logic [4:0] ld_addr [5], dbg_addr [5], pc [5], sp [5];
  logic [7:0] ld_data [5], dbg_data [5], in_port [5], out_port [5], acc [5];
  logic run [5];
  logic [1:0] state [5];
  ctrl_t ctl [5];
  logic [3:0] flags [5];
  int checks = 0, failures = 0, cycles = 0;

  for (genvar k = 0; k < 5; k++) begin : g_dut
    simple_computer #(.VARIANT(VARS[k])) dut (
      .clk(clk), .start(start[k]), .ld_we(ld_we[k]), .ld_addr(ld_addr[k]), .ld_data(ld_data[k]),
      .dbg_addr(dbg_addr[k]), .dbg_data(dbg_data[k]), .in_port(in_port[k]), .out_port(out_port[k]),
      .run(run[k]), .state(state[k]), .ctl(ctl[k]), .pc(pc[k]), .sp(sp[k]), .acc(acc[k]), .flags(flags[k])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // one worksheet step of the base machine: values during the cycle, then
  // values after the clock edge that ends it; fm masks the flags to compare
  task automatic trace_step(string name, logic [1:0] st, logic [4:0] ab, logic [7:0] db,
                            logic [4:0] pc_e, logic [7:0] ir_e, logic [7:0] a_e,
                            logic [3:0] f_e, logic [3:0] fm);
    @(negedge clk);
    chk(state[0] == st, $sformatf("%s: state %0d", name, state[0]));
    chk(g_dut[0].dut.adr_bus == ab, $sformatf("%s: address bus %b", name, g_dut[0].dut.adr_bus));
    chk(g_dut[0].dut.data_bus == db, $sformatf("%s: data bus %b", name, g_dut[0].dut.data_bus));
    @(posedge clk); #1;
    chk(pc[0] == pc_e, $sformatf("%s: PC %b", name, pc[0]));
    chk({g_dut[0].dut.opcode, g_dut[0].dut.ir_addr} == ir_e,
        $sformatf("%s: IR %b %b", name, g_dut[0].dut.opcode, g_dut[0].dut.ir_addr));
    chk(acc[0] == a_e, $sformatf("%s: A %b", name, acc[0]));
    chk((flags[0] & fm) == (f_e & fm), $sformatf("%s: flags CVNZ %b", name, flags[0]));
  endtask

  task automatic run_prog(int k, output int ncyc);
    image_t img;
    img = prog(k);
    start[k] = 1;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); ld_we[k] = 1; ld_addr[k] = 5'(a); ld_data[k] = img[a];
    end
    @(negedge clk); ld_we[k] = 0;
    @(posedge clk); #1 start[k] = 0;
    ncyc = 0;
    while (run[k] && ncyc < 500) begin
      @(posedge clk);
      ncyc++;
      #1;
    end
  endtask

  initial begin
    int n;
    foreach (start[k]) begin
      start[k] = 1; ld_we[k] = 0; ld_addr[k] = 0; ld_data[k] = 0; dbg_addr[k] = 0; in_port[k] = 8'h3C;
    end
    for (int k = 0; k < 5; k++) begin
      run_prog(k, n);
      chk(n == exp_cycles(k), $sformatf("machine %0d ran %0d cycles, expected %0d", k, n, exp_cycles(k)));
      chk(!run[k], $sformatf("machine %0d halted", k));
      #1;
      unique case (k)
        0: begin
          dbg_addr[0] = 13; #1 chk(dbg_data[0] == 8'hFF, "base ADD result");
          dbg_addr[0] = 14; #1 chk(dbg_data[0] == 8'h00, "base AND result");
          dbg_addr[0] = 15; #1 chk(dbg_data[0] == 8'h55, "base SUB result");
          chk(flags[0] == 4'b1100, $sformatf("base flags CVNZ=%b", flags[0]));
          chk(pc[0] == 5'd10, "base PC after HLT");
        end
        1: begin
          chk(out_port[1] == 8'h41, $sformatf("OUT pins %h", out_port[1]));
          dbg_addr[1] = 11; #1 chk(dbg_data[1] == 8'h41, "I/O stored value");
        end
        2: begin
          dbg_addr[2] = 21; #1 chk(dbg_data[2] == 8'h00, "LSR loop result");
          dbg_addr[2] = 23; #1 chk(dbg_data[2] == 8'h80, "ASR/ASL result");
          chk(flags[2] == 4'b1010, $sformatf("jump flags CVNZ=%b", flags[2]));
        end
        3: begin
          dbg_addr[3] = 22; #1 chk(dbg_data[3] == 8'h22, "first POP");
          dbg_addr[3] = 23; #1 chk(dbg_data[3] == 8'h11, "second POP");
          dbg_addr[3] = 31; #1 chk(dbg_data[3] == 8'h11, "stack word 11111");
          dbg_addr[3] = 30; #1 chk(dbg_data[3] == 8'h22, "stack word 11110");
          chk(sp[3] == 5'd0, "stack balanced");
        end
        4: begin
          dbg_addr[4] = 20; #1 chk(dbg_data[4] == 8'h3C, "subroutine result");
          dbg_addr[4] = 31; #1 chk(dbg_data[4] == 8'h01, "outer return address");
          dbg_addr[4] = 30; #1 chk(dbg_data[4] == 8'h0A, "inner return address");
          chk(sp[4] == 5'd0, "stack balanced");
          chk(pc[4] == 5'd3, "PC after HLT");
        end
        default: ;
      endcase
    end
    // worksheet trace of the base machine: restart it on the same program
    @(negedge clk); start[0] = 1;
    @(posedge clk); #1 start[0] = 0;
    //          cycle        st     addr bus  data bus      PC        IR            A             CVNZ     mask
    trace_step("fetch LDA", 2'd0, 5'b00000, 8'b001_01011, 5'b00001, 8'b001_01011, 8'h00,        4'b0000, 4'b0000);
    trace_step("exec LDA",  2'd1, 5'b01011, 8'b10101010,  5'b00001, 8'b001_01011, 8'b10101010, 4'b0010, 4'b0011);
    trace_step("fetch ADD", 2'd0, 5'b00001, 8'b010_01100, 5'b00010, 8'b010_01100, 8'b10101010, 4'b0010, 4'b0011);
    trace_step("exec ADD",  2'd1, 5'b01100, 8'b01010101,  5'b00010, 8'b010_01100, 8'b11111111, 4'b0010, 4'b1111);
    trace_step("fetch STA", 2'd0, 5'b00010, 8'b101_01101, 5'b00011, 8'b101_01101, 8'b11111111, 4'b0010, 4'b1111);
    trace_step("exec STA",  2'd1, 5'b01101, 8'b11111111,  5'b00011, 8'b101_01101, 8'b11111111, 4'b0010, 4'b1111);
    dbg_addr[0] = 13; #1 chk(dbg_data[0] == 8'hFF, "traced STA result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
