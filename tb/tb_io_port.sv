// tb_io_port - latched and unlatched output ports: port select at 00000,
// IN drives the bus only when selected, OUT data stays on latched pins
// after IOW drops and disappears from unlatched pins.
module tb_io_port;
  logic [4:0] addr;
  logic ior, iow;
  logic [7:0] db_in, in_pins, db_out, out_l, out_u, db_out_u;
  logic en_l, en_u;
  int checks = 0, failures = 0;
  io_port #(.LATCHED(1'b1)) dut_l (.addr(addr), .ior(ior), .iow(iow), .db_in(db_in), .in_pins(in_pins),
                                   .db_out(db_out), .db_out_en(en_l), .out_pins(out_l));
  io_port #(.LATCHED(1'b0)) dut_u (.addr(addr), .ior(ior), .iow(iow), .db_in(db_in), .in_pins(in_pins),
                                   .db_out(db_out_u), .db_out_en(en_u), .out_pins(out_u));
  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] held;
    addr = 0; ior = 0; iow = 0; db_in = 0; in_pins = 0;
    for (int i = 0; i < 200; i++) begin
      addr = ($urandom_range(1) == 0) ? 5'd0 : 5'($urandom);
      in_pins = 8'($urandom);
      ior = 1; #1;
      chk(en_l === (addr == 0) && db_out === in_pins, "IN select");
      ior = 0; #1;
      chk(en_l === 1'b0, "IN idle");
      addr = 0; db_in = 8'($urandom); held = db_in;
      iow = 1; #1;
      chk(out_l === held && out_u === held, "OUT during write");
      iow = 0; db_in = 8'($urandom); #1;
      chk(out_l === held, "latched pins hold");
      chk(out_u === 8'h00, "unlatched pins drop");
      addr = 5'd3; iow = 1; #1;
      chk(out_l === held, "other port address ignored");
      iow = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
