// tb_idms - instruction decoder / micro-sequencer of all five machine
// versions. The expected control signals of each (version, opcode, state)
// are written out below from the system control tables as lists of signal
// names; random opcode streams are applied, and in every cycle all 20
// control outputs are compared, the execute-cycle count of each instruction
// is checked (1, or 2 for PSH, 3 for JSR), JZF is tried with ZF 0 and 1, and
// HLT must clear RUN and park the counter in S0 until START.
module tb_idms;
  import sc_pkg::*;
  localparam variant_e VARS [5] = '{VAR_BASE, VAR_IO, VAR_JUMP, VAR_STACK, VAR_SUBR};

  logic clk = 0, start;
  logic [2:0] opcode [5];
  logic zf;
  ctrl_t ctl [5];
  logic run [5];
  logic [1:0] state [5];
  int checks = 0, failures = 0, cycles = 0;
  int n_halts = 0, n_multi = 0, n_jzf_taken = 0, n_jzf_not = 0;

  for (genvar k = 0; k < 5; k++) begin : g_dut
    idms #(.VARIANT(VARS[k])) dut (.clk(clk), .start(start), .opcode(opcode[k]), .zf(zf),
                                   .ctl(ctl[k]), .run(run[k]), .state(state[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build a control word from a list of signal names
  function automatic ctrl_t sigs(string s);
    ctrl_t c = '0;
    string tok = "";
    for (int i = 0; i <= s.len(); i++) begin
      if (i == s.len() || s[i] == " ") begin
        case (tok)
          "msl": c.msl = 1; "moe": c.moe = 1; "mwe": c.mwe = 1; "pcc": c.pcc = 1;
          "poa": c.poa = 1; "pla": c.pla = 1; "pod": c.pod = 1; "pld": c.pld = 1;
          "irl": c.irl = 1; "ira": c.ira = 1; "aoe": c.aoe = 1; "ale": c.ale = 1;
          "alx": c.alx = 1; "aly": c.aly = 1; "ior": c.ior = 1; "iow": c.iow = 1;
          "spi": c.spi = 1; "spd": c.spd = 1; "spa": c.spa = 1; "rst": c.rst = 1;
          "": ;
          default: $fatal(1, "bad name %s", tok);
        endcase
        tok = "";
      end else tok = {tok, s.substr(i, i)};
    end
    return c;
  endfunction

  // expected control word (transcribed from the control tables)
  function automatic ctrl_t expect_ctl(variant_e v, logic [2:0] op, int st, logic z);
    if (st == 0) return sigs("msl moe poa pcc irl");
    unique case (op)
      3'b000: return sigs("");
      3'b001: return (v == VAR_JUMP) ? sigs("msl moe ira ale rst") : sigs("msl moe ira ale alx rst");
      3'b010: return (v == VAR_JUMP) ? sigs("ale aly rst") : sigs("msl moe ira ale rst");
      3'b011: return (v == VAR_JUMP) ? sigs("ale alx rst") : sigs("msl moe ira ale aly rst");
      3'b100: return (v == VAR_JUMP) ? sigs("ale alx aly rst") : sigs("msl moe ira ale alx aly rst");
      3'b101: return sigs("msl mwe ira aoe rst");
      3'b110:
        unique case (v)
          VAR_IO:    return sigs("ira ale alx ior rst");
          VAR_JUMP:  return sigs("ira pla rst");
          VAR_STACK: return st == 1 ? sigs("spd") : sigs("spa msl mwe aoe rst");
          VAR_SUBR:  return st == 1 ? sigs("spd") : st == 2 ? sigs("spa msl mwe pod") : sigs("ira pla rst");
          default:   return sigs("rst");
        endcase
      default:
        unique case (v)
          VAR_IO:    return sigs("ira aoe iow rst");
          VAR_JUMP:  return z ? sigs("ira pla rst") : sigs("rst");
          VAR_STACK: return sigs("spa msl moe ale alx spi rst");
          VAR_SUBR:  return sigs("spa msl moe pld spi rst");
          default:   return sigs("rst");
        endcase
    endcase
  endfunction

  function automatic int exec_cycles(variant_e v, logic [2:0] op);
    if (op == 3'b110 && v == VAR_STACK) return 2;
    if (op == 3'b110 && v == VAR_SUBR)  return 3;
    return 1;
  endfunction

  task automatic chk(int k, int st);
    ctrl_t e;
    e = expect_ctl(VARS[k], opcode[k], st, zf);
    checks++;
    if (ctl[k] !== e || int'(state[k]) != st) begin
      failures++;
      $display("FAIL var %0d op %b S%0d: ctl=%b exp %b (state %0d)", k, opcode[k], st, ctl[k], e, state[k]);
    end
  endtask

  // run one instruction on machine k (others hold a harmless LDA in S0..)
  task automatic one_instr(int k, logic [2:0] op);
    int n;
    @(negedge clk);
    chk(k, 0);                 // fetch
    opcode[k] = op;            // IR loads at the end of S0
    zf = 1'($urandom);
    @(posedge clk); #1;
    n = 0;
    if (op == 3'b000) begin
      checks++;
      if (run[k] !== 1'b0 || ctl[k] !== '0) begin failures++; $display("FAIL HLT var %0d", k); end
      @(posedge clk); #1;
      checks++;
      if (run[k] !== 1'b0 || state[k] !== 2'd0 || ctl[k].pcc || ctl[k].irl || ctl[k].msl) begin
        failures++; $display("FAIL halted var %0d", k);
      end
      n_halts++;
      start = 1; #1; start = 0;
      return;
    end
    do begin
      n++;
      chk(k, n);
      if (VARS[k] == VAR_JUMP && op == 3'b111) begin if (zf) n_jzf_taken++; else n_jzf_not++; end
      @(posedge clk); #1;
    end while (n < 4 && state[k] != 2'd0);
    if (n > 1) n_multi++;
    checks++;
    if (n != exec_cycles(VARS[k], op)) begin
      failures++; $display("FAIL var %0d op %b took %0d execute cycles", k, op, n);
    end
  endtask

  initial begin
    zf = 0;
    foreach (opcode[k]) opcode[k] = 3'b001;
    start = 1;
    @(posedge clk); #1 start = 0;
    for (int k = 0; k < 5; k++) begin
      // make the other machines idle: halt them
      for (int j = 0; j < 5; j++) if (j != k) opcode[j] = 3'b001;
      // realign all machines to S0 before the next version is exercised
      @(negedge clk); start = 1;
      @(posedge clk); #1 start = 0;
      for (int i = 0; i < 300; i++) one_instr(k, 3'($urandom_range(7)));
    end
    checks++;
    if (n_halts == 0 || n_multi == 0 || n_jzf_taken == 0 || n_jzf_not == 0) begin
      failures++; $display("FAIL coverage halts=%0d multi=%0d jzf=%0d/%0d", n_halts, n_multi, n_jzf_taken, n_jzf_not);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
