// tb_module4_top - end-to-end test of the whole top at its default sizes.
//
// Runs the five test programs (tb_programs_pkg) on the five Simple Computer
// versions through the top's ports and checks results and cycle counts, and
// drives every arithmetic circuit with exhaustive or random operands against
// integer references. It counts how often each named mechanism occurs and
// fails if one never does: fetch, HLT, multi-cycle execution, IN, OUT, JMP,
// JZF taken and not taken, PSH, POP, JSR, RTS, ALU overflow; adder overflow,
// carry, borrow, zero, negative; BCD correction, BCD borrow; comparator
// <, =, >; a carry rippling through every CLA block.
module tb_module4_top;
  import sc_pkg::*;
  import tb_programs_pkg::*;

  logic clk = 0;
  logic              sc_start [5], sc_ld_we [5];
  logic [4:0]        sc_ld_addr [5], sc_dbg_addr [5], sc_pc [5], sc_sp [5];
  logic [7:0]        sc_ld_data [5], sc_dbg_data [5], sc_in_port [5], sc_out_port [5], sc_acc [5];
  logic              sc_run [5];
  logic [1:0]        sc_state [5];
  ctrl_t             sc_ctl [5];
  logic [3:0]        sc_flags [5];
  logic [4:0] vote_v; logic [2:0] vote_s;
  logic [1:0] dvm_score [3]; logic [3:0] dvm_sum; logic [6:0] dvm_seg;
  logic [3:0] as_a, as_b, as_s; logic as_m, as_c, as_n, as_z, as_v;
  logic [3:0] cmp_a, cmp_b; logic cmp_eq, cmp_lt, cmp_gt, ucmp_eq, ucmp_lt, ucmp_gt;
  logic [15:0] gra_x, gra_y, gra_s; logic gra_cin, gra_cout;
  logic [3:0] mul_x, mul_y; logic [7:0] mul_p;
  logic [15:0] bcd_a, bcd_b, bcd_s; logic bcd_m, bcd_c;

  module4_top dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  typedef enum int {M_FETCH, M_HLT, M_MULTI, M_IN, M_OUT, M_JMP, M_JZF_T, M_JZF_N, M_PSH, M_POP,
                    M_JSR, M_RTS, M_ALU_V, M_AS_V, M_AS_C, M_AS_BORROW, M_AS_Z, M_AS_N,
                    M_BCD_CORR, M_BCD_BORROW, M_LT, M_EQ, M_GT, M_GRA_RIPPLE, M_NUM} mech_e;
  int mech [M_NUM];

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters of the computers
  always @(posedge clk) begin
    for (int k = 0; k < 5; k++) begin
      if (!sc_start[k]) begin
        if (sc_ctl[k].irl) mech[M_FETCH]++;
        if (sc_state[k] >= 2'd2) mech[M_MULTI]++;
        if (sc_ctl[k].ior) mech[M_IN]++;
        if (sc_ctl[k].iow) mech[M_OUT]++;
        if (k == 2 && sc_state[k] == 2'd1 && sc_ctl[k].pla) begin
          if (dut.g_sc[2].u_sc.opcode == 3'b110) mech[M_JMP]++; else mech[M_JZF_T]++;
        end
        if (k == 2 && sc_state[k] == 2'd1 && dut.g_sc[2].u_sc.opcode == 3'b111 && !sc_ctl[k].pla) mech[M_JZF_N]++;
        if (k == 3 && sc_ctl[k].spd) mech[M_PSH]++;
        if (k == 3 && sc_ctl[k].spi) mech[M_POP]++;
        if (k == 4 && sc_ctl[k].spd) mech[M_JSR]++;
        if (k == 4 && sc_ctl[k].pld) mech[M_RTS]++;
      end
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] to_bcd(int v);
    logic [15:0] r;
    for (int d = 0; d < 4; d++) begin r[4*d +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  task automatic run_prog(int k, output int ncyc);
    image_t img;
    img = prog(k);
    sc_start[k] = 1;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); sc_ld_we[k] = 1; sc_ld_addr[k] = 5'(a); sc_ld_data[k] = img[a];
    end
    @(negedge clk); sc_ld_we[k] = 0;
    @(posedge clk); #1 sc_start[k] = 0;
    ncyc = 0;
    while (sc_run[k] && ncyc < 500) begin
      @(posedge clk);
      ncyc++;
      #1;
    end
    if (!sc_run[k]) mech[M_HLT]++;
  endtask

  task automatic peek(int k, int a, logic [7:0] e, string what);
    sc_dbg_addr[k] = 5'(a);
    #1;
    chk(sc_dbg_data[k] == e, $sformatf("%s: (%0d) = %h, expected %h", what, a, sc_dbg_data[k], e));
  endtask

  initial begin
    int n;
    foreach (mech[i]) mech[i] = 0;
    foreach (sc_start[k]) begin
      sc_start[k] = 1; sc_ld_we[k] = 0; sc_ld_addr[k] = 0; sc_ld_data[k] = 0; sc_dbg_addr[k] = 0;
      sc_in_port[k] = 8'h3C;
    end
    vote_v = 0; dvm_score = '{default: 2'd0}; as_a = 0; as_b = 0; as_m = 0; cmp_a = 0; cmp_b = 0;
    gra_x = 0; gra_y = 0; gra_cin = 0; mul_x = 0; mul_y = 0; bcd_a = 0; bcd_b = 0; bcd_m = 0;

    // ---------------- computers ----------------
    for (int k = 0; k < 5; k++) begin
      run_prog(k, n);
      chk(n == exp_cycles(k), $sformatf("machine %0d: %0d cycles, expected %0d", k, n, exp_cycles(k)));
    end
    peek(0, 13, 8'hFF, "base ADD"); peek(0, 14, 8'h00, "base AND"); peek(0, 15, 8'h55, "base SUB");
    chk(sc_flags[0] == 4'b1100, "base flags after SUB");
    if (sc_flags[0][2]) mech[M_ALU_V]++;
    chk(sc_out_port[1] == 8'h41, "OUT pins");
    peek(1, 11, 8'h41, "IN+ADD stored");
    peek(2, 21, 8'h00, "shift loop"); peek(2, 23, 8'h80, "ASR/ASL");
    peek(3, 22, 8'h22, "POP 1"); peek(3, 23, 8'h11, "POP 2"); chk(sc_sp[3] == 0, "stack balanced");
    peek(4, 20, 8'h3C, "nested subroutines"); chk(sc_sp[4] == 0, "JSR/RTS balanced");

    // ---------------- arithmetic ----------------
    for (int i = 0; i < 32; i++) begin
      vote_v = 5'(i); #1 chk(int'(vote_s) == $countones(vote_v), "vote count");
    end
    for (int i = 0; i < 64; i++) begin
      dvm_score[0] = 2'(i); dvm_score[1] = 2'(i >> 2); dvm_score[2] = 2'(i >> 4);
      #1 chk(int'(dvm_sum) == int'(dvm_score[0]) + int'(dvm_score[1]) + int'(dvm_score[2]), "Digi-Vota-Matic sum");
    end
    for (int i = 0; i < 512; i++) begin
      int r;
      {as_m, as_a, as_b} = 9'(i);
      r = as_m ? int'($signed(as_a)) - int'($signed(as_b)) : int'($signed(as_a)) + int'($signed(as_b));
      #1;
      chk(as_s == 4'(r) && as_v == (r > 7 || r < -8), "adder/subtractor");
      if (as_v) mech[M_AS_V]++;
      if (as_c && !as_m) mech[M_AS_C]++;
      if (!as_c && as_m) mech[M_AS_BORROW]++;
      if (as_z) mech[M_AS_Z]++;
      if (as_n) mech[M_AS_N]++;
    end
    for (int i = 0; i < 256; i++) begin
      {cmp_a, cmp_b} = 8'(i);
      #1;
      chk({cmp_eq, cmp_lt, cmp_gt} == {$signed(cmp_a) == $signed(cmp_b), $signed(cmp_a) < $signed(cmp_b), $signed(cmp_a) > $signed(cmp_b)}, "signed compare");
      chk({ucmp_eq, ucmp_lt, ucmp_gt} == {cmp_a == cmp_b, cmp_a < cmp_b, cmp_a > cmp_b}, "unsigned compare");
      if (cmp_lt) mech[M_LT]++;
      if (cmp_eq) mech[M_EQ]++;
      if (cmp_gt) mech[M_GT]++;
    end
    gra_x = 16'hFFFF; gra_y = 16'h0000; gra_cin = 1; #1;
    chk(gra_s == 16'h0000 && gra_cout, "carry through all CLA blocks");
    if (gra_cout) mech[M_GRA_RIPPLE]++;
    for (int i = 0; i < 1000; i++) begin
      gra_x = 16'($urandom); gra_y = 16'($urandom); gra_cin = 1'($urandom); #1;
      chk({gra_cout, gra_s} == {1'b0, gra_x} + {1'b0, gra_y} + 17'(gra_cin), "group ripple adder");
    end
    for (int i = 0; i < 256; i++) begin
      {mul_x, mul_y} = 8'(i); #1;
      chk(int'(mul_p) == int'(mul_x) * int'(mul_y), "4x4 multiplier");
    end
    for (int i = 0; i < 2000; i++) begin
      int av, bv, r;
      av = $urandom_range(9999); bv = $urandom_range(9999); bcd_m = 1'($urandom);
      bcd_a = to_bcd(av); bcd_b = to_bcd(bv);
      r = bcd_m ? av - bv : av + bv;
      #1;
      chk(bcd_s == to_bcd(r < 0 ? r + 10000 : r % 10000) && bcd_c == (bcd_m ? r >= 0 : r >= 10000), "BCD add/sub");
      if (dut.u_bcd.g_dig[0].u_bfa.fcorr) mech[M_BCD_CORR]++;
      if (bcd_m && !bcd_c) mech[M_BCD_BORROW]++;
    end

    for (int i = 0; i < M_NUM; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      chk(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
