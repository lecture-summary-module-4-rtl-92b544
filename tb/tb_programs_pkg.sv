// tb_programs_pkg - test programs for the five Simple Computer versions.
//
// prog(k) returns a 32-word memory image for machine version k
// (0 base, 1 I/O, 2 shift+jump, 3 stack, 4 subroutine); unused words are 0.
// exp_cycles(k) is the number of clock cycles the program runs with RUN set,
// worked out by hand from the cycles per instruction (2 for one-execute-cycle
// instructions, 3 for PSH, 4 for JSR, and 1 for the final HLT, whose
// execute cycle clears RUN). The expected results are documented next to
// each program and checked by the testbenches.
package tb_programs_pkg;
  import sc_pkg::*;

  typedef logic [DATA_W-1:0] image_t [2**ADDR_W];

  function automatic logic [7:0] ins(opcode_e op, int unsigned a);
    return {op, a[4:0]};
  endfunction

  function automatic image_t prog(int k);
    image_t m;
    foreach (m[i]) m[i] = '0;
    unique case (k)
      0: begin
        // A = 10101010, B = 01010101: A+B -> 01101, A&B -> 01110, A-B -> 01111
        m[0] = ins(OP_LDA, 11); m[1] = ins(OP_ADD, 12); m[2] = ins(OP_STA, 13);
        m[3] = ins(OP_LDA, 11); m[4] = ins(OP_AND, 12); m[5] = ins(OP_STA, 14);
        m[6] = ins(OP_LDA, 11); m[7] = ins(OP_SUB, 12); m[8] = ins(OP_STA, 15);
        m[9] = ins(OP_HLT, 0);
        m[11] = 8'b1010_1010; m[12] = 8'b0101_0101;
      end
      1: begin
        // IN port, add 5, OUT port, store at 11
        m[0] = ins(OP_X6, 0); m[1] = ins(OP_ADD, 10); m[2] = ins(OP_X7, 0);
        m[3] = ins(OP_STA, 11); m[4] = ins(OP_HLT, 0);
        m[10] = 8'h05;
      end
      2: begin
        // shift 08 right until zero (JZF loop with JMP back), then ASR/ASL of 81
        m[0] = ins(OP_LDA, 20);
        m[1] = ins(OP_ADD, 0);   // LSR
        m[2] = ins(OP_X7, 4);    // JZF 4
        m[3] = ins(OP_X6, 1);    // JMP 1
        m[4] = ins(OP_STA, 21);
        m[5] = ins(OP_LDA, 22);
        m[6] = ins(OP_AND, 0);   // ASR
        m[7] = ins(OP_SUB, 0);   // ASL
        m[8] = ins(OP_STA, 23);
        m[9] = ins(OP_HLT, 0);
        m[20] = 8'h08; m[21] = 8'hFF; m[22] = 8'h81;
      end
      3: begin
        // push 11, push 22, pop -> 22, pop -> 23
        m[0] = ins(OP_LDA, 20); m[1] = ins(OP_X6, 0); m[2] = ins(OP_LDA, 21);
        m[3] = ins(OP_X6, 0);   m[4] = ins(OP_X7, 0); m[5] = ins(OP_STA, 22);
        m[6] = ins(OP_X7, 0);   m[7] = ins(OP_STA, 23); m[8] = ins(OP_HLT, 0);
        m[20] = 8'h11; m[21] = 8'h22;
      end
      4: begin
        // main: JSR 8; STA 20; HLT.  sub A (8): LDA 21; JSR 12; RTS.
        // sub B (12): ADD 22; RTS.
        m[0] = ins(OP_X6, 8); m[1] = ins(OP_STA, 20); m[2] = ins(OP_HLT, 0);
        m[8] = ins(OP_LDA, 21); m[9] = ins(OP_X6, 12); m[10] = ins(OP_X7, 0);
        m[12] = ins(OP_ADD, 22); m[13] = ins(OP_X7, 0);
        m[21] = 8'h30; m[22] = 8'h0C;
      end
      default: ;
    endcase
    return m;
  endfunction

  function automatic int exp_cycles(int k);
    unique case (k)
      0: return 9 * 2 + 1;
      1: return 4 * 2 + 1;
      2: return 17 * 2 + 1;
      3: return 6 * 2 + 2 * 3 + 1;
      4: return 2 * 4 + 5 * 2 + 1;
      default: return 0;
    endcase
  endfunction
endpackage
