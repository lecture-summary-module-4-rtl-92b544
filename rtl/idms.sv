// idms - instruction decoder and micro-sequencer of the Simple Computer.
//
// The state machine that tells every other block what to do. It holds
//   - a 2-bit state counter: S0 is the fetch cycle, S1..S3 are the first to
//     third execute cycles. It counts up every clock while the machine runs
//     and is reset synchronously to S0 by ctl.rst, which the decoder asserts
//     in the last execute cycle of each instruction; START resets it
//     asynchronously.
//   - the RUN flip-flop: set asynchronously by START, cleared when a HLT is
//     decoded in S1. The clear takes effect at once: run = RUN_q & ~(S1 & HLT)
//     gates the enables of the same cycle, as an asynchronous clear of RUN
//     would, and RUN_q follows at the next edge. With run low the counter
//     stays in S0 and no register changes.
// All outputs are combinational decodes of the state and the opcode, active
// high, and follow the system control tables of each machine version:
//   S0 (all):   MSL MOE POA PCC IRL - read the instruction at (PC) into IR
//               and count PC up on the edge that ends the cycle.
//   S1: LDA/ADD/SUB/AND  MSL MOE IRA ALE (+ALX/ALY for the function)
//       STA              MSL MWE IRA AOE
//       LSR/ASL/ASR      ALE with ALX/ALY (VAR_JUMP, shift ALU)
//       IN  (110)        IRA ALE ALX IOR              (VAR_IO)
//       OUT (111)        IRA AOE IOW                  (VAR_IO)
//       JMP (110)        IRA PLA                      (VAR_JUMP)
//       JZF (111)        IRA PLA, only when ZF = 1    (VAR_JUMP)
//       PSH (110)        SPD,  then S2: SPA MSL MWE AOE     (VAR_STACK)
//       POP (111)        SPA MSL MOE ALE ALX SPI            (VAR_STACK)
//       JSR (110)        SPD,  S2: SPA MSL MWE POD,  S3: IRA PLA  (VAR_SUBR)
//       RTS (111)        SPA MSL MOE PLD SPI                (VAR_SUBR)
// Choices of this design: one counter serves every version (single-cycle
// versions never leave S1 for S2, which matches a 1-bit fetch/execute
// counter); IN asserts ALX as its table says; the jump version uses the
// shift ALU as its table says; the spare opcodes in the base machine are a
// one-cycle no-operation.
// START also disables the assertion at the end; lint reports that as a net
// used both asynchronously and synchronously, and it stands.
module idms
  import sc_pkg::*;
#(
  parameter variant_e VARIANT = VAR_BASE
) (
  input  logic            clk,
  input  logic            start,
  input  logic [OP_W-1:0] opcode,
  input  logic            zf,
  output ctrl_t           ctl,
  output logic            run,
  output logic [1:0]      state
);
  logic [1:0] sq;
  logic       run_q;
  logic       s0, s1, s2, s3;
  logic       hlt;
  opcode_e    op;

  assign op    = opcode_e'(opcode);
  assign s0    = (sq == 2'd0);
  assign s1    = (sq == 2'd1);
  assign s2    = (sq == 2'd2);
  assign s3    = (sq == 2'd3);
  assign hlt   = (op == OP_HLT);
  assign run   = run_q & ~(s1 & hlt);
  assign state = sq;

  always_ff @(posedge clk or posedge start) begin
    if (start) begin
      sq    <= 2'd0;
      run_q <= 1'b1;
    end else begin
      sq    <= (run && !ctl.rst) ? sq + 2'd1 : 2'd0;
      run_q <= run;
    end
  end

  always_comb begin
    ctl = '0;
    if (s0) begin
      ctl.msl = run;
      ctl.moe = 1'b1;
      ctl.poa = 1'b1;
      ctl.pcc = run;
      ctl.irl = run;
    end else if (run) begin
      unique case (op)
        OP_HLT: ;
        OP_LDA: begin
          ctl.msl = 1'b1; ctl.moe = 1'b1; ctl.ira = 1'b1; ctl.ale = 1'b1;
          ctl.alx = (VARIANT != VAR_JUMP);  // LDA is ALX=1 in alu, 00 in alu_shift
          ctl.rst = 1'b1;
        end
        OP_ADD: begin
          if (VARIANT == VAR_JUMP) begin           // LSR
            ctl.ale = 1'b1; ctl.aly = 1'b1;
          end else begin
            ctl.msl = 1'b1; ctl.moe = 1'b1; ctl.ira = 1'b1; ctl.ale = 1'b1;
          end
          ctl.rst = 1'b1;
        end
        OP_SUB: begin
          if (VARIANT == VAR_JUMP) begin           // ASL
            ctl.ale = 1'b1; ctl.alx = 1'b1;
          end else begin
            ctl.msl = 1'b1; ctl.moe = 1'b1; ctl.ira = 1'b1; ctl.ale = 1'b1; ctl.aly = 1'b1;
          end
          ctl.rst = 1'b1;
        end
        OP_AND: begin
          if (VARIANT == VAR_JUMP) begin           // ASR
            ctl.ale = 1'b1; ctl.alx = 1'b1; ctl.aly = 1'b1;
          end else begin
            ctl.msl = 1'b1; ctl.moe = 1'b1; ctl.ira = 1'b1; ctl.ale = 1'b1;
            ctl.alx = 1'b1; ctl.aly = 1'b1;
          end
          ctl.rst = 1'b1;
        end
        OP_STA: begin
          ctl.msl = 1'b1; ctl.mwe = 1'b1; ctl.ira = 1'b1; ctl.aoe = 1'b1;
          ctl.rst = 1'b1;
        end
        OP_X6: begin
          unique case (VARIANT)
            VAR_IO: begin                                   // IN
              ctl.ira = 1'b1; ctl.ale = 1'b1; ctl.alx = 1'b1; ctl.ior = 1'b1;
              ctl.rst = 1'b1;
            end
            VAR_JUMP: begin                                 // JMP
              ctl.ira = 1'b1; ctl.pla = 1'b1;
              ctl.rst = 1'b1;
            end
            VAR_STACK: begin                                // PSH
              if (s1) ctl.spd = 1'b1;
              else begin
                ctl.spa = 1'b1; ctl.msl = 1'b1; ctl.mwe = 1'b1; ctl.aoe = 1'b1;
                ctl.rst = 1'b1;
              end
            end
            VAR_SUBR: begin                                 // JSR
              if (s1) ctl.spd = 1'b1;
              else if (s2) begin
                ctl.spa = 1'b1; ctl.msl = 1'b1; ctl.mwe = 1'b1; ctl.pod = 1'b1;
              end else begin
                ctl.ira = 1'b1; ctl.pla = 1'b1;
                ctl.rst = 1'b1;
              end
            end
            default: ctl.rst = 1'b1;                        // no-operation
          endcase
        end
        OP_X7: begin
          unique case (VARIANT)
            VAR_IO: begin                                   // OUT
              ctl.ira = 1'b1; ctl.aoe = 1'b1; ctl.iow = 1'b1;
              ctl.rst = 1'b1;
            end
            VAR_JUMP: begin                                 // JZF
              ctl.ira = zf; ctl.pla = zf;
              ctl.rst = 1'b1;
            end
            VAR_STACK: begin                                // POP
              ctl.spa = 1'b1; ctl.msl = 1'b1; ctl.moe = 1'b1; ctl.ale = 1'b1;
              ctl.alx = 1'b1; ctl.spi = 1'b1;
              ctl.rst = 1'b1;
            end
            VAR_SUBR: begin                                 // RTS
              ctl.spa = 1'b1; ctl.msl = 1'b1; ctl.moe = 1'b1; ctl.pld = 1'b1;
              ctl.spi = 1'b1;
              ctl.rst = 1'b1;
            end
            default: ctl.rst = 1'b1;                        // no-operation
          endcase
        end
      endcase
    end
  end

  // A single-cycle instruction must end in S1; only JSR reaches S3.
  a_s3_only_jsr: assert property (@(posedge clk) disable iff (start)
    (run && s3) |-> (VARIANT == VAR_SUBR));
endmodule
