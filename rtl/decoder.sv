// decoder: MIPS R2000 integer instruction decoder of the ID stage.
//
// Translates one 32-bit instruction into the dec_t control struct: the
// EXE functional unit, its operation, which of rs/rt are read, the
// extended immediate, the destination register, memory access size and
// signedness, branch/jump type and COP0 moves. Decoded instructions are
// the standard R2000 integer set (no floating point, no exceptions, no
// unaligned LWL/LWR/SWL/SWR) plus SPECIAL2 MUL; anything else, SYSCALL and
// BREAK included, decodes as a no-operation (a choice of this design).
// A destination of R0 is dropped (wr_en low), so R0 never loses its token.
// Purely combinational.
// Some dec fields (shamt, cop0_reg and parts of the immediate) are
// instruction bits copied through without logic.
module decoder
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);
  logic [5:0]  op, fn;
  logic [4:0]  rs, rt, rd;
  logic [31:0] sext, zext;
  logic        wr;
  logic [4:0]  dst;

  assign op   = instr[31:26];
  assign rs   = instr[25:21];
  assign rt   = instr[20:16];
  assign rd   = instr[15:11];
  assign fn   = instr[5:0];
  assign sext = {{16{instr[15]}}, instr[15:0]};
  assign zext = {16'd0, instr[15:0]};

  always_comb begin
    dec = '0;
    dec.unit     = U_ALU;
    dec.alu_op   = A_ADD;
    dec.shift_op = SH_LL;
    dec.md_op    = M_NONE;
    dec.br_op    = B_NONE;
    dec.mem_size = SZ_W;
    dec.shamt    = instr[10:6];
    dec.cop0_reg = rd;
    wr  = 1'b0;
    dst = rd;
    unique case (op)
      OP_SPECIAL: begin
        case (fn)
          F_SLL, F_SRL, F_SRA, F_SLLV, F_SRLV, F_SRAV: begin
            dec.unit      = U_SHIFT;
            dec.uses_rt   = 1'b1;
            dec.shift_var = fn[2];
            dec.uses_rs   = fn[2];
            dec.shift_op  = (fn[1:0] == 2'b00) ? SH_LL : (fn[1:0] == 2'b10) ? SH_RL : SH_RA;
            wr = 1'b1;
          end
          F_JR:   begin dec.br_op = B_JR; dec.uses_rs = 1'b1; end
          F_JALR: begin dec.br_op = B_JR; dec.uses_rs = 1'b1; dec.unit = U_LINK; wr = 1'b1; end
          F_MFHI: begin dec.unit = U_HILO; dec.md_op = M_MFHI; wr = 1'b1; end
          F_MFLO: begin dec.unit = U_HILO; dec.md_op = M_MFLO; wr = 1'b1; end
          F_MTHI: begin dec.unit = U_HILO; dec.md_op = M_MTHI; dec.uses_rs = 1'b1; end
          F_MTLO: begin dec.unit = U_HILO; dec.md_op = M_MTLO; dec.uses_rs = 1'b1; end
          F_MULT, F_MULTU: begin
            dec.unit = U_MUL; dec.md_op = fn[0] ? M_MULTU : M_MULT;
            dec.uses_rs = 1'b1; dec.uses_rt = 1'b1;
          end
          F_DIV, F_DIVU: begin
            dec.unit = U_DIV; dec.md_op = fn[0] ? M_DIVU : M_DIV;
            dec.uses_rs = 1'b1; dec.uses_rt = 1'b1;
          end
          F_ADD, F_ADDU, F_SUB, F_SUBU, F_AND, F_OR, F_XOR, F_NOR, F_SLT, F_SLTU: begin
            dec.uses_rs = 1'b1; dec.uses_rt = 1'b1; wr = 1'b1;
            case (fn)
              F_SUB, F_SUBU: dec.alu_op = A_SUB;
              F_AND:  dec.alu_op = A_AND;
              F_OR:   dec.alu_op = A_OR;
              F_XOR:  dec.alu_op = A_XOR;
              F_NOR:  dec.alu_op = A_NOR;
              F_SLT:  dec.alu_op = A_SLT;
              F_SLTU: dec.alu_op = A_SLTU;
              default: dec.alu_op = A_ADD;
            endcase
          end
          default: ;
        endcase
      end
      OP_REGIMM: begin
        dec.uses_rs = 1'b1;
        case (rt)
          RI_BLTZ:   dec.br_op = B_LTZ;
          RI_BGEZ:   dec.br_op = B_GEZ;
          RI_BLTZAL: begin dec.br_op = B_LTZ; dec.unit = U_LINK; wr = 1'b1; dst = 5'd31; end
          RI_BGEZAL: begin dec.br_op = B_GEZ; dec.unit = U_LINK; wr = 1'b1; dst = 5'd31; end
          default:   dec.uses_rs = 1'b0;
        endcase
      end
      OP_J:    dec.br_op = B_J;
      OP_JAL:  begin dec.br_op = B_J; dec.unit = U_LINK; wr = 1'b1; dst = 5'd31; end
      OP_BEQ:  begin dec.br_op = B_EQ; dec.uses_rs = 1'b1; dec.uses_rt = 1'b1; end
      OP_BNE:  begin dec.br_op = B_NE; dec.uses_rs = 1'b1; dec.uses_rt = 1'b1; end
      OP_BLEZ: begin dec.br_op = B_LEZ; dec.uses_rs = 1'b1; end
      OP_BGTZ: begin dec.br_op = B_GTZ; dec.uses_rs = 1'b1; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        dec.uses_rs = (op != OP_LUI);
        dec.b_imm   = 1'b1;
        wr = 1'b1; dst = rt;
        dec.imm = (op == OP_ANDI || op == OP_ORI || op == OP_XORI) ? zext : sext;
        case (op)
          OP_SLTI:  dec.alu_op = A_SLT;
          OP_SLTIU: dec.alu_op = A_SLTU;
          OP_ANDI:  dec.alu_op = A_AND;
          OP_ORI:   dec.alu_op = A_OR;
          OP_XORI:  dec.alu_op = A_XOR;
          OP_LUI:   begin dec.alu_op = A_LUI; dec.imm = {instr[15:0], 16'd0}; end
          default:  dec.alu_op = A_ADD;
        endcase
      end
      OP_COP0: begin
        if (rs == C0_MF) begin dec.unit = U_COP0; wr = 1'b1; dst = rt; end
        else if (rs == C0_MT) begin dec.cop0_wr = 1'b1; dec.uses_rt = 1'b1; end
      end
      OP_SPECIAL2: begin
        if (fn == F2_MUL) begin
          dec.unit = U_MUL; dec.md_op = M_MUL;
          dec.uses_rs = 1'b1; dec.uses_rt = 1'b1; wr = 1'b1;
        end
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        dec.uses_rs = 1'b1; dec.b_imm = 1'b1; dec.imm = sext;
        dec.mem_rd = 1'b1; wr = 1'b1; dst = rt;
        dec.mem_size = (op[1:0] == 2'b00) ? SZ_B : (op[1:0] == 2'b01) ? SZ_H : SZ_W;
        dec.mem_uns  = op[2];
      end
      OP_SB, OP_SH, OP_SW: begin
        dec.uses_rs = 1'b1; dec.uses_rt = 1'b1; dec.b_imm = 1'b1; dec.imm = sext;
        dec.mem_wr = 1'b1;
        dec.mem_size = (op[1:0] == 2'b00) ? SZ_B : (op[1:0] == 2'b01) ? SZ_H : SZ_W;
      end
      default: ;
    endcase
    dec.wr_en = wr && (dst != 5'd0);
    dec.dest  = dec.wr_en ? dst : 5'd0;
  end
endmodule
