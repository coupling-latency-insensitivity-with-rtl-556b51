// mips_iss_pkg: instruction encoders and a reference instruction-set model
// shared by the core-level testbenches. The model executes one instruction per call with
// branch delay slots and reports the register write it expects, so that
// testbenches can compare the core's write-back trace entry by entry.
// It also holds a small program builder (emit, li, branch offsets) and a
// random program generator used by the core-level testbenches.
package mips_iss_pkg;
  import mips_pkg::*;

function automatic logic [31:0] enc_r(logic [5:0] fn, int rs, int rt, int rd, int sh = 0);
  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
endfunction
function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, int imm);
  return {op, 5'(rs), 5'(rt), 16'(imm)};
endfunction
function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] target);
  return {op, target[27:2]};
endfunction
function automatic logic [31:0] enc_mtc0(int rt, int rd);
  return {OP_COP0, C0_MT, 5'(rt), 5'(rd), 11'd0};
endfunction
function automatic logic [31:0] enc_mfc0(int rt, int rd);
  return {OP_COP0, C0_MF, 5'(rt), 5'(rd), 11'd0};
endfunction
function automatic logic [31:0] enc_mul(int rs, int rt, int rd);
  return {OP_SPECIAL2, 5'(rs), 5'(rt), 5'(rd), 5'd0, F2_MUL};
endfunction
localparam logic [31:0] NOP = 32'h0000_0000;

function automatic bit is_branch(logic [31:0] ins);
  logic [5:0] op = ins[31:26];
  if (op == OP_SPECIAL) return ins[5:0] == F_JR || ins[5:0] == F_JALR;
  return op == OP_REGIMM || (op >= OP_J && op <= OP_BGTZ);
endfunction

// ---------------- reference model state ----------------
localparam int ISS_IWORDS = 1024;
localparam int ISS_DWORDS = 1024;
logic [31:0] iss_imem [ISS_IWORDS];
logic [31:0] iss_dmem [ISS_DWORDS];
logic [31:0] iss_r [32];
logic [31:0] iss_hi, iss_lo, iss_pc, iss_npc;
logic [3:0]  iss_vlmr;
bit          iss_boot;       // next instruction is the preloaded boot JAL

task automatic iss_reset(bit boot = 1'b1);
  for (int i = 0; i < 32; i++) iss_r[i] = '0;
  iss_hi = '0; iss_lo = '0; iss_vlmr = 4'b1011;
  iss_boot = boot;
  iss_pc = boot ? BOOT_JAL_PC : 32'd0;
  iss_npc = iss_pc + 4;
endtask

// Execute one instruction. Returns its pc and the register write.
task automatic iss_step(output logic [31:0] pc, output bit we, output logic [4:0] rd,
                        output logic [31:0] val);
  logic [31:0] ins, a, b, addr, w, tgt, nn;
  logic [5:0]  op, fn;
  int rs, rt, rdf;
  bit taken;
  logic [63:0] p;
  pc  = iss_pc;
  ins = iss_boot ? BOOT_JAL_INSTR : iss_imem[(iss_pc >> 2) % ISS_IWORDS];
  iss_boot = 1'b0;
  op = ins[31:26]; fn = ins[5:0];
  rs = ins[25:21]; rt = ins[20:16]; rdf = ins[15:11];
  a = iss_r[rs]; b = iss_r[rt];
  we = 0; rd = 0; val = 0; taken = 0; tgt = 0;
  case (op)
    OP_SPECIAL: case (fn)
      F_SLL:  begin we = 1; rd = 5'(rdf); val = b << ins[10:6]; end
      F_SRL:  begin we = 1; rd = 5'(rdf); val = b >> ins[10:6]; end
      F_SRA:  begin we = 1; rd = 5'(rdf); val = $signed(b) >>> ins[10:6]; end
      F_SLLV: begin we = 1; rd = 5'(rdf); val = b << a[4:0]; end
      F_SRLV: begin we = 1; rd = 5'(rdf); val = b >> a[4:0]; end
      F_SRAV: begin we = 1; rd = 5'(rdf); val = $signed(b) >>> a[4:0]; end
      F_JR:   begin taken = 1; tgt = a; end
      F_JALR: begin taken = 1; tgt = a; we = 1; rd = 5'(rdf); val = pc + 8; end
      F_MFHI: begin we = 1; rd = 5'(rdf); val = iss_hi; end
      F_MFLO: begin we = 1; rd = 5'(rdf); val = iss_lo; end
      F_MTHI: iss_hi = a;
      F_MTLO: iss_lo = a;
      F_MULT: begin p = 64'($signed(a) * $signed(b)); {iss_hi, iss_lo} = p; end
      F_MULTU: begin p = 64'(a) * 64'(b); {iss_hi, iss_lo} = p; end
      F_DIV: begin
        if (b == 0) begin iss_lo = a[31] ? 32'd1 : 32'hFFFF_FFFF; iss_hi = a; end
        else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin iss_lo = a; iss_hi = 0; end
        else begin
          iss_lo = 32'(longint'($signed(a)) / longint'($signed(b)));
          iss_hi = 32'(longint'($signed(a)) % longint'($signed(b)));
        end
      end
      F_DIVU: begin
        if (b == 0) begin iss_lo = 32'hFFFF_FFFF; iss_hi = a; end
        else begin iss_lo = a / b; iss_hi = a % b; end
      end
      F_ADD, F_ADDU: begin we = 1; rd = 5'(rdf); val = a + b; end
      F_SUB, F_SUBU: begin we = 1; rd = 5'(rdf); val = a - b; end
      F_AND:  begin we = 1; rd = 5'(rdf); val = a & b; end
      F_OR:   begin we = 1; rd = 5'(rdf); val = a | b; end
      F_XOR:  begin we = 1; rd = 5'(rdf); val = a ^ b; end
      F_NOR:  begin we = 1; rd = 5'(rdf); val = ~(a | b); end
      F_SLT:  begin we = 1; rd = 5'(rdf); val = 32'($signed(a) < $signed(b)); end
      F_SLTU: begin we = 1; rd = 5'(rdf); val = 32'(a < b); end
      default: ;
    endcase
    OP_REGIMM: begin
      case (rt)
        RI_BLTZ, RI_BLTZAL: taken = a[31];
        RI_BGEZ, RI_BGEZAL: taken = !a[31];
        default: ;
      endcase
      if (rt == RI_BLTZAL || rt == RI_BGEZAL) begin we = 1; rd = 31; val = pc + 8; end
      tgt = pc + 4 + {{14{ins[15]}}, ins[15:0], 2'b00};
    end
    OP_J, OP_JAL: begin
      addr = pc + 4; taken = 1; tgt = {addr[31:28], ins[25:0], 2'b00};
      if (op == OP_JAL) begin we = 1; rd = 31; val = pc + 8; end
    end
    OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ: begin
      case (op)
        OP_BEQ:  taken = a == b;
        OP_BNE:  taken = a != b;
        OP_BLEZ: taken = $signed(a) <= 0;
        default: taken = $signed(a) > 0;
      endcase
      tgt = pc + 4 + {{14{ins[15]}}, ins[15:0], 2'b00};
    end
    OP_ADDI, OP_ADDIU: begin we = 1; rd = 5'(rt); val = a + {{16{ins[15]}}, ins[15:0]}; end
    OP_SLTI:  begin we = 1; rd = 5'(rt); val = 32'($signed(a) < $signed({{16{ins[15]}}, ins[15:0]})); end
    OP_SLTIU: begin we = 1; rd = 5'(rt); val = 32'(a < {{16{ins[15]}}, ins[15:0]}); end
    OP_ANDI:  begin we = 1; rd = 5'(rt); val = a & {16'd0, ins[15:0]}; end
    OP_ORI:   begin we = 1; rd = 5'(rt); val = a | {16'd0, ins[15:0]}; end
    OP_XORI:  begin we = 1; rd = 5'(rt); val = a ^ {16'd0, ins[15:0]}; end
    OP_LUI:   begin we = 1; rd = 5'(rt); val = {ins[15:0], 16'd0}; end
    OP_COP0: begin
      if (rs == C0_MF) begin we = 1; rd = 5'(rt); val = (rdf == 16) ? {28'd0, iss_vlmr} : 0; end
      else if (rs == C0_MT && rdf == 16) iss_vlmr = b[3:0];
    end
    OP_SPECIAL2: if (fn == F2_MUL) begin we = 1; rd = 5'(rdf); val = a * b; end
    OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
      addr = a + {{16{ins[15]}}, ins[15:0]};
      w = iss_dmem[(addr >> 2) % ISS_DWORDS];
      we = 1; rd = 5'(rt);
      case (op)
        OP_LB:  val = {{24{w[31 - 8*addr[1:0]]}}, w[31 - 8*addr[1:0] -: 8]};
        OP_LBU: val = {24'd0, w[31 - 8*addr[1:0] -: 8]};
        OP_LH:  val = addr[1] ? {{16{w[15]}}, w[15:0]} : {{16{w[31]}}, w[31:16]};
        OP_LHU: val = addr[1] ? {16'd0, w[15:0]} : {16'd0, w[31:16]};
        default: val = w;
      endcase
    end
    OP_SB, OP_SH, OP_SW: begin
      addr = a + {{16{ins[15]}}, ins[15:0]};
      w = iss_dmem[(addr >> 2) % ISS_DWORDS];
      case (op)
        OP_SB:  w[31 - 8*addr[1:0] -: 8] = b[7:0];
        OP_SH:  if (addr[1]) w[15:0] = b[15:0]; else w[31:16] = b[15:0];
        default: w = b;
      endcase
      iss_dmem[(addr >> 2) % ISS_DWORDS] = w;
    end
    default: ;
  endcase
  if (we && rd == 0) we = 0;
  if (we) iss_r[rd] = val;
  if (!we) begin rd = 0; val = 0; end
  nn = taken ? tgt : iss_npc + 4;
  iss_pc = iss_npc;
  iss_npc = nn;
endtask

  // ---------------- program construction ----------------
  logic [31:0] prog [ISS_IWORDS];
  int          plen;

  function automatic void emit(logic [31:0] w);
    prog[plen] = w;
    plen++;
  endfunction
  function automatic void place(int word, logic [31:0] w);
    prog[word] = w;
  endfunction
  function automatic int boff(int target_word);   // offset for a branch at plen
    return target_word - (plen + 1);
  endfunction
  function automatic void li(int r, logic [31:0] v);
    emit(enc_i(OP_LUI, 0, r, int'(v[31:16])));
    emit(enc_i(OP_ORI, r, r, int'(v[15:0])));
  endfunction

  function automatic void clear_prog();
    for (int i = 0; i < ISS_IWORDS; i++) prog[i] = NOP;
    plen = 0;
  endfunction

  // ---------------- random programs ----------------
  // Random program: register setup, n_body instructions, final self-loop.
  // Returns the address of the self-loop branch.
  task automatic build_random(int n_body, output logic [31:0] end_pc);
    int r, kind, rs, rt, rd, off, endw;
    clear_prog();
    li(28, 32'h0000_0400);
    for (int i = 1; i < 28; i++) begin
      r = $urandom_range(3);
      if (r == 0)      li(i, $urandom());
      else if (r == 1) li(i, 32'h007F_0000 | 32'($urandom_range(16'hFFFF)));
      else if (r == 2) li(i, 32'hFF80_0000 | 32'($urandom_range(16'hFFFF)));
      else             emit(enc_i(OP_ADDIU, 0, i, $urandom_range(65535)));
    end
    endw = plen + n_body;
    while (plen < endw) begin
      kind = $urandom_range(99);
      rs = $urandom_range(31); rt = $urandom_range(31);
      do rd = $urandom_range(1, 31); while (rd == 28);
      if (kind < 30) begin
        logic [5:0] fns [10] = '{F_ADD, F_ADDU, F_SUB, F_SUBU, F_AND, F_OR, F_XOR, F_NOR, F_SLT, F_SLTU};
        emit(enc_r(fns[$urandom_range(9)], rs, rt, rd));
      end else if (kind < 42) begin
        logic [5:0] ops [7] = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI};
        emit(enc_i(ops[$urandom_range(6)], rs, rd, $urandom_range(65535)));
      end else if (kind < 48) begin
        logic [5:0] fns [6] = '{F_SLL, F_SRL, F_SRA, F_SLLV, F_SRLV, F_SRAV};
        emit(enc_r(fns[$urandom_range(5)], rs, rt, rd, $urandom_range(31)));
      end else if (kind < 58) begin
        logic [5:0] ops [5] = '{OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW};
        int o = $urandom_range(4);
        off = $urandom_range(1023);
        if (ops[o] == OP_LH || ops[o] == OP_LHU) off &= ~1;
        if (ops[o] == OP_LW) off &= ~3;
        emit(enc_i(ops[o], 28, rd, off));
      end else if (kind < 66) begin
        logic [5:0] ops [3] = '{OP_SB, OP_SH, OP_SW};
        int o = $urandom_range(2);
        off = $urandom_range(1023);
        if (ops[o] == OP_SH) off &= ~1;
        if (ops[o] == OP_SW) off &= ~3;
        emit(enc_i(ops[o], 28, rt, off));
      end else if (kind < 72) begin
        logic [5:0] fns [4] = '{F_MULT, F_MULTU, F_DIV, F_DIVU};
        emit(enc_r(fns[$urandom_range(3)], rs, rt, 0));
        if ($urandom_range(1)) emit(enc_r($urandom_range(1) ? F_MFHI : F_MFLO, 0, 0, rd));
        else if ($urandom_range(1)) emit(enc_mul(rs, rt, rd));
      end else if (kind < 77) begin
        int k = $urandom_range(3);
        if (k == 0) emit(enc_r(F_MFHI, 0, 0, rd));
        else if (k == 1) emit(enc_r(F_MFLO, 0, 0, rd));
        else emit(enc_r(k == 2 ? F_MTHI : F_MTLO, rs, 0, 0));
      end else if (kind < 80) begin
        emit(enc_i(OP_ORI, 0, 29, $urandom_range(15)));
        emit(enc_mtc0(29, 16));
        if ($urandom_range(1)) emit(enc_mfc0(rd == 29 ? 1 : rd, 16));
      end else if (kind < 96) begin
        // forward branch with a non-branch delay slot
        int t = $urandom_range(6);
        off = $urandom_range(1, 4);
        if (plen + 2 + off > endw) off = 0;
        case (t)
          0: emit(enc_i(OP_BEQ, rs, rt, off));
          1: emit(enc_i(OP_BNE, rs, rt, off));
          2: emit(enc_i(OP_BLEZ, rs, 0, off));
          3: emit(enc_i(OP_BGTZ, rs, 0, off));
          4: emit({OP_REGIMM, 5'(rs), ($urandom_range(1) ? RI_BLTZ : RI_BGEZ), 16'(off)});
          5: emit({OP_REGIMM, 5'(rs), ($urandom_range(1) ? RI_BLTZAL : RI_BGEZAL), 16'(off)});
          default: emit(enc_j(OP_JAL, 32'((plen + 1 + off) * 4)));
        endcase
        emit(enc_i(OP_ADDIU, rs, rd, $urandom_range(65535)));
      end else begin
        // similar magnitudes subtracted: sign ripples through the adder
        emit(enc_r(F_SUBU, rs, rt, rd));
      end
    end
    emit(enc_i(OP_BEQ, 0, 0, -1));
    end_pc = 32'((plen - 1) * 4);
    emit(NOP);
  endtask

endpackage
