// tb_decoder: decodes one instruction of every supported kind and checks
// the control fields against hand-written expectations (unit, operation,
// sources used, destination, immediate, memory and branch fields), plus
// an unsupported instruction decoding as a no-operation. A random phase
// then decodes every supported kind with random fields against a table of
// expected unit, sources, destination, immediate, branch and memory fields.
module tb_decoder;
  import mips_pkg::*;
  logic [31:0] instr;
  dec_t dec;
  int checks = 0, failures = 0;
  decoder dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic t(logic [31:0] ins, unit_e u, bit urs, bit urt, bit wr, int dst, string what);
    instr = ins; #1;
    checks++;
    if (dec.unit != u || dec.uses_rs != urs || dec.uses_rt != urt || dec.wr_en != wr || (wr && dec.dest != 5'(dst))) begin
      failures++;
      $display("FAIL %s: unit %s rs %0d rt %0d wr %0d dest %0d", what, dec.unit.name(), dec.uses_rs, dec.uses_rt, dec.wr_en, dec.dest);
    end
  endtask
  task automatic f(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // Random phase: a supported instruction kind with random register,
  // immediate and shift fields. The expected unit, sources, destination,
  // immediate, branch kind and memory fields come from the table below.
  typedef struct {
    logic [5:0] op; logic [5:0] fn; logic [4:0] ri;  // fn for SPECIAL, ri for REGIMM
    unit_e u; bit urs, urt;
    int    dk;           // destination: 0 none, 1 rd, 2 rt, 3 r31
    int    ik;           // immediate: 0 none, 1 sign, 2 zero, 3 upper
    br_op_e br; bit mr, mw; mem_size_e sz; bit uns;
  } kind_t;
  kind_t K [$];
  function automatic void k(logic [5:0] op, logic [5:0] fn, logic [4:0] ri, unit_e u, bit urs, bit urt,
                            int dk, int ik, br_op_e br = B_NONE, bit mr = 0, bit mw = 0,
                            mem_size_e sz = SZ_W, bit uns = 0);
    K.push_back('{op, fn, ri, u, urs, urt, dk, ik, br, mr, mw, sz, uns});
  endfunction
  task automatic random_phase(int n);
    kind_t e;
    logic [31:0] ins, eimm;
    logic [4:0]  rs, rt, rd, edst;
    bit          ewr, ok;
    k(OP_SPECIAL, F_ADD, 0, U_ALU, 1, 1, 1, 0);   k(OP_SPECIAL, F_ADDU, 0, U_ALU, 1, 1, 1, 0);
    k(OP_SPECIAL, F_SUB, 0, U_ALU, 1, 1, 1, 0);   k(OP_SPECIAL, F_SUBU, 0, U_ALU, 1, 1, 1, 0);
    k(OP_SPECIAL, F_AND, 0, U_ALU, 1, 1, 1, 0);   k(OP_SPECIAL, F_OR, 0, U_ALU, 1, 1, 1, 0);
    k(OP_SPECIAL, F_XOR, 0, U_ALU, 1, 1, 1, 0);   k(OP_SPECIAL, F_NOR, 0, U_ALU, 1, 1, 1, 0);
    k(OP_SPECIAL, F_SLT, 0, U_ALU, 1, 1, 1, 0);   k(OP_SPECIAL, F_SLTU, 0, U_ALU, 1, 1, 1, 0);
    k(OP_SPECIAL, F_SLL, 0, U_SHIFT, 0, 1, 1, 0); k(OP_SPECIAL, F_SRL, 0, U_SHIFT, 0, 1, 1, 0);
    k(OP_SPECIAL, F_SRA, 0, U_SHIFT, 0, 1, 1, 0); k(OP_SPECIAL, F_SLLV, 0, U_SHIFT, 1, 1, 1, 0);
    k(OP_SPECIAL, F_SRLV, 0, U_SHIFT, 1, 1, 1, 0); k(OP_SPECIAL, F_SRAV, 0, U_SHIFT, 1, 1, 1, 0);
    k(OP_SPECIAL, F_JR, 0, U_ALU, 1, 0, 0, 0, B_JR);
    k(OP_SPECIAL, F_JALR, 0, U_LINK, 1, 0, 1, 0, B_JR);
    k(OP_SPECIAL, F_MFHI, 0, U_HILO, 0, 0, 1, 0); k(OP_SPECIAL, F_MFLO, 0, U_HILO, 0, 0, 1, 0);
    k(OP_SPECIAL, F_MTHI, 0, U_HILO, 1, 0, 0, 0); k(OP_SPECIAL, F_MTLO, 0, U_HILO, 1, 0, 0, 0);
    k(OP_SPECIAL, F_MULT, 0, U_MUL, 1, 1, 0, 0);  k(OP_SPECIAL, F_MULTU, 0, U_MUL, 1, 1, 0, 0);
    k(OP_SPECIAL, F_DIV, 0, U_DIV, 1, 1, 0, 0);   k(OP_SPECIAL, F_DIVU, 0, U_DIV, 1, 1, 0, 0);
    k(OP_SPECIAL2, F2_MUL, 0, U_MUL, 1, 1, 1, 0);
    k(OP_REGIMM, 0, RI_BLTZ, U_ALU, 1, 0, 0, 0, B_LTZ);  k(OP_REGIMM, 0, RI_BGEZ, U_ALU, 1, 0, 0, 0, B_GEZ);
    k(OP_REGIMM, 0, RI_BLTZAL, U_LINK, 1, 0, 3, 0, B_LTZ); k(OP_REGIMM, 0, RI_BGEZAL, U_LINK, 1, 0, 3, 0, B_GEZ);
    k(OP_J, 0, 0, U_ALU, 0, 0, 0, 0, B_J);        k(OP_JAL, 0, 0, U_LINK, 0, 0, 3, 0, B_J);
    k(OP_BEQ, 0, 0, U_ALU, 1, 1, 0, 0, B_EQ);     k(OP_BNE, 0, 0, U_ALU, 1, 1, 0, 0, B_NE);
    k(OP_BLEZ, 0, 0, U_ALU, 1, 0, 0, 0, B_LEZ);   k(OP_BGTZ, 0, 0, U_ALU, 1, 0, 0, 0, B_GTZ);
    k(OP_ADDI, 0, 0, U_ALU, 1, 0, 2, 1);  k(OP_ADDIU, 0, 0, U_ALU, 1, 0, 2, 1);
    k(OP_SLTI, 0, 0, U_ALU, 1, 0, 2, 1);  k(OP_SLTIU, 0, 0, U_ALU, 1, 0, 2, 1);
    k(OP_ANDI, 0, 0, U_ALU, 1, 0, 2, 2);  k(OP_ORI, 0, 0, U_ALU, 1, 0, 2, 2);
    k(OP_XORI, 0, 0, U_ALU, 1, 0, 2, 2);  k(OP_LUI, 0, 0, U_ALU, 0, 0, 2, 3);
    k(OP_LB, 0, 0, U_ALU, 1, 0, 2, 1, B_NONE, 1, 0, SZ_B, 0);
    k(OP_LH, 0, 0, U_ALU, 1, 0, 2, 1, B_NONE, 1, 0, SZ_H, 0);
    k(OP_LW, 0, 0, U_ALU, 1, 0, 2, 1, B_NONE, 1, 0, SZ_W, 0);
    k(OP_LBU, 0, 0, U_ALU, 1, 0, 2, 1, B_NONE, 1, 0, SZ_B, 1);
    k(OP_LHU, 0, 0, U_ALU, 1, 0, 2, 1, B_NONE, 1, 0, SZ_H, 1);
    k(OP_SB, 0, 0, U_ALU, 1, 1, 0, 1, B_NONE, 0, 1, SZ_B, 0);
    k(OP_SH, 0, 0, U_ALU, 1, 1, 0, 1, B_NONE, 0, 1, SZ_H, 0);
    k(OP_SW, 0, 0, U_ALU, 1, 1, 0, 1, B_NONE, 0, 1, SZ_W, 0);
    for (int i = 0; i < n; i++) begin
      e = K[$urandom_range(K.size() - 1)];
      ins = $urandom;
      ins[31:26] = e.op;
      if (e.op == OP_SPECIAL || e.op == OP_SPECIAL2) begin
        ins[5:0] = e.fn;
        if (e.fn inside {F_SLL, F_SRL, F_SRA} && e.op == OP_SPECIAL) ins[25:21] = 0;
        else ins[10:6] = 0;
      end
      if (e.op == OP_REGIMM) ins[20:16] = e.ri;
      if (e.op == OP_LUI) ins[25:21] = 0;
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      case (e.dk)
        1: edst = rd;
        2: edst = rt;
        3: edst = 5'd31;
        default: edst = 0;
      endcase
      ewr = e.dk != 0 && edst != 0;
      case (e.ik)
        1: eimm = {{16{ins[15]}}, ins[15:0]};
        2: eimm = {16'd0, ins[15:0]};
        3: eimm = {ins[15:0], 16'd0};
        default: eimm = 'x;
      endcase
      instr = ins; #1;
      ok = dec.unit == e.u && dec.uses_rs == e.urs && dec.uses_rt == e.urt &&
           dec.wr_en == ewr && (!ewr || dec.dest == edst) && dec.br_op == e.br &&
           dec.mem_rd == e.mr && dec.mem_wr == e.mw &&
           (!(e.mr || e.mw) || (dec.mem_size == e.sz && dec.mem_uns == e.uns)) &&
           (e.ik == 0 || (dec.imm == eimm && (e.ik == 3 || dec.b_imm)));
      if (e.op == OP_SPECIAL && e.fn inside {F_SLL, F_SRL, F_SRA})
        ok = ok && dec.shamt == ins[10:6] && !dec.shift_var;
      if (e.u == U_SHIFT)
        ok = ok && dec.shift_op == ((e.fn inside {F_SLL, F_SLLV}) ? SH_LL :
                                    (e.fn inside {F_SRL, F_SRLV}) ? SH_RL : SH_RA);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 20) $display("FAIL random decode of %h", ins);
      end
    end
  endtask

  initial begin
    // rs=1 rt=2 rd=3 shamt=4
    t(32'h0022_1820, U_ALU, 1, 1, 1, 3, "add");            f(dec.alu_op == A_ADD && !dec.b_imm, "add op");
    t(32'h0022_1823, U_ALU, 1, 1, 1, 3, "subu");           f(dec.alu_op == A_SUB, "subu op");
    t(32'h0022_182A, U_ALU, 1, 1, 1, 3, "slt");            f(dec.alu_op == A_SLT, "slt op");
    t(32'h0022_1827, U_ALU, 1, 1, 1, 3, "nor");            f(dec.alu_op == A_NOR, "nor op");
    t(32'h0002_1903, U_SHIFT, 0, 1, 1, 3, "sra");          f(dec.shift_op == SH_RA && dec.shamt == 4 && !dec.shift_var, "sra fields");
    t(32'h0022_1804, U_SHIFT, 1, 1, 1, 3, "sllv");         f(dec.shift_op == SH_LL && dec.shift_var, "sllv fields");
    t(32'h0022_1806, U_SHIFT, 1, 1, 1, 3, "srlv");         f(dec.shift_op == SH_RL, "srlv fields");
    t(32'h0020_0008, U_ALU, 1, 0, 0, 0, "jr");             f(dec.br_op == B_JR, "jr br");
    t(32'h0020_1809, U_LINK, 1, 0, 1, 3, "jalr");          f(dec.br_op == B_JR, "jalr br");
    t(32'h0000_1810, U_HILO, 0, 0, 1, 3, "mfhi");          f(dec.md_op == M_MFHI, "mfhi op");
    t(32'h0020_0013, U_HILO, 1, 0, 0, 0, "mtlo");          f(dec.md_op == M_MTLO, "mtlo op");
    t(32'h0022_0018, U_MUL, 1, 1, 0, 0, "mult");           f(dec.md_op == M_MULT, "mult op");
    t(32'h0022_0019, U_MUL, 1, 1, 0, 0, "multu");          f(dec.md_op == M_MULTU, "multu op");
    t(32'h0022_001A, U_DIV, 1, 1, 0, 0, "div");            f(dec.md_op == M_DIV, "div op");
    t(32'h7022_1802, U_MUL, 1, 1, 1, 3, "mul");            f(dec.md_op == M_MUL, "mul op");
    t(32'h2422_FFFE, U_ALU, 1, 0, 1, 2, "addiu");          f(dec.b_imm && dec.imm == 32'hFFFF_FFFE, "addiu imm");
    t(32'h3422_FFFE, U_ALU, 1, 0, 1, 2, "ori");            f(dec.alu_op == A_OR && dec.imm == 32'h0000_FFFE, "ori imm");
    t(32'h2C22_8000, U_ALU, 1, 0, 1, 2, "sltiu");          f(dec.alu_op == A_SLTU && dec.imm == 32'hFFFF_8000, "sltiu imm");
    t(32'h3C02_1234, U_ALU, 0, 0, 1, 2, "lui");            f(dec.alu_op == A_LUI && dec.imm == 32'h1234_0000, "lui imm");
    t(32'h8C22_0010, U_ALU, 1, 0, 1, 2, "lw");             f(dec.mem_rd && dec.mem_size == SZ_W && dec.imm == 16, "lw fields");
    t(32'h9422_0010, U_ALU, 1, 0, 1, 2, "lhu");            f(dec.mem_rd && dec.mem_size == SZ_H && dec.mem_uns, "lhu fields");
    t(32'h8022_0010, U_ALU, 1, 0, 1, 2, "lb");             f(dec.mem_size == SZ_B && !dec.mem_uns, "lb fields");
    t(32'hA022_FFF0, U_ALU, 1, 1, 0, 0, "sb");             f(dec.mem_wr && !dec.mem_rd && dec.mem_size == SZ_B && dec.imm == 32'hFFFF_FFF0, "sb fields");
    t(32'h1022_0003, U_ALU, 1, 1, 0, 0, "beq");            f(dec.br_op == B_EQ, "beq br");
    t(32'h1C20_0003, U_ALU, 1, 0, 0, 0, "bgtz");           f(dec.br_op == B_GTZ, "bgtz br");
    t(32'h0431_0003, U_LINK, 1, 0, 1, 31, "bgezal");       f(dec.br_op == B_GEZ, "bgezal br");
    t(32'h0420_0003, U_ALU, 1, 0, 0, 0, "bltz");           f(dec.br_op == B_LTZ, "bltz br");
    t(32'h0C00_0100, U_LINK, 0, 0, 1, 31, "jal");          f(dec.br_op == B_J, "jal br");
    t(32'h0800_0100, U_ALU, 0, 0, 0, 0, "j");              f(dec.br_op == B_J, "j br");
    t(32'h4002_8000, U_COP0, 0, 0, 1, 2, "mfc0");          f(dec.cop0_reg == 16, "mfc0 reg");
    t(32'h4082_8000, U_ALU, 0, 1, 0, 0, "mtc0");           f(dec.cop0_wr && dec.cop0_reg == 16, "mtc0 fields");
    t(32'h2400_0005, U_ALU, 1, 0, 0, 0, "addiu to r0");
    t(32'h0000_000C, U_ALU, 0, 0, 0, 0, "syscall as nop"); f(!dec.mem_wr && !dec.cop0_wr && dec.br_op == B_NONE, "syscall nop");
    random_phase(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
