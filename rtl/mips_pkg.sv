// mips_pkg: shared types and constants of the latency-insensitive MIPS core.
//
// The core implements the integer subset of the MIPS R2000 instruction set
// (no floating point) plus the 32-bit MUL of later MIPS revisions, which the
// multiplier's variable-latency rules refer to. This package holds the
// opcode and function-field encodings, the decoded-instruction struct that
// travels down the pipeline, the payload structs of the four pipeline
// register pairs and the bit positions of the VL Mask Register (VLMR).
// The VLMR bit order (Multiplier, PC+8, ALU, RF from MSB to LSB) follows the
// order of the 4-bit VL configuration code used in the evaluation; the
// remaining encodings are the standard MIPS ones.
package mips_pkg;

  // ---- primary opcodes (instr[31:26]) ----
  localparam logic [5:0] OP_SPECIAL = 6'h00, OP_REGIMM = 6'h01, OP_J = 6'h02,
                         OP_JAL = 6'h03, OP_BEQ = 6'h04, OP_BNE = 6'h05,
                         OP_BLEZ = 6'h06, OP_BGTZ = 6'h07, OP_ADDI = 6'h08,
                         OP_ADDIU = 6'h09, OP_SLTI = 6'h0A, OP_SLTIU = 6'h0B,
                         OP_ANDI = 6'h0C, OP_ORI = 6'h0D, OP_XORI = 6'h0E,
                         OP_LUI = 6'h0F, OP_COP0 = 6'h10, OP_SPECIAL2 = 6'h1C,
                         OP_LB = 6'h20, OP_LH = 6'h21, OP_LW = 6'h23,
                         OP_LBU = 6'h24, OP_LHU = 6'h25, OP_SB = 6'h28,
                         OP_SH = 6'h29, OP_SW = 6'h2B;

  // ---- SPECIAL function codes (instr[5:0]) ----
  localparam logic [5:0] F_SLL = 6'h00, F_SRL = 6'h02, F_SRA = 6'h03,
                         F_SLLV = 6'h04, F_SRLV = 6'h06, F_SRAV = 6'h07,
                         F_JR = 6'h08, F_JALR = 6'h09, F_MFHI = 6'h10,
                         F_MTHI = 6'h11, F_MFLO = 6'h12, F_MTLO = 6'h13,
                         F_MULT = 6'h18, F_MULTU = 6'h19, F_DIV = 6'h1A,
                         F_DIVU = 6'h1B, F_ADD = 6'h20, F_ADDU = 6'h21,
                         F_SUB = 6'h22, F_SUBU = 6'h23, F_AND = 6'h24,
                         F_OR = 6'h25, F_XOR = 6'h26, F_NOR = 6'h27,
                         F_SLT = 6'h2A, F_SLTU = 6'h2B;
  localparam logic [5:0] F2_MUL = 6'h02;               // SPECIAL2 MUL rd,rs,rt
  localparam logic [4:0] RI_BLTZ = 5'h00, RI_BGEZ = 5'h01,
                         RI_BLTZAL = 5'h10, RI_BGEZAL = 5'h11;
  localparam logic [4:0] C0_MF = 5'h00, C0_MT = 5'h04;  // COP0 rs field

  // COP0 register number of the VL Mask Register.
  localparam logic [4:0] VLMR_REG = 5'd16;

  // VLMR bit positions.
  localparam int VL_RF = 0, VL_ALU = 1, VL_PCP8 = 2, VL_MUL = 3;

  // Functional unit chosen by the EXE dispatcher.
  typedef enum logic [2:0] {
    U_ALU, U_SHIFT, U_LINK, U_MUL, U_DIV, U_HILO, U_COP0
  } unit_e;

  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_NOR, A_SLT, A_SLTU, A_LUI
  } alu_op_e;

  typedef enum logic [1:0] { SH_LL, SH_RL, SH_RA } shift_op_e;

  typedef enum logic [3:0] {
    B_NONE, B_EQ, B_NE, B_LEZ, B_GTZ, B_LTZ, B_GEZ, B_J, B_JR
  } br_op_e;

  // Multiply/divide and HI/LO operations.
  typedef enum logic [3:0] {
    M_NONE, M_MULT, M_MULTU, M_MUL, M_DIV, M_DIVU, M_MFHI, M_MFLO, M_MTHI, M_MTLO
  } md_op_e;

  typedef enum logic [1:0] { SZ_B, SZ_H, SZ_W } mem_size_e;

  typedef struct packed {
    unit_e      unit;
    alu_op_e    alu_op;
    shift_op_e  shift_op;
    logic       shift_var;    // shift amount from rs instead of shamt
    md_op_e     md_op;
    br_op_e     br_op;
    logic       uses_rs;
    logic       uses_rt;
    logic       b_imm;        // ALU operand B is the immediate
    logic [31:0] imm;         // extended immediate
    logic [4:0] shamt;
    logic       wr_en;        // writes a general purpose register
    logic [4:0] dest;
    logic       mem_rd;
    logic       mem_wr;
    mem_size_e  mem_size;
    logic       mem_uns;
    logic       cop0_wr;      // MTC0
    logic [4:0] cop0_reg;
  } dec_t;

  // IF/ID payload
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] instr;
  } if_id_t;

  // ID/EXE payload
  typedef struct packed {
    logic [31:0] pc;
    dec_t        dec;
    logic [31:0] rs_val;
    logic [31:0] rt_val;
  } id_ex_t;

  // EXE/MEM payload
  typedef struct packed {
    logic [31:0] pc;
    logic        wr_en;
    logic [4:0]  dest;
    logic [31:0] result;      // ALU result or memory address
    logic [31:0] st_data;
    logic        mem_rd;
    logic        mem_wr;
    mem_size_e   mem_size;
    logic        mem_uns;
  } ex_mem_t;

  // MEM/WB payload
  typedef struct packed {
    logic [31:0] pc;
    logic        wr_en;
    logic [4:0]  dest;
    logic [31:0] data;
  } mem_wb_t;

  // Per-cycle event flags brought out of the core for performance counting.
  typedef struct packed {
    logic hold_mul;      // EXE held by the slow upper half of a multiply
    logic hold_pcp8;     // EXE held by the PC+8 link adder
    logic hold_alu;      // EXE held by the ALU adder
    logic hold_rf;       // ID held by the slow half of the register file
    logic hold_div;      // EXE held by the nine-cycle divider
    logic data_stall;    // ID held because a register token is invalid
    logic mem_wait;      // MEM held by a late data memory access
    logic br_taken;      // taken branch or jump issued from ID
    logic stop_if;       // stop raised by IF/ID towards the PC
    logic stop_id;       // stop raised by ID/EXE towards ID
    logic stop_ex;       // stop raised by EXE/MEM towards EXE
  } ev_t;

  // Boot preload: a JAL placed in IF/ID at reset whose PC+8 stimulates the
  // link adder's critical path (carry out of bit 15 propagating through
  // bits 16..22).
  localparam logic [31:0] BOOT_JAL_PC    = 32'h007F_FFF8;
  localparam logic [31:0] BOOT_JAL_INSTR = {OP_JAL, 26'd0};

endpackage
