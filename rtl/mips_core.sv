// mips_core: five-stage in-order MIPS pipeline (IF, ID, EXE, MEM, WB) with
// latency-insensitive stage-by-stage interlock and variable-latency units.
//
// Every pipeline register is an li_relay pair (primary + ancillary): a
// stage that cannot hand its instruction on raises stop towards the stage
// before it and sends an invalid token (bubble) forward. Stalls are never
// broadcast; they travel back one register pair per cycle. All stall
// sources are handled by the same protocol:
//   * data dependences: each register has a token in the register file;
//     an instruction that writes a register clears its token when it
//     leaves ID and write-back sets it again. ID joins (li_join) the
//     instruction token with the tokens of its sources and destination,
//     so a read-after-write (and write-after-write) hazard waits in ID.
//     There are no bypass paths.
//   * variable latency: the EXE units (ALU adder, PC+8 adder, multiplier)
//     and the register file's slow half (R16..R31, read by branches) may
//     take one extra cycle, when enabled by the VL Mask Register (COP0
//     register 16); the divider always takes nine cycles.
//   * late memory: dmem_ready low holds a load or store in MEM.
// Branches and jumps are resolved in ID with one delay slot: when a taken
// branch leaves ID, the delay slot is already in IF/ID or being fetched,
// and the PC is loaded with the target. The PC register regenerates its
// own token, so it keeps its value while IF/ID raises stop.
// At reset IF/ID holds a preloaded JAL at BOOT_JAL_PC (when BOOT_PRELOAD is
// set) whose link address PC+8 activates the PC+8 adder's critical path,
// so that a boot self-test can check that adder; its target is address 0
// and its delay slot is fetched from BOOT_JAL_PC+4.
// Interface: combinational instruction and data memory ports, the VLMR
// value, per-cycle event flags and a write-back trace (one entry per
// instruction, in program order, including those that write nothing).
module mips_core
  import mips_pkg::*;
#(
  parameter bit          BOOT_PRELOAD = 1'b1,
  parameter logic [31:0] RESET_PC     = 32'h0000_0000,  // used without preload
  parameter int unsigned DIV_LATENCY  = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_data,
  // data memory
  output logic        dmem_en,
  output logic        dmem_wr,
  output mem_size_e   dmem_size,
  output logic        dmem_uns,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_ready,
  // status
  output logic [3:0]  vlmr,
  output ev_t         ev,
  output logic        wb_valid,
  output logic [31:0] wb_pc,
  output logic        wb_we,
  output logic [4:0]  wb_rd,
  output logic [31:0] wb_data
);
  localparam if_id_t IFID_RST = '{pc: BOOT_JAL_PC, instr: BOOT_JAL_INSTR};

  // ---------------- IF ----------------
  logic [31:0] pc_q;
  logic        ifid_in_stop, ifid_v, ifid_stop;
  if_id_t      ifid_d;
  logic        redirect;
  logic [31:0] br_target;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            pc_q <= BOOT_PRELOAD ? BOOT_JAL_PC + 32'd4 : RESET_PC;
    else if (redirect)     pc_q <= br_target;
    else if (!ifid_in_stop) pc_q <= pc_q + 32'd4;

  assign imem_addr = pc_q;

  li_relay #(.T(if_id_t), .RST_VALID(BOOT_PRELOAD), .RST_DATA(IFID_RST)) u_ifid (
    .clk, .rst_n, .in_valid(1'b1), .in_data('{pc: pc_q, instr: imem_data}),
    .in_stop(ifid_in_stop), .out_valid(ifid_v), .out_data(ifid_d), .out_stop(ifid_stop)
  );

  // ---------------- ID ----------------
  dec_t        dec;
  logic [31:0] tokens, rs_val, rt_val, br_a, br_b;
  logic        regs_ok, is_br_read, br_req, hold_rf, br_taken;
  logic        idex_in_stop, id_valid, id_fire;
  logic [1:0]  join_stop;
  logic        mwb_v;
  mem_wb_t     mwb_d;

  decoder u_dec (.instr(ifid_d.instr), .dec);

  assign regs_ok = (!dec.uses_rs || tokens[ifid_d.instr[25:21]]) &&
                   (!dec.uses_rt || tokens[ifid_d.instr[20:16]]) &&
                   (!dec.wr_en   || tokens[dec.dest]);
  assign is_br_read = (dec.br_op != B_NONE) && (dec.br_op != B_J);
  assign br_req     = ifid_v && regs_ok && is_br_read;

  regfile u_rf (
    .clk, .rst_n,
    .ra(ifid_d.instr[25:21]), .rb(ifid_d.instr[20:16]),
    .a_val(rs_val), .b_val(rt_val), .tokens,
    .inv_en(id_fire && dec.wr_en), .inv_addr(dec.dest),
    .we(mwb_v && mwb_d.wr_en), .waddr(mwb_d.dest), .wdata(mwb_d.data),
    .br_req, .br_uses_a(dec.uses_rs), .br_uses_b(dec.uses_rt),
    .rf_vl(vlmr[VL_RF]), .advance(id_fire), .hold_rf, .br_a, .br_b
  );

  // join of the instruction token with the register tokens
  li_join #(.N(2)) u_join (
    .in_valid({regs_ok && !hold_rf, ifid_v}), .in_stop(join_stop),
    .out_valid(id_valid), .out_stop(idex_in_stop)
  );
  assign ifid_stop = join_stop[0];
  assign id_fire   = id_valid && !idex_in_stop;

  branch_ctrl u_br (
    .op(dec.br_op), .pc(ifid_d.pc), .instr(ifid_d.instr),
    .rs_val(br_a), .rt_val(br_b), .taken(br_taken), .target(br_target)
  );
  assign redirect = id_fire && br_taken;

  // ---------------- EXE ----------------
  logic    idex_v, idex_stop, ex_hold, ex_fire, exmem_in_stop;
  id_ex_t  idex_d;
  ex_mem_t ex_q;
  logic    h_alu, h_pcp8, h_mul, h_div;

  li_relay #(.T(id_ex_t)) u_idex (
    .clk, .rst_n, .in_valid(id_valid),
    .in_data('{pc: ifid_d.pc, dec: dec, rs_val: rs_val, rt_val: rt_val}),
    .in_stop(idex_in_stop), .out_valid(idex_v), .out_data(idex_d), .out_stop(idex_stop)
  );

  exe_unit #(.DIV_LATENCY(DIV_LATENCY)) u_exe (
    .clk, .rst_n, .valid(idex_v), .d(idex_d), .fire(ex_fire), .hold(ex_hold),
    .q(ex_q), .vlmr, .hold_alu(h_alu), .hold_pcp8(h_pcp8), .hold_mul(h_mul),
    .hold_div(h_div)
  );
  assign idex_stop = ex_hold || exmem_in_stop;
  assign ex_fire   = idex_v && !idex_stop;

  // ---------------- MEM ----------------
  logic    exmem_v, exmem_stop, mem_op, mem_hold, memwb_in_stop;
  ex_mem_t exmem_d;

  li_relay #(.T(ex_mem_t)) u_exmem (
    .clk, .rst_n, .in_valid(idex_v && !ex_hold), .in_data(ex_q),
    .in_stop(exmem_in_stop), .out_valid(exmem_v), .out_data(exmem_d), .out_stop(exmem_stop)
  );

  assign mem_op     = exmem_d.mem_rd || exmem_d.mem_wr;
  assign mem_hold   = exmem_v && mem_op && !dmem_ready;
  assign exmem_stop = mem_hold || memwb_in_stop;

  assign dmem_en    = exmem_v && mem_op && !exmem_stop;
  assign dmem_wr    = exmem_d.mem_wr;
  assign dmem_size  = exmem_d.mem_size;
  assign dmem_uns   = exmem_d.mem_uns;
  assign dmem_addr  = exmem_d.result;
  assign dmem_wdata = exmem_d.st_data;

  // ---------------- WB ----------------
  // Write-back never stalls, so MEM/WB never raises stop (memwb_in_stop
  // stays low; the pair is kept for uniformity).
  li_relay #(.T(mem_wb_t)) u_memwb (
    .clk, .rst_n, .in_valid(exmem_v && !mem_hold),
    .in_data('{pc: exmem_d.pc, wr_en: exmem_d.wr_en, dest: exmem_d.dest,
               data: exmem_d.mem_rd ? dmem_rdata : exmem_d.result}),
    .in_stop(memwb_in_stop), .out_valid(mwb_v), .out_data(mwb_d), .out_stop(1'b0)
  );

  assign wb_valid = mwb_v;
  assign wb_pc    = mwb_d.pc;
  assign wb_we    = mwb_v && mwb_d.wr_en;
  assign wb_rd    = mwb_d.dest;
  assign wb_data  = mwb_d.data;

  // ---------------- events ----------------
  always_comb begin
    ev            = '0;
    ev.hold_mul   = h_mul;
    ev.hold_pcp8  = h_pcp8;
    ev.hold_alu   = h_alu;
    ev.hold_rf    = hold_rf;
    ev.hold_div   = h_div;
    ev.data_stall = ifid_v && !regs_ok;
    ev.mem_wait   = mem_hold;
    ev.br_taken   = redirect;
    ev.stop_if    = ifid_in_stop;
    ev.stop_id    = idex_in_stop;
    ev.stop_ex    = exmem_in_stop;
  end
endmodule
