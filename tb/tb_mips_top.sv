// tb_mips_top: end-to-end test of the latency-insensitive MIPS at its
// default sizes (1024-word memories, nine-cycle divider, boot preload).
//
// Each program is loaded into instruction memory (and a data pattern into
// data memory) during reset, then run until the final self-loop reaches
// write-back. Every write-back entry is compared, in order, with a
// reference instruction-set model (mips_iss_pkg): the pc and the register
// written with its value. At the end the data memory region used by the
// program is compared too. Programs:
//   1. a directed program: the multiply/move, load-use and branch
//      situations of a classic stall sequence, ALU, PC+8 and register
//      file critical cases, the divider, shifts, sub-word memory access,
//      JAL/JR/JALR, COP0 moves of the VL Mask Register, and a block of
//      independent instructions whose write-back rate must be one per
//      cycle once the VL mask is cleared;
//   2. random programs (ALU, shifts, loads/stores, multiply/divide, HI/LO
//      and VLMR moves, forward branches and calls with delay slots) with
//      the data memory randomly late.
// Every stall mechanism is counted and must have occurred at least once.
module tb_mips_top;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        prog_we = 1'b0, dm_we = 1'b0, dmem_wait = 1'b0;
  logic [31:0] prog_addr = '0, prog_wdata = '0, dm_addr = '0, dm_wdata = '0, dm_rdata;
  logic [3:0]  vlmr;
  ev_t         ev;
  logic        wb_valid, wb_we;
  logic [31:0] wb_pc, wb_data;
  logic [4:0]  wb_rd;

  mips_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_hold_mul, n_hold_pcp8, n_hold_alu, n_hold_rf, n_hold_div, n_data, n_memw,
      n_br, n_stop_if, n_stop_id, n_stop_ex;
  int wait_pct = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_hold_mul  += int'(ev.hold_mul);
      n_hold_pcp8 += int'(ev.hold_pcp8);
      n_hold_alu  += int'(ev.hold_alu);
      n_hold_rf   += int'(ev.hold_rf);
      n_hold_div  += int'(ev.hold_div);
      n_data      += int'(ev.data_stall);
      n_memw      += int'(ev.mem_wait);
      n_br        += int'(ev.br_taken);
      n_stop_if   += int'(ev.stop_if);
      n_stop_id   += int'(ev.stop_id);
      n_stop_ex   += int'(ev.stop_ex);
    end
  end

  always @(negedge clk) dmem_wait <= ($urandom_range(99) < wait_pct);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- running a program ----------------
  logic [31:0] end_pc;
  logic [31:0] thr_first_pc, thr_last_pc;
  longint      thr_first_cyc, thr_last_cyc;

  task automatic run(int seed_data, int max_cycles);
    logic [31:0] epc, eval;
    bit          ewe;
    logic [4:0]  erd;
    bit          done;
    int          n;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    // load instruction and data memories
    @(negedge clk);
    for (int i = 0; i < ISS_IWORDS; i++) begin
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_wdata = prog[i];
      iss_imem[i] = prog[i];
      dm_we = 1'b1; dm_addr = 32'(i * 4);
      dm_wdata = 32'(i * 32'h9E37_79B9) ^ 32'(seed_data);
      iss_dmem[i] = dm_wdata;
      @(negedge clk);
    end
    prog_we = 1'b0; dm_we = 1'b0;
    iss_reset();
    thr_first_cyc = -1; thr_last_cyc = -1;
    @(negedge clk);
    rst_n = 1'b1;
    done = 0; n = 0;
    while (!done && n < max_cycles) begin
      @(posedge clk);
      #1;
      n++;
      // the write-back register holds the entry retired at this edge's
      // following edge; sample after the edge settles
      if (wb_valid) begin
        iss_step(epc, ewe, erd, eval);
        check(wb_pc == epc, $sformatf("pc %h expected %h", wb_pc, epc));
        check(wb_we == ewe && (!ewe || (wb_rd == erd && wb_data == eval)),
              $sformatf("pc %h write r%0d=%h (%0d) expected r%0d=%h (%0d)",
                        wb_pc, wb_rd, wb_data, wb_we, erd, eval, ewe));
        if (wb_pc == thr_first_pc) thr_first_cyc = cycle;
        if (wb_pc == thr_last_pc)  thr_last_cyc = cycle;
        if (epc == end_pc) done = 1;
        if (wb_pc != epc) done = 1;
      end
    end
    check(done, "program did not reach its end");
    // compare the data memory used by programs (words 256..511)
    for (int i = 256; i < 512; i++) begin
      dm_addr = 32'(i * 4);
      #1;
      check(dm_rdata == iss_dmem[i], $sformatf("dmem[%0d]=%h expected %h", i, dm_rdata, iss_dmem[i]));
    end
  endtask

  // ---------------- directed program ----------------
  task automatic build_directed();
    int loop, f_word, g_word, cont_word;
    clear_prog();
    f_word = 700; g_word = 720; cont_word = 600;
    li(28, 32'h0000_0400);
    emit(enc_i(OP_ORI, 0, 2, 7));
    emit(enc_i(OP_ORI, 0, 3, 5));
    emit(enc_i(OP_ORI, 0, 30, 32'h400));
    // stall sequence: slow multiply followed by a move, store, load-use
    emit(enc_r(F_MULT, 3, 2, 0));
    emit(enc_r(F_MFLO, 0, 0, 2));
    emit(enc_i(OP_SW, 30, 2, 8));
    emit(enc_i(OP_LW, 30, 2, 12));
    emit(enc_i(OP_ADDIU, 2, 2, 1));
    emit(enc_i(OP_SW, 30, 2, 0));
    emit(enc_r(F_SLT, 2, 0, 2));
    emit(enc_i(OP_LW, 30, 2, 0));
    emit(enc_r(F_SLT, 4, 0, 4));
    emit(enc_r(F_MFHI, 0, 0, 5));
    // signed multiply with negative operand, MULTU, MUL after slow MULT
    li(6, 32'hFFFF_FFF3);
    li(7, 32'h1234_5678);
    emit(enc_r(F_MULT, 6, 7, 0));
    emit(enc_r(F_MFHI, 0, 0, 8));
    emit(enc_r(F_MFLO, 0, 0, 9));
    emit(enc_r(F_MULTU, 6, 7, 0));
    emit(enc_mul(6, 7, 10));
    emit(enc_r(F_MFHI, 0, 0, 11));
    emit(enc_r(F_MTHI, 7, 0, 0));
    emit(enc_r(F_MTLO, 6, 0, 0));
    emit(enc_r(F_MFHI, 0, 0, 12));
    emit(enc_r(F_MFLO, 0, 0, 13));
    // ALU adder critical path: carry out of bit 15 through bits 16..22
    li(6, 32'h007F_FFFF);
    emit(enc_i(OP_ADDIU, 6, 7, 1));
    emit(enc_r(F_SUBU, 0, 6, 8));
    li(9, 32'h0000_1000);
    emit(enc_r(F_SUB, 9, 6, 10));
    emit(enc_r(F_SLT, 9, 6, 11));
    emit(enc_r(F_SLTU, 6, 9, 12));
    emit(enc_i(OP_SLTI, 10, 13, -5));
    emit(enc_i(OP_SLTIU, 10, 14, -5));
    // logic and LUI
    emit(enc_r(F_AND, 6, 10, 15));
    emit(enc_r(F_OR, 6, 10, 16));
    emit(enc_r(F_XOR, 6, 10, 17));
    emit(enc_r(F_NOR, 6, 10, 18));
    emit(enc_i(OP_ANDI, 10, 19, 16'hF0F0));
    emit(enc_i(OP_XORI, 10, 20, 16'hFFFF));
    // divider: signed, unsigned, by zero
    li(8, 32'hFFFF_FF9C);          // -100
    emit(enc_i(OP_ORI, 0, 9, 7));
    emit(enc_r(F_DIV, 8, 9, 0));
    emit(enc_r(F_MFLO, 0, 0, 10));
    emit(enc_r(F_MFHI, 0, 0, 11));
    emit(enc_r(F_DIVU, 8, 9, 0));
    emit(enc_r(F_MFLO, 0, 0, 12));
    emit(enc_r(F_MFHI, 0, 0, 13));
    emit(enc_r(F_DIV, 8, 0, 0));
    emit(enc_r(F_MFLO, 0, 0, 14));
    emit(enc_r(F_MFHI, 0, 0, 15));
    // shifts
    li(6, 32'h8765_4321);
    emit(enc_r(F_SLL, 0, 6, 7, 4));
    emit(enc_r(F_SRL, 0, 6, 8, 4));
    emit(enc_r(F_SRA, 0, 6, 9, 31));
    emit(enc_i(OP_ORI, 0, 10, 13));
    emit(enc_r(F_SLLV, 10, 6, 11));
    emit(enc_r(F_SRLV, 10, 6, 12));
    emit(enc_r(F_SRAV, 10, 6, 13));
    // byte and halfword accesses
    li(14, 32'hA1B2_C3D4);
    emit(enc_i(OP_SW, 28, 14, 16));
    emit(enc_i(OP_SB, 28, 6, 17));
    emit(enc_i(OP_SH, 28, 6, 22));
    emit(enc_i(OP_LB, 28, 15, 16));
    emit(enc_i(OP_LBU, 28, 16, 17));
    emit(enc_i(OP_LH, 28, 17, 16));
    emit(enc_i(OP_LHU, 28, 18, 22));
    emit(enc_i(OP_LW, 28, 19, 20));
    emit(enc_i(OP_LB, 28, 20, 19));
    // counted loop on a slow register (R16) with a delay slot
    emit(enc_i(OP_ORI, 0, 16, 5));
    emit(enc_i(OP_ORI, 0, 17, 0));
    loop = plen;
    emit(enc_i(OP_ADDIU, 16, 16, -1));
    emit(enc_i(OP_BNE, 16, 0, boff(loop)));
    emit(enc_i(OP_ADDIU, 17, 17, 1));            // delay slot
    // other conditional branches, taken and not taken
    emit(enc_i(OP_ORI, 0, 3, 3));
    li(4, 32'hFFFF_FFFE);
    emit(enc_i(OP_BGTZ, 3, 0, 2));
    emit(enc_i(OP_ADDIU, 5, 5, 1));
    emit(enc_i(OP_ADDIU, 5, 5, 100));            // skipped
    emit(enc_i(OP_BLEZ, 4, 0, 2));
    emit(enc_i(OP_ADDIU, 5, 5, 2));
    emit(enc_i(OP_ADDIU, 5, 5, 200));            // skipped
    emit(enc_i(OP_BLEZ, 3, 0, 2));               // not taken
    emit(enc_i(OP_ADDIU, 5, 5, 4));
    emit(enc_i(OP_ADDIU, 5, 5, 8));
    emit({OP_REGIMM, 5'd4, RI_BLTZ, 16'd2});
    emit(enc_i(OP_ADDIU, 5, 5, 16));
    emit(enc_i(OP_ADDIU, 5, 5, 300));            // skipped
    emit({OP_REGIMM, 5'd4, RI_BGEZ, 16'd2});     // not taken
    emit(enc_i(OP_ADDIU, 5, 5, 32));
    emit(enc_i(OP_ADDIU, 5, 5, 64));
    emit({OP_REGIMM, 5'd3, RI_BGEZAL, 16'd2});
    emit(enc_i(OP_ADDIU, 5, 5, 1));
    emit(enc_i(OP_ADDIU, 5, 5, 400));            // skipped
    emit({OP_REGIMM, 5'd3, RI_BLTZAL, 16'd2});   // not taken, still links
    emit(enc_i(OP_ADDIU, 5, 5, 1));
    emit(enc_i(OP_BEQ, 20, 20, 2));
    emit(enc_i(OP_ADDIU, 5, 5, 1));
    emit(enc_i(OP_ADDIU, 5, 5, 500));            // skipped
    // calls: JAL/JR and JALR/JR
    emit(enc_j(OP_JAL, 32'(f_word * 4)));
    emit(enc_i(OP_ORI, 0, 6, 11));               // delay slot
    emit(enc_i(OP_ADDIU, 6, 6, 1));
    li(20, 32'(g_word * 4));
    emit(enc_r(F_JALR, 20, 0, 21));
    emit(enc_i(OP_ORI, 0, 7, 13));
    emit(enc_i(OP_ADDIU, 7, 7, 1));
    // VL mask: all units slow, then a JAL at the critical link address
    emit(enc_i(OP_ORI, 0, 12, 4'hF));
    emit(enc_mtc0(12, 16));
    emit(enc_mfc0(13, 16));
    emit(enc_mfc0(14, 3));
    emit(enc_j(OP_J, BOOT_JAL_PC));
    emit(NOP);
    place(1022, enc_j(OP_JAL, 32'(cont_word * 4)));
    place(1023, NOP);
    // subroutines
    place(f_word,     enc_i(OP_ADDIU, 6, 6, 2));
    place(f_word + 1, enc_r(F_JR, 31, 0, 0));
    place(f_word + 2, enc_i(OP_ADDIU, 6, 6, 4));
    place(g_word,     enc_i(OP_ADDIU, 7, 7, 2));
    place(g_word + 1, enc_r(F_JR, 21, 0, 0));
    place(g_word + 2, enc_i(OP_ADDIU, 7, 7, 4));
    // continuation: VL off, independent instructions at full rate
    plen = cont_word;
    emit(enc_mtc0(0, 16));
    emit(enc_i(OP_ADDIU, 31, 22, 0));
    emit(enc_r(F_MULT, 3, 2, 0));
    emit(enc_r(F_MFLO, 0, 0, 23));
    for (int i = 0; i < 20; i++) begin
      if (i == 0)  thr_first_pc = 32'(plen * 4);
      if (i == 19) thr_last_pc  = 32'(plen * 4);
      emit(enc_i(OP_ADDIU, 0, 1 + (i % 15), 1000 + i));
    end
    emit(enc_i(OP_BEQ, 0, 0, -1));
    end_pc = 32'((plen - 1) * 4);
    emit(NOP);
  endtask

  initial begin
    n_hold_mul = 0; n_hold_pcp8 = 0; n_hold_alu = 0; n_hold_rf = 0; n_hold_div = 0;
    n_data = 0; n_memw = 0; n_br = 0; n_stop_if = 0; n_stop_id = 0; n_stop_ex = 0;
    // 1. directed program, memory always ready
    wait_pct = 0;
    build_directed();
    run(32'h1357, 20000);
    check(thr_first_cyc >= 0 && thr_last_cyc - thr_first_cyc == 19,
          $sformatf("20 independent instructions retired over %0d cycles, expected 19",
                    thr_last_cyc - thr_first_cyc));
    check(vlmr == 4'b0000, "VLMR cleared by MTC0");
    // 2. random programs with a late data memory
    for (int p = 0; p < 12; p++) begin
      wait_pct = (p % 3) * 15;
      thr_first_pc = '1; thr_last_pc = '1;
      build_random(300, end_pc);
      run(p * 7919, 40000);
    end
    $display("events: hold_mul=%0d hold_pcp8=%0d hold_alu=%0d hold_rf=%0d hold_div=%0d data_stall=%0d mem_wait=%0d br_taken=%0d stop_if=%0d stop_id=%0d stop_ex=%0d",
             n_hold_mul, n_hold_pcp8, n_hold_alu, n_hold_rf, n_hold_div, n_data, n_memw,
             n_br, n_stop_if, n_stop_id, n_stop_ex);
    check(n_hold_mul > 0,  "multiplier VL stall never happened");
    check(n_hold_pcp8 > 0, "PC+8 VL stall never happened");
    check(n_hold_alu > 0,  "ALU VL stall never happened");
    check(n_hold_rf > 0,   "register file VL stall never happened");
    check(n_hold_div > 0,  "divider stall never happened");
    check(n_data > 0,      "data-dependence stall never happened");
    check(n_memw > 0,      "late memory stall never happened");
    check(n_br > 0,        "taken branch never happened");
    check(n_stop_if > 0,   "IF/ID ancillary register never used");
    check(n_stop_id > 0,   "ID/EXE ancillary register never used");
    check(n_stop_ex > 0,   "EXE/MEM ancillary register never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
