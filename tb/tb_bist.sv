// tb_bist: runs a start-up self-test program on mips_top at its default
// sizes and checks that it leaves the VL Mask Register as the program
// decides.
//
// The program, assembled here with the helpers of mips_iss_pkg, follows the
// four-part start-up check the VL mechanism was designed for. It keeps its
// working copy of the mask in R20 (read first with MFC0 $16).
//   1. PC+8: the boot JAL preloaded in IF/ID at reset (pcp8_v1 = 0) has
//      written R31 through the link adder's long path; if R31 is not
//      0x00800000 the pcp8 bit is set, otherwise it stays clear.
//   2. Register file: RF_v1 is cleared, R16 and R17 are cleared, then set
//      to all ones and compared with BEQ. When the comparison is on time
//      the branch lands on an instruction that clears R16. RF_v1 is then
//      set again so that the BEQ-with-zero on R16 that follows is correct
//      either way; if R16 is zero, RF_v1 is cleared for good.
//   3. ALU: alu_v1 is cleared and 0x7FFFFFFF + 1 (carry through every
//      bit) is computed and compared with 0x80000000; a wrong sum sets
//      alu_v1 again.
//   4. Multiplier: mul_v1 is cleared and 0xFFFFFFFF x 0xFFFFFFFF (MULTU)
//      is computed; a wrong upper half sets mul_v1 again.
// Finally the mask is stored to data memory. In RTL simulation every path
// meets its cycle, so the expected end state is VLMR = 0000 with all four
// decisions taken on the fast side. The testbench checks every write-back
// against the reference model, the VLMR value after each MTC0, the final
// mask in a register and in memory, the boot JAL's link value, and that
// the two slow-register branches taken while RF_v1 is set (the R31 check
// under the reset mask and the R16 check) really were held one cycle each
// (hold_rf). Program length is checked against the 70-line budget
// of such a routine.
module tb_bist;
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
  int n_rf = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) n_rf += int'(ev.hold_rf);
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  localparam logic [31:0] RESULT_ADDR = 32'h0000_0800;
  logic [31:0] end_pc;
  int          body_len;

  // branch at word 'at' to word 'to'
  function automatic void patch_br(int at, logic [5:0] op, int rs, int rt, int to);
    place(at, enc_i(op, rs, rt, to - (at + 1)));
  endfunction

  function automatic void build();
    int b_pc8, l_pc8, b_rf1, l_rf_fast, l_rf_cont, b_rf_slow, b_rf2, l_rf_done,
        b_alu, l_alu, b_mul, l_mul;
    clear_prog();
    emit(enc_mfc0(20, 16));                       // r20 = VLMR
    // ---- 1. PC+8 (pcp8_v1 is 0 since reset) ----
    emit(enc_i(OP_LUI, 0, 1, 16'h0080));          // expected link 0x00800000
    b_pc8 = plen; emit(NOP);                      // beq r31, r1, l_pc8
    emit(NOP);
    emit(enc_i(OP_ORI, 20, 20, 4));               // wrong: keep PC+8 slow
    l_pc8 = plen;
    emit(enc_mtc0(20, 16));
    patch_br(b_pc8, OP_BEQ, 31, 1, l_pc8);
    // ---- 2. register file and branches ----
    emit(enc_i(OP_ANDI, 20, 20, 16'hE));          // RF_v1 = 0
    emit(enc_mtc0(20, 16));
    emit(enc_r(F_OR, 0, 0, 16));                  // r16 = 0
    emit(enc_r(F_OR, 0, 0, 17));                  // r17 = 0
    emit(enc_i(OP_ADDIU, 0, 16, -1));             // r16 = all ones
    emit(enc_i(OP_ADDIU, 0, 17, -1));             // r17 = all ones
    b_rf1 = plen; emit(NOP);                      // beq r16, r17, l_rf_fast
    emit(NOP);
    b_rf_slow = plen; emit(NOP);                  // slow: b l_rf_cont
    emit(NOP);
    l_rf_fast = plen;
    emit(enc_r(F_OR, 0, 0, 16));                  // on time: r16 = 0
    l_rf_cont = plen;
    emit(enc_i(OP_ORI, 20, 20, 1));               // RF_v1 = 1 again
    emit(enc_mtc0(20, 16));
    emit(NOP);
    b_rf2 = plen; emit(NOP);                      // beq r16, r0, clear
    emit(NOP);
    l_rf_done = plen + 2;
    emit(enc_j(OP_J, 32'((l_rf_done + 2) * 4)));    // r16 not zero: stay slow
    emit(NOP);
    emit(enc_i(OP_ANDI, 20, 20, 16'hE));          // r16 zero: RF_v1 = 0
    emit(enc_mtc0(20, 16));
    patch_br(b_rf1, OP_BEQ, 16, 17, l_rf_fast);
    patch_br(b_rf_slow, OP_BEQ, 0, 0, l_rf_cont);
    patch_br(b_rf2, OP_BEQ, 16, 0, l_rf_done);
    // ---- 3. ALU adder ----
    emit(enc_i(OP_ANDI, 20, 20, 16'hD));          // alu_v1 = 0
    emit(enc_mtc0(20, 16));
    emit(enc_i(OP_LUI, 0, 2, 16'h7FFF));
    emit(enc_i(OP_ORI, 2, 2, 16'hFFFF));          // r2 = 0x7FFFFFFF
    emit(enc_i(OP_ORI, 0, 3, 1));
    emit(enc_i(OP_LUI, 0, 5, 16'h8000));          // expected sum
    emit(enc_r(F_ADDU, 2, 3, 4));                 // carry through every bit
    b_alu = plen; emit(NOP);                      // beq r4, r5, l_alu
    emit(NOP);
    emit(enc_i(OP_ORI, 20, 20, 2));               // wrong: keep ALU slow
    l_alu = plen;
    emit(enc_mtc0(20, 16));
    patch_br(b_alu, OP_BEQ, 4, 5, l_alu);
    // ---- 4. multiplier ----
    emit(enc_i(OP_ANDI, 20, 20, 16'h7));          // mul_v1 = 0
    emit(enc_mtc0(20, 16));
    emit(enc_i(OP_ADDIU, 0, 6, -1));              // 0xFFFFFFFF
    emit(enc_r(F_MULTU, 6, 6, 0));
    emit(enc_r(F_MFHI, 0, 0, 7));                 // expect 0xFFFFFFFE
    emit(enc_i(OP_ADDIU, 0, 8, -2));
    b_mul = plen; emit(NOP);                      // beq r7, r8, l_mul
    emit(NOP);
    emit(enc_i(OP_ORI, 20, 20, 8));               // wrong: keep MUL slow
    l_mul = plen;
    emit(enc_mtc0(20, 16));
    patch_br(b_mul, OP_BEQ, 7, 8, l_mul);
    // ---- report ----
    emit(enc_mfc0(21, 16));
    emit(enc_i(OP_SW, 0, 21, int'(RESULT_ADDR)));
    body_len = plen;
    end_pc = 32'(plen * 4);
    emit(enc_i(OP_BEQ, 0, 0, -1));
    emit(NOP);
  endfunction

  initial begin
    logic [31:0] epc, eval;
    bit          ewe, done, saw_jal;
    logic [4:0]  erd;
    logic [3:0]  mask_seen [$];
    int          n, rf0;

    build();
    check(body_len <= 70, $sformatf("self-test is %0d words", body_len));
    #1 rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < ISS_IWORDS; i++) begin
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_wdata = prog[i];
      iss_imem[i] = prog[i];
      dm_we = 1'b1; dm_addr = 32'(i * 4); dm_wdata = 32'hDEAD_0000 | 32'(i);
      iss_dmem[i] = dm_wdata;
      @(negedge clk);
    end
    prog_we = 1'b0; dm_we = 1'b0;
    iss_reset();
    @(negedge clk);
    check(vlmr == 4'b1011, $sformatf("reset VLMR %b", vlmr));
    rst_n = 1'b1;
    rf0 = n_rf;
    done = 0; n = 0; saw_jal = 0;
    while (!done && n < 3000) begin
      @(posedge clk);
      #1;
      n++;
      if (wb_valid) begin
        iss_step(epc, ewe, erd, eval);
        check(wb_pc == epc, $sformatf("pc %h expected %h", wb_pc, epc));
        check(wb_we == ewe && (!ewe || (wb_rd == erd && wb_data == eval)),
              $sformatf("pc %h write r%0d=%h expected r%0d=%h", wb_pc, wb_rd, wb_data, erd, eval));
        if (wb_pc == BOOT_JAL_PC) begin
          saw_jal = 1;
          check(wb_we && wb_rd == 5'd31 && wb_data == 32'h0080_0000, "boot JAL link value");
        end
        if (mask_seen.size() == 0 || mask_seen[$] != vlmr) mask_seen.push_back(vlmr);
        if (wb_pc == end_pc) done = 1;
      end
    end
    check(done, "self-test did not finish");
    check(saw_jal, "boot JAL never retired");
    check(vlmr == 4'b0000, $sformatf("final VLMR %b", vlmr));
    // RF_v1 is set for the R31 check (reset value) and for the R16 check
    check(n_rf - rf0 == 2, $sformatf("%0d slow-register branch holds, expected 2", n_rf - rf0));
    // mask history: 1011 -> 1010 (RF off) -> 1011 (RF on again) -> 1010
    // -> 1000 (ALU off) -> 0000 (MUL off)
    check(mask_seen.size() == 6 && mask_seen[0] == 4'b1011 && mask_seen[1] == 4'b1010 &&
          mask_seen[2] == 4'b1011 && mask_seen[3] == 4'b1010 && mask_seen[4] == 4'b1000 &&
          mask_seen[5] == 4'b0000, $sformatf("mask history of %0d values", mask_seen.size()));
    dm_addr = RESULT_ADDR; #1;
    check(dm_rdata == 32'd0, $sformatf("stored mask %h", dm_rdata));
    check(iss_dmem[RESULT_ADDR >> 2] == 32'd0, "reference model mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
