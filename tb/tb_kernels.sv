// tb_kernels: runs four small integer kernels on mips_top at its default
// sizes under each VL Mask Register setting 0000, 1111, 0001, 0010, 0100
// and 1000 (every unit fast, every unit variable, then one unit at a
// time), and counts the extra cycles each variable-latency unit adds.
//
// Kernels, hand-assembled with the mips_iss_pkg helpers into one program
// that first writes the mask with MTC0:
//   - CRC-32 (reflected polynomial 0xEDB88320, bit by bit) over 64 bytes,
//     byte counter in R16 so its loop branch reads a slow register;
//   - naive search counting a 3-byte pattern in 256 bytes of text drawn
//     from a 3-letter alphabet, position counter in R17;
//   - a 24-element dot product with MULT/MFLO back to back, counter R18;
//   - insertion sort of the same 24 signed words, counter R19.
// Checks, for every setting:
//   - every write-back against the reference instruction-set model;
//   - the CRC, the match count, the dot product and the sorted array in
//     data memory against values computed here in SystemVerilog;
//   - no hold of a unit whose mask bit is clear, at least one hold of
//     the multiplier, ALU and register file when their bit is set (the
//     kernels contain no call, so the PC+8 adder never holds);
//   - the run is longer than the 0000 run by at most the number of hold
//     cycles, and by at least one when there were any.
// A table of hold counts and cycles per setting is printed at the end.
module tb_kernels;
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
  int n_mul, n_pcp8, n_alu, n_rf;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_mul  += int'(ev.hold_mul);
      n_pcp8 += int'(ev.hold_pcp8);
      n_alu  += int'(ev.hold_alu);
      n_rf   += int'(ev.hold_rf);
    end
  end

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

  // data layout (byte addresses)
  localparam int TEXT = 32'h400;     // CRC bytes (first 64) and search text
  localparam int PAT  = 32'h5F0;     // 3-byte pattern
  localparam int ARR  = 32'h600;     // 24 signed words, sorted in place
  localparam int VEC  = 32'h680;     // 24 words, second dot-product operand
  localparam int RES  = 32'h7F0;     // CRC, match count, dot product
  localparam int NCRC = 64, NTXT = 256, NARR = 24;

  logic [31:0] dmem_init [ISS_DWORDS];
  logic [31:0] end_pc;

  function automatic logic [7:0] byte_at(int addr);
    logic [31:0] w;
    w = dmem_init[addr >> 2];
    return w[8 * (3 - addr % 4) +: 8];
  endfunction

  function automatic void br(logic [5:0] op, int rs, int rt, int target);
    emit(enc_i(op, rs, rt, target - (plen + 1)));
  endfunction
  function automatic void patch(int at, logic [5:0] op, int rs, int rt, int target);
    place(at, enc_i(op, rs, rt, target - (at + 1)));
  endfunction

  function automatic void build(logic [3:0] mask);
    int l_byte, l_bit, l_skip, b_skip, l_s, b_s1, b_s2, b_s3, l_snext, l_d,
        l_out, l_in, b_in1, b_in2, l_place;
    clear_prog();
    emit(enc_i(OP_ORI, 0, 1, int'(mask)));
    emit(enc_mtc0(1, 16));
    // ---- CRC-32 ----
    emit(enc_i(OP_ORI, 0, 4, TEXT));
    emit(enc_i(OP_ORI, 0, 16, NCRC));
    emit(enc_i(OP_ADDIU, 0, 2, -1));
    li(6, 32'hEDB8_8320);
    l_byte = plen;
    emit(enc_i(OP_LBU, 4, 7, 0));
    emit(enc_i(OP_ADDIU, 4, 4, 1));
    emit(enc_r(F_XOR, 2, 7, 2));
    emit(enc_i(OP_ORI, 0, 8, 8));
    l_bit = plen;
    emit(enc_i(OP_ANDI, 2, 9, 1));
    emit(enc_r(F_SRL, 0, 2, 2, 1));
    b_skip = plen; emit(NOP);
    emit(enc_i(OP_ADDIU, 8, 8, -1));              // delay slot
    emit(enc_r(F_XOR, 2, 6, 2));
    l_skip = plen;
    br(OP_BNE, 8, 0, l_bit);
    emit(NOP);
    emit(enc_i(OP_ADDIU, 16, 16, -1));
    br(OP_BNE, 16, 0, l_byte);
    emit(NOP);
    patch(b_skip, OP_BEQ, 9, 0, l_skip);
    emit(enc_r(F_NOR, 2, 0, 2));
    emit(enc_i(OP_SW, 0, 2, RES));
    // ---- string search ----
    emit(enc_i(OP_ORI, 0, 4, TEXT));
    emit(enc_i(OP_ORI, 0, 17, NTXT - 2));
    emit(enc_r(F_OR, 0, 0, 10));
    emit(enc_i(OP_LBU, 0, 11, PAT));
    emit(enc_i(OP_LBU, 0, 12, PAT + 1));
    emit(enc_i(OP_LBU, 0, 13, PAT + 2));
    l_s = plen;
    emit(enc_i(OP_LBU, 4, 7, 0));
    b_s1 = plen; emit(NOP); emit(NOP);
    emit(enc_i(OP_LBU, 4, 7, 1));
    b_s2 = plen; emit(NOP); emit(NOP);
    emit(enc_i(OP_LBU, 4, 7, 2));
    b_s3 = plen; emit(NOP); emit(NOP);
    emit(enc_i(OP_ADDIU, 10, 10, 1));
    l_snext = plen;
    emit(enc_i(OP_ADDIU, 17, 17, -1));
    br(OP_BNE, 17, 0, l_s);
    emit(enc_i(OP_ADDIU, 4, 4, 1));               // delay slot
    patch(b_s1, OP_BNE, 7, 11, l_snext);
    patch(b_s2, OP_BNE, 7, 12, l_snext);
    patch(b_s3, OP_BNE, 7, 13, l_snext);
    emit(enc_i(OP_SW, 0, 10, RES + 4));
    // ---- dot product ----
    emit(enc_i(OP_ORI, 0, 4, ARR));
    emit(enc_i(OP_ORI, 0, 5, VEC));
    emit(enc_i(OP_ORI, 0, 18, NARR));
    emit(enc_r(F_OR, 0, 0, 10));
    l_d = plen;
    emit(enc_i(OP_LW, 4, 7, 0));
    emit(enc_i(OP_LW, 5, 8, 0));
    emit(enc_r(F_MULT, 7, 8, 0));
    emit(enc_r(F_MFLO, 0, 0, 9));
    emit(enc_r(F_ADDU, 10, 9, 10));
    emit(enc_i(OP_ADDIU, 4, 4, 4));
    emit(enc_i(OP_ADDIU, 18, 18, -1));
    br(OP_BNE, 18, 0, l_d);
    emit(enc_i(OP_ADDIU, 5, 5, 4));               // delay slot
    emit(enc_i(OP_SW, 0, 10, RES + 8));
    // ---- insertion sort ----
    emit(enc_i(OP_ORI, 0, 4, ARR + 4));
    emit(enc_i(OP_ORI, 0, 19, NARR - 1));
    emit(enc_i(OP_ORI, 0, 6, ARR - 4));
    l_out = plen;
    emit(enc_i(OP_LW, 4, 7, 0));
    emit(enc_i(OP_ADDIU, 4, 5, -4));
    l_in = plen;
    b_in1 = plen; emit(NOP); emit(NOP);           // beq r5, r6, place
    emit(enc_i(OP_LW, 5, 8, 0));
    emit(enc_r(F_SLT, 7, 8, 9));
    b_in2 = plen; emit(NOP); emit(NOP);           // beq r9, r0, place
    emit(enc_i(OP_SW, 5, 8, 4));
    br(OP_BEQ, 0, 0, l_in);
    emit(enc_i(OP_ADDIU, 5, 5, -4));              // delay slot
    l_place = plen;
    emit(enc_i(OP_SW, 5, 7, 4));
    emit(enc_i(OP_ADDIU, 19, 19, -1));
    br(OP_BNE, 19, 0, l_out);
    emit(enc_i(OP_ADDIU, 4, 4, 4));               // delay slot
    patch(b_in1, OP_BEQ, 5, 6, l_place);
    patch(b_in2, OP_BEQ, 9, 0, l_place);
    end_pc = 32'(plen * 4);
    emit(enc_i(OP_BEQ, 0, 0, -1));
    emit(NOP);
  endfunction

  function automatic void make_data();
    for (int i = 0; i < ISS_DWORDS; i++) dmem_init[i] = $urandom;
    // search text from a 3-letter alphabet, pattern "aba"
    for (int i = TEXT / 4; i < (TEXT + NTXT) / 4; i++)
      dmem_init[i] = {8'(8'h61 + $urandom_range(2)), 8'(8'h61 + $urandom_range(2)),
                      8'(8'h61 + $urandom_range(2)), 8'(8'h61 + $urandom_range(2))};
    dmem_init[PAT / 4] = 32'h6162_6100;
    // small signed array and vector
    for (int i = 0; i < NARR; i++) begin
      dmem_init[ARR / 4 + i] = 32'($signed($urandom_range(2000)) - 1000);
      dmem_init[VEC / 4 + i] = 32'($signed($urandom_range(200)) - 100);
    end
  endfunction

  // expected results
  logic [31:0] e_crc, e_cnt, e_dot;
  logic signed [31:0] e_arr [NARR];

  function automatic void expected();
    logic [31:0] c, t;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < NCRC; i++) begin
      c ^= {24'd0, byte_at(TEXT + i)};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    e_crc = ~c;
    e_cnt = 0;
    for (int i = 0; i + 2 < NTXT; i++)
      if (byte_at(TEXT + i) == byte_at(PAT) && byte_at(TEXT + i + 1) == byte_at(PAT + 1) &&
          byte_at(TEXT + i + 2) == byte_at(PAT + 2)) e_cnt++;
    e_dot = 0;
    for (int i = 0; i < NARR; i++) e_dot += dmem_init[ARR / 4 + i] * dmem_init[VEC / 4 + i];
    for (int i = 0; i < NARR; i++) e_arr[i] = dmem_init[ARR / 4 + i];
    for (int i = 1; i < NARR; i++)
      for (int j = i; j > 0 && e_arr[j] < e_arr[j-1]; j--) begin
        t = e_arr[j]; e_arr[j] = e_arr[j-1]; e_arr[j-1] = t;
      end
  endfunction

  int cyc_base;

  task automatic run(logic [3:0] mask);
    logic [31:0] epc, eval;
    bit          ewe, done;
    logic [4:0]  erd;
    int          n, m0, p0, a0, r0, holds;
    longint      c0, cyc;

    build(mask);
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < ISS_IWORDS; i++) begin
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_wdata = prog[i];
      iss_imem[i] = prog[i];
      dm_we = 1'b1; dm_addr = 32'(i * 4); dm_wdata = dmem_init[i];
      iss_dmem[i] = dmem_init[i];
      @(negedge clk);
    end
    prog_we = 1'b0; dm_we = 1'b0;
    iss_reset();
    @(negedge clk);
    rst_n = 1'b1;
    m0 = n_mul; p0 = n_pcp8; a0 = n_alu; r0 = n_rf; c0 = cycle;
    done = 0; n = 0;
    while (!done && n < 60000) begin
      @(posedge clk);
      #1;
      n++;
      if (wb_valid) begin
        iss_step(epc, ewe, erd, eval);
        check(wb_pc == epc, $sformatf("pc %h expected %h", wb_pc, epc));
        check(wb_we == ewe && (!ewe || (wb_rd == erd && wb_data == eval)),
              $sformatf("pc %h write r%0d=%h expected r%0d=%h", wb_pc, wb_rd, wb_data, erd, eval));
        if (wb_pc != epc) done = 1;
        if (wb_pc == end_pc) done = 1;
      end
    end
    cyc = cycle - c0;
    check(done, $sformatf("mask %b: program did not finish", mask));
    dm_addr = RES; #1;
    check(dm_rdata == e_crc, $sformatf("mask %b: crc %h expected %h", mask, dm_rdata, e_crc));
    dm_addr = RES + 4; #1;
    check(dm_rdata == e_cnt, $sformatf("mask %b: matches %0d expected %0d", mask, dm_rdata, e_cnt));
    dm_addr = RES + 8; #1;
    check(dm_rdata == e_dot, $sformatf("mask %b: dot %h expected %h", mask, dm_rdata, e_dot));
    for (int i = 0; i < NARR; i++) begin
      dm_addr = 32'(ARR + 4 * i); #1;
      check(dm_rdata == e_arr[i], $sformatf("mask %b: a[%0d]=%0d expected %0d",
                                            mask, i, $signed(dm_rdata), e_arr[i]));
    end
    m0 = n_mul - m0; p0 = n_pcp8 - p0; a0 = n_alu - a0; r0 = n_rf - r0;
    check(mask[3] ? m0 > 0 : m0 == 0, $sformatf("mask %b: %0d multiplier holds", mask, m0));
    check(p0 == 0, $sformatf("mask %b: %0d PC+8 holds", mask, p0));
    check(mask[1] ? a0 > 0 : a0 == 0, $sformatf("mask %b: %0d ALU holds", mask, a0));
    check(mask[0] ? r0 > 0 : r0 == 0, $sformatf("mask %b: %0d RF holds", mask, r0));
    holds = m0 + p0 + a0 + r0;
    if (mask == 4'b0000) cyc_base = int'(cyc);
    else check((holds == 0 ? cyc == cyc_base : cyc > cyc_base) && cyc <= cyc_base + holds,
               $sformatf("mask %b: %0d cycles, base %0d, holds %0d", mask, cyc, cyc_base, holds));
    $display("  VL %b  M/P8/ALU/RF %0d/%0d/%0d/%0d  holds %0d  cycles %0d  overhead %0.2f%%",
             mask, m0, p0, a0, r0, holds, cyc,
             mask == 4'b0000 ? 0.0 : 100.0 * real'(int'(cyc) - cyc_base) / real'(cyc_base));
  endtask

  initial begin
    n_mul = 0; n_pcp8 = 0; n_alu = 0; n_rf = 0;
    make_data();
    expected();
    check(e_cnt > 0, "search text contains no match");
    run(4'b0000);
    run(4'b1111);
    run(4'b0001);
    run(4'b0010);
    run(4'b0100);
    run(4'b1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
