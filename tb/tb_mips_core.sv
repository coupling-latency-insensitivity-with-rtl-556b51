// tb_mips_core: the pipeline without the boot preload (reset PC 0) and with
// a three-cycle divider, against the reference model, plus cycle-exact
// checks of the stall timing. Write-back times of chosen instructions are
// recorded and the distance between consecutive ones is compared with
// what the latency-insensitive protocol gives:
//   independent instructions                 1 cycle apart
//   load then dependent use (no bypass)      4 cycles apart
//   MULT then MFLO, mul_v1 set / clear       2 / 1
//   branch on R16 after an independent op,
//     RF_v1 set / clear                      2 / 1
//   instruction before a DIV, then the DIV   DIV_LATENCY
// Four random programs follow, with the data memory late at random.
module tb_mips_core;
  import mips_pkg::*;
  import mips_iss_pkg::*;
  localparam int DIVL = 3;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic [31:0] imem_addr, imem_data, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_en, dmem_wr, dmem_uns, dmem_ready;
  mem_size_e   dmem_size;
  logic [3:0]  vlmr;
  ev_t         ev;
  logic        wb_valid, wb_we;
  logic [31:0] wb_pc, wb_data;
  logic [4:0]  wb_rd;
  logic        prog_we = 0, dm_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0, dm_addr = 0, dm_wdata = 0, dm_rdata;
  int          wait_pct = 0;

  mips_core #(.BOOT_PRELOAD(1'b0), .DIV_LATENCY(DIVL)) dut (.*);
  imem #(.DEPTH(ISS_IWORDS)) u_im (.clk, .raddr(imem_addr), .rdata(imem_data),
                                   .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata));
  dmem #(.DEPTH(ISS_DWORDS)) u_dm (.clk, .en(dmem_en), .wr(dmem_wr), .size(dmem_size),
                                   .uns(dmem_uns), .addr(dmem_addr), .wdata(dmem_wdata),
                                   .rdata(dmem_rdata), .ext_we(dm_we), .ext_addr(dm_addr),
                                   .ext_wdata(dm_wdata), .ext_rdata(dm_rdata));

  always #5 clk = ~clk;
  always @(negedge clk) dmem_ready <= !($urandom_range(99) < wait_pct);

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint wb_cyc [int];
  logic [31:0] end_pc;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  task automatic run(int seed_data);
    logic [31:0] epc, eval;
    bit ewe, done;
    logic [4:0] erd;
    int n;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < ISS_IWORDS; i++) begin
      prog_we = 1; prog_addr = 32'(i * 4); prog_wdata = prog[i]; iss_imem[i] = prog[i];
      dm_we = 1; dm_addr = 32'(i * 4); dm_wdata = $urandom() ^ 32'(seed_data); iss_dmem[i] = dm_wdata;
      @(negedge clk);
    end
    prog_we = 0; dm_we = 0;
    iss_reset(1'b0);
    wb_cyc.delete();
    @(negedge clk);
    rst_n = 1'b1;
    done = 0; n = 0;
    while (!done && n < 20000) begin
      @(posedge clk); #1; n++;
      if (wb_valid) begin
        iss_step(epc, ewe, erd, eval);
        check(wb_pc == epc, $sformatf("pc %h expected %h", wb_pc, epc));
        check(wb_we == ewe && (!ewe || (wb_rd == erd && wb_data == eval)),
              $sformatf("pc %h r%0d=%h expected r%0d=%h", wb_pc, wb_rd, wb_data, erd, eval));
        if (!wb_cyc.exists(int'(wb_pc))) wb_cyc[int'(wb_pc)] = cycle;
        if (epc == end_pc || wb_pc != epc) done = 1;
      end
    end
    check(done, "program did not finish");
    for (int i = 256; i < 512; i++) begin
      dm_addr = 32'(i * 4); #1;
      check(dm_rdata == iss_dmem[i], $sformatf("dmem[%0d]", i));
    end
  endtask

  int marks [$];       // word index pairs: first, second, expected distance
  task automatic mark_pair(int gap);   // the last two emitted words
    marks.push_back(plen - 2); marks.push_back(plen - 1); marks.push_back(gap);
  endtask
  task automatic pad(int n);
    repeat (n) emit(NOP);
  endtask

  initial begin
    // ---- timing program ----
    clear_prog();
    emit(enc_i(OP_ORI, 0, 30, 32'h400));
    pad(4);
    emit(enc_i(OP_ORI, 0, 4, 3));
    emit(enc_i(OP_ORI, 0, 5, 9));            mark_pair(1);
    emit(enc_i(OP_LW, 30, 2, 12));
    emit(enc_i(OP_ADDIU, 2, 2, 1));          mark_pair(4);
    pad(4);
    emit(enc_r(F_MULT, 4, 5, 0));
    emit(enc_r(F_MFLO, 0, 0, 6));            mark_pair(2);
    emit(enc_mtc0(0, 16));
    pad(4);
    emit(enc_r(F_MULT, 4, 5, 0));
    emit(enc_r(F_MFLO, 0, 0, 7));            mark_pair(1);
    emit(enc_i(OP_ORI, 0, 8, 1));
    emit(enc_i(OP_ORI, 0, 16, 0));
    pad(4);
    emit(enc_mtc0(8, 16));                   // RF_v1 only
    pad(4);
    emit(enc_i(OP_ORI, 0, 9, 1));
    emit(enc_i(OP_BEQ, 16, 0, 1));           mark_pair(2);
    emit(NOP);
    emit(NOP);
    emit(enc_mtc0(0, 16));
    pad(4);
    emit(enc_i(OP_ORI, 0, 9, 2));
    emit(enc_i(OP_BEQ, 16, 0, 1));           mark_pair(1);
    emit(NOP);
    emit(NOP);
    emit(enc_i(OP_ORI, 0, 10, 2));
    emit(enc_r(F_DIVU, 4, 5, 0));            mark_pair(DIVL);
    emit(enc_r(F_MFHI, 0, 0, 11));
    emit(enc_i(OP_BEQ, 0, 0, -1));
    end_pc = 32'((plen - 1) * 4);
    emit(NOP);
    wait_pct = 0;
    run(11);
    for (int i = 0; i < marks.size(); i += 3) begin
      int a, b;
      a = marks[i] * 4;
      b = marks[i + 1] * 4;
      check(wb_cyc.exists(a) && wb_cyc.exists(b) && wb_cyc[b] - wb_cyc[a] == longint'(marks[i + 2]),
            $sformatf("words %0d,%0d: write-back %0d cycles apart, expected %0d",
                      marks[i], marks[i + 1], wb_cyc[b] - wb_cyc[a], marks[i + 2]));
    end
    // ---- random programs ----
    for (int p = 0; p < 4; p++) begin
      wait_pct = p * 10;
      build_random(250, end_pc);
      run(p * 31);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
