// tb_pipeline_timing: cycle-level test of a short program with typical stalls at the
// design's default sizes.
//
// The instruction segment (a 64-bit MULT followed
// by MFLO, a store, load-use pairs, SLT, a taken BNE with its delay slot)
// runs on mips_top twice: once with the VL Mask Register set to 1000
// (only the multiplier variable-latency) and once with 0000 (all units
// fast), the first two of the configurations the evaluation compares.
// Every write-back is compared with the reference instruction-set model,
// and the distance in cycles between consecutive write-backs of the
// segment is compared with the timing of the latency-insensitive
// protocol as built:
//   - independent instructions retire one cycle apart;
//   - a register read after a write waits for the writer's write-back
//     (token valid again), so the reader retires four cycles after it;
//   - MFLO right after a slow MULT is held one cycle (mask 1000 only);
//   - the taken branch executes its delay slot and skips the next word;
//   - the branch target LW writes the register the delay slot writes, so
//     it waits for that token too (this design's write-after-write rule).
// The counts of multiplier holds, data stalls and taken branches are
// checked as well.
module tb_pipeline_timing;
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
  int n_mul, n_data, n_br, n_alu;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_mul  += int'(ev.hold_mul);
      n_data += int'(ev.data_stall);
      n_br   += int'(ev.br_taken);
      n_alu  += int'(ev.hold_alu);
    end
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

  // segment layout (word addresses)
  localparam int NSEG = 13;        // retired instructions of the segment
  int          seg_word [NSEG];    // word address of each retired entry
  int          gap      [NSEG];    // expected distance from the previous one
  logic [31:0] end_pc;

  function automatic void build(logic [3:0] mask);
    clear_prog();
    emit(enc_i(OP_ORI, 0, 1, int'(mask)));
    emit(enc_mtc0(1, 16));
    emit(enc_i(OP_ORI, 0, 30, 32'h400));
    emit(enc_i(OP_ORI, 0, 2, 7));
    emit(enc_i(OP_ORI, 0, 3, 5));
    emit(enc_i(OP_ADDIU, 0, 5, -5));
    emit(enc_i(OP_SW, 30, 5, 12));
    emit(NOP);
    // segment
    emit(enc_r(F_MULT, 3, 2, 0));         //  8
    emit(enc_r(F_MFLO, 0, 0, 2));         //  9
    emit(enc_i(OP_SW, 30, 2, 8));         // 10
    emit(enc_i(OP_LW, 30, 2, 12));        // 11
    emit(enc_i(OP_ADDIU, 2, 2, 1));       // 12
    emit(enc_i(OP_SW, 30, 2, 0));         // 13
    emit(enc_i(OP_LW, 30, 2, 0));         // 14
    emit(enc_r(F_SLT, 2, 0, 2));          // 15
    emit(enc_r(F_SLT, 4, 0, 4));          // 16
    emit(enc_i(OP_BNE, 2, 0, 2));         // 17  to L1 (word 20)
    emit(enc_i(OP_LW, 30, 3, 12));        // 18  delay slot
    emit(enc_i(OP_ORI, 0, 6, 1));         // 19  skipped
    emit(enc_i(OP_LW, 30, 3, 8));         // 20  L1
    end_pc = 32'(plen * 4);
    emit(enc_i(OP_BEQ, 0, 0, -1));
    emit(NOP);
  endfunction

  task automatic run(logic [3:0] mask);
    logic [31:0] epc, eval;
    bit          ewe, done;
    logic [4:0]  erd;
    longint      ret_cyc [NSEG];
    int          k, n;
    int          m0, d0, b0, a0;

    build(mask);
    seg_word = '{8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 20, 21};
    gap      = '{0, mask[3] ? 2 : 1, 4, 1, 4, 4, 1, 4, 1, 3, 1, 4, 1};
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < ISS_IWORDS; i++) begin
      prog_we = 1'b1; prog_addr = 32'(i * 4); prog_wdata = prog[i];
      iss_imem[i] = prog[i];
      dm_we = 1'b1; dm_addr = 32'(i * 4); dm_wdata = '0;
      iss_dmem[i] = '0;
      @(negedge clk);
    end
    prog_we = 1'b0; dm_we = 1'b0;
    iss_reset();
    @(negedge clk);
    rst_n = 1'b1;
    m0 = n_mul; d0 = n_data; b0 = n_br; a0 = n_alu;
    done = 0; n = 0; k = 0;
    for (int i = 0; i < NSEG; i++) ret_cyc[i] = -1;
    while (!done && n < 2000) begin
      @(posedge clk);
      #1;
      n++;
      if (wb_valid) begin
        iss_step(epc, ewe, erd, eval);
        check(wb_pc == epc, $sformatf("pc %h expected %h", wb_pc, epc));
        check(wb_we == ewe && (!ewe || (wb_rd == erd && wb_data == eval)),
              $sformatf("pc %h write r%0d=%h expected r%0d=%h", wb_pc, wb_rd, wb_data, erd, eval));
        if (k < NSEG && wb_pc == 32'(seg_word[k] * 4)) begin
          ret_cyc[k] = cycle;
          k++;
        end
        if (wb_pc == end_pc) done = 1;
      end
    end
    check(done, "segment did not reach its end");
    check(k == NSEG, $sformatf("only %0d of %0d segment entries retired in order", k, NSEG));
    for (int i = 1; i < NSEG; i++)
      check(ret_cyc[i] - ret_cyc[i-1] == longint'(gap[i]),
            $sformatf("mask %b: word %0d retired %0d cycles after the previous one, expected %0d",
                      mask, seg_word[i], ret_cyc[i] - ret_cyc[i-1], gap[i]));
    check(n_mul - m0 == int'(mask[3]), $sformatf("mask %b: %0d multiplier holds", mask, n_mul - m0));
    check(n_alu == a0, "ALU hold with alu_v1 clear");
    check(n_data - d0 > 0, "no data stall");
    check(n_br - b0 >= 2, "taken branches not seen");   // boot JAL + BNE + final loop
    check(vlmr == mask, "VLMR not written");
    // the store of the MFLO result and the store of the incremented load
    dm_addr = 32'h408; #1;
    check(dm_rdata == 32'd35, $sformatf("mem[0x408]=%0d expected 35", dm_rdata));
    dm_addr = 32'h400; #1;
    check(dm_rdata == 32'hFFFF_FFFC, $sformatf("mem[0x400]=%h expected -4", dm_rdata));
  endtask

  initial begin
    n_mul = 0; n_data = 0; n_br = 0; n_alu = 0;
    run(4'b1000);
    run(4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
