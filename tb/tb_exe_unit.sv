// tb_exe_unit: checks the EXE dispatcher instruction by instruction.
// Each instruction is decoded, presented to the unit and kept until hold
// drops; the result and the number of cycles spent in EXE are compared
// with expected values worked out by hand:
//   ALU and shift results, one cycle; PC+8 link address; HI/LO moves;
//   a 64-bit multiply followed by a move costs one extra cycle with mul_v1
//   set and none with it clear; a 32-bit MUL after a slow MULT waits one
//   cycle; division takes nine cycles; an ALU addition on the critical
//   carry takes two cycles with alu_v1, one without; MTC0/MFC0 of the VLMR.
// A random phase then runs back-to-back multiply/divide/HI-LO sequences
// with mul_v1 switched on and off, against a HI/LO model written here.
module tb_exe_unit;
  import mips_pkg::*;
  import mips_iss_pkg::*;
  logic clk = 0, rst_n = 1;
  logic valid = 0, fire, hold;
  id_ex_t d;
  ex_mem_t q;
  logic [3:0] vlmr;
  logic hold_alu, hold_pcp8, hold_mul, hold_div;
  logic [31:0] instr;
  dec_t dec;
  int checks = 0, failures = 0;

  decoder u_dec (.instr, .dec);
  exe_unit dut (.*);
  always #5 clk = ~clk;
  assign fire = valid && !hold;

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // run one instruction; returns its result and cycles in EXE
  task automatic ex(logic [31:0] ins, logic [31:0] rs, logic [31:0] rt, logic [31:0] pc,
                    output logic [31:0] res, output int cyc);
    @(negedge clk);
    instr = ins; #0;
    #1;
    d = '{pc: pc, dec: dec, rs_val: rs, rt_val: rt};
    valid = 1;
    cyc = 1;
    #1;
    while (hold) begin
      @(negedge clk); #1; cyc++;
    end
    res = q.result;
    @(posedge clk);
    #1 valid = 0;
  endtask
  task automatic expect_ex(logic [31:0] ins, logic [31:0] rs, logic [31:0] rt, logic [31:0] pc,
                           logic [31:0] eres, int ecyc, string what, bit chk_res = 1);
    logic [31:0] r; int c;
    ex(ins, rs, rt, pc, r, c);
    checks++;
    if ((chk_res && r !== eres) || c != ecyc) begin
      failures++;
      $display("FAIL %s: result %h cycles %0d, expected %h in %0d", what, r, c, eres, ecyc);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1;
    checks++; if (vlmr != 4'b1011) begin failures++; $display("FAIL reset VLMR"); end
    expect_ex(enc_r(F_ADDU, 1, 2, 3), 32'd40, 32'd2, 0, 32'd42, 1, "addu");
    expect_ex(enc_r(F_SLL, 0, 2, 3, 8), 0, 32'h0000_00AB, 0, 32'h0000_AB00, 1, "sll");
    expect_ex(enc_j(OP_JAL, 32'h100), 0, 0, 32'h0000_0040, 32'h0000_0048, 1, "jal link");
    // slow multiply (mul_v1 = 1 at reset) then moves
    expect_ex(enc_r(F_MULT, 1, 2, 0), 32'hFFFF_FFFE, 32'd3, 0, 0, 1, "mult", 0);
    expect_ex(enc_r(F_MFLO, 0, 0, 3), 0, 0, 0, 32'hFFFF_FFFA, 2, "mflo after slow mult");
    expect_ex(enc_r(F_MFHI, 0, 0, 3), 0, 0, 0, 32'hFFFF_FFFF, 1, "mfhi");
    expect_ex(enc_r(F_MULTU, 1, 2, 0), 32'hFFFF_FFFF, 32'hFFFF_FFFF, 0, 0, 1, "multu", 0);
    expect_ex(enc_mul(1, 2, 3), 32'd7, 32'd6, 0, 32'd42, 2, "mul after slow multu");
    expect_ex(enc_r(F_MFHI, 0, 0, 3), 0, 0, 0, 32'hFFFF_FFFE, 1, "mfhi of multu");
    // ALU critical carry, alu_v1 = 1
    expect_ex(enc_i(OP_ADDIU, 1, 2, 1), 32'h007F_FFFF, 0, 0, 32'h0080_0000, 2, "critical add slow");
    // clear the mask
    expect_ex(enc_mtc0(2, 16), 0, 32'h0, 0, 0, 1, "mtc0", 0);
    checks++; if (vlmr != 4'b0000) begin failures++; $display("FAIL VLMR not cleared"); end
    expect_ex(enc_mfc0(3, 16), 0, 0, 0, 32'd0, 1, "mfc0");
    expect_ex(enc_i(OP_ADDIU, 1, 2, 1), 32'h007F_FFFF, 0, 0, 32'h0080_0000, 1, "critical add fast");
    expect_ex(enc_r(F_MULT, 1, 2, 0), 32'd100, 32'd5, 0, 0, 1, "fast mult", 0);
    expect_ex(enc_r(F_MFLO, 0, 0, 3), 0, 0, 0, 32'd500, 1, "mflo after fast mult");
    // divider: nine cycles
    expect_ex(enc_r(F_DIV, 1, 2, 0), 32'hFFFF_FF9C, 32'd7, 0, 0, 9, "div latency", 0);
    expect_ex(enc_r(F_MFLO, 0, 0, 3), 0, 0, 0, 32'hFFFF_FFF2, 1, "div quotient");
    expect_ex(enc_r(F_MFHI, 0, 0, 3), 0, 0, 0, 32'hFFFF_FFFE, 1, "div remainder");
    expect_ex(enc_r(F_MTHI, 1, 0, 0), 32'h1234, 0, 0, 0, 1, "mthi", 0);
    expect_ex(enc_r(F_MFHI, 0, 0, 3), 0, 0, 0, 32'h1234, 1, "mfhi after mthi");
    // PC+8 critical path with pcp8_v1
    expect_ex(enc_mtc0(2, 16), 0, 32'h4, 0, 0, 1, "mtc0 pcp8", 0);
    expect_ex(enc_r(F_ADDU, 1, 2, 3), 32'd1, 32'd1, 32'h0000_0010, 32'd2, 1, "addu");
    expect_ex(enc_j(OP_JAL, 32'h100), 0, 0, 32'h007F_FFF8, 32'h0080_0000, 2, "critical link slow");
    random_md(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random back-to-back sequences of multiply, divide, HI/LO moves, MUL,
  // OR fillers and VLMR writes toggling mul_v1. HI/LO are modelled here;
  // the expected cycles in EXE are 9 for a division, plus one for any
  // multiply/divide-class instruction right after a MULT/MULTU issued
  // with mul_v1 set, otherwise 1.
  task automatic random_md(int n);
    logic [31:0] hi, lo, a, b, ins, eres, r;
    logic [63:0] p;
    bit          mulv, slow_prev, is_md, chk, cyc_chk;
    int          k, ecyc, c;
    hi = 32'h1234; lo = 0; mulv = 0; slow_prev = 0;
    // start from a known mask (0000 after the directed part wrote 4)
    ex(enc_mtc0(2, 16), 0, 32'h0, 0, r, c);
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(10);
      a = ($urandom_range(3) == 0) ? 32'(-$urandom_range(9)) : $urandom;
      b = ($urandom_range(5) == 0) ? 32'd0 : (($urandom_range(3) == 0) ? 32'(-$urandom_range(9)) : $urandom);
      chk = 1; is_md = 1; cyc_chk = 1;
      eres = 0;
      case (k)
        0: begin ins = enc_r(F_MULT, 1, 2, 0);  p = 64'($signed(a) * $signed(b)); chk = 0; end
        1: begin ins = enc_r(F_MULTU, 1, 2, 0); p = 64'(a) * 64'(b); chk = 0; end
        2: begin ins = enc_r(F_DIV, 1, 2, 0);   chk = 0; cyc_chk = !slow_prev; end
        3: begin ins = enc_r(F_DIVU, 1, 2, 0);  chk = 0; cyc_chk = !slow_prev; end
        4: begin ins = enc_r(F_MFHI, 0, 0, 3);  eres = hi; end
        5: begin ins = enc_r(F_MFLO, 0, 0, 3);  eres = lo; end
        6: begin ins = enc_r(F_MTHI, 1, 0, 0);  chk = 0; end
        7: begin ins = enc_r(F_MTLO, 1, 0, 0);  chk = 0; end
        8: begin ins = enc_mul(1, 2, 3);        eres = a * b; end
        9: begin ins = enc_r(F_OR, 1, 2, 3);    eres = a | b; is_md = 0; end
        default: begin ins = enc_mtc0(2, 16); b = {28'd0, $urandom_range(1), 3'd0}; chk = 0; is_md = 0; end
      endcase
      ecyc = ((k == 2 || k == 3) ? 9 : 1) + ((is_md && slow_prev) ? 1 : 0);
      ex(ins, a, b, 32'h100, r, c);
      checks++;
      if ((chk && r !== eres) || (cyc_chk && c != ecyc)) begin
        failures++;
        if (failures < 20)
          $display("FAIL random %0d (kind %0d, a=%h b=%h mul_v1=%0d): result %h cycles %0d, expected %h in %0d",
                   i, k, a, b, mulv, r, c, eres, ecyc);
      end
      // model update
      slow_prev = (k == 0 || k == 1) && mulv;
      case (k)
        0, 1: {hi, lo} = p;
        2: if (b == 0) begin lo = a[31] ? 32'd1 : 32'hFFFF_FFFF; hi = a; end
           else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin lo = a; hi = 0; end
           else begin
             lo = 32'(longint'($signed(a)) / longint'($signed(b)));
             hi = 32'(longint'($signed(a)) % longint'($signed(b)));
           end
        3: if (b == 0) begin lo = 32'hFFFF_FFFF; hi = a; end
           else begin lo = a / b; hi = a % b; end
        6: hi = a;
        7: lo = a;
        10: mulv = b[3];
        default: ;
      endcase
    end
    checks++;
    if (vlmr[3] != mulv) begin failures++; $display("FAIL final mul_v1"); end
  endtask
endmodule
