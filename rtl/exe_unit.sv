// exe_unit: the EXE stage dispatcher and its five parallel units.
//
// The decoded instruction in the ID/EXE register selects one unit: the
// ALU, the shifter, the PC+8 link adder, the pipelined multiplier or the
// nine-cycle divider (plus the HI/LO moves and the COP0 moves that reach
// the VL Mask Register). Each unit may ask for more time through a hold
// signal; hold keeps the instruction in EXE (the core then stops ID/EXE
// and sends a bubble forward), which is how variable latency enters the
// latency-insensitive pipeline:
//   hold_alu   ALU add/sub/compare with critical carry, when alu_v1
//   hold_pcp8  link address PC+8 with critical carry, when pcp8_v1
//   hold_mul   HI/LO move or multiply/divide right after a slow 64-bit
//              multiply (mul_v1), for one cycle
//   hold_div   division, until its ninth cycle in EXE
// State (HI, LO, the VLMR, the multiplier pipeline) is updated only when
// the instruction leaves EXE (fire, computed by the core from hold and the
// downstream stop). HI/LO reads see a multiplier result being written in
// the same cycle. The hold on the follower instead of on the multiply
// itself is this design's reading of the dispatcher rule; the cycle cost
// is the same one cycle.
// Pass-through outputs: the pc, destination, store data and memory
// control fields of q are copied from the decoded instruction unchanged
// (EXE only adds the result), so a synthesis report sees them as driven
// straight from inputs; that is intended.
module exe_unit
  import mips_pkg::*;
#(
  parameter int unsigned DIV_LATENCY = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  id_ex_t      d,
  input  logic        fire,
  output logic        hold,
  output ex_mem_t     q,
  output logic [3:0]  vlmr,
  output logic        hold_alu,
  output logic        hold_pcp8,
  output logic        hold_mul,
  output logic        hold_div
);
  logic [31:0] a, b, alu_res, sh_res, link, mul32, lo_val, hi_val, q_div, r_div;
  logic [31:0] hi_q, lo_q, hi_rd, lo_rd, c0_rdata;
  logic        lo_we, hi_we, hi_late, link_cout, link_crit;
  logic        is_md, mult_start, div_valid;

  assign a = d.rs_val;
  assign b = d.dec.b_imm ? d.dec.imm : d.rt_val;

  alu u_alu (
    .clk, .rst_n, .valid(valid && d.dec.unit == U_ALU), .op(d.dec.alu_op),
    .a, .b, .vl_en(vlmr[VL_ALU]), .result(alu_res), .hold(hold_alu)
  );

  shifter u_shift (
    .op(d.dec.shift_op), .d(d.rt_val),
    .amt(d.dec.shift_var ? d.rs_val[4:0] : d.dec.shamt), .q(sh_res)
  );

  vl_adder u_pcp8 (
    .clk, .rst_n, .a(d.pc), .b(32'd8), .cin(1'b0),
    .use_i(valid && d.dec.unit == U_LINK), .vl_en(vlmr[VL_PCP8]),
    .sum(link), .cout(link_cout), .crit(link_crit), .hold(hold_pcp8)
  );

  assign mult_start = fire && (d.dec.md_op == M_MULT || d.dec.md_op == M_MULTU);

  multiplier u_mul (
    .clk, .rst_n, .start(mult_start), .sgn(d.dec.md_op == M_MULT),
    .vl_en(vlmr[VL_MUL]), .a, .b(d.rt_val), .mul32, .lo_we, .lo_val,
    .hi_we, .hi_val, .hi_late
  );

  assign div_valid = valid && d.dec.unit == U_DIV;

  divider #(.LATENCY(DIV_LATENCY)) u_div (
    .clk, .rst_n, .valid(div_valid), .fire, .sgn(d.dec.md_op == M_DIV),
    .a, .b(d.rt_val), .q(q_div), .r(r_div), .hold(hold_div)
  );

  cop0_vlmr u_cop0 (
    .clk, .rst_n, .we(fire && d.dec.cop0_wr), .addr(d.dec.cop0_reg),
    .wdata(d.rt_val), .rdata(c0_rdata), .vlmr
  );

  // any instruction touching HI/LO or the multiplier waits for a slow upper half
  assign is_md    = d.dec.md_op != M_NONE;
  assign hold_mul = valid && is_md && hi_late;
  assign hold     = hold_alu || hold_pcp8 || hold_mul || hold_div;

  assign hi_rd = hi_we ? hi_val : hi_q;
  assign lo_rd = lo_we ? lo_val : lo_q;

  // HI/LO: the instruction leaving EXE is younger than a multiply finishing
  // in the same cycle, so its write wins.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
    end else begin
      if (fire && d.dec.md_op == M_MTHI)                              hi_q <= d.rs_val;
      else if (fire && (d.dec.md_op == M_DIV || d.dec.md_op == M_DIVU)) hi_q <= r_div;
      else if (hi_we)                                                 hi_q <= hi_val;
      if (fire && d.dec.md_op == M_MTLO)                              lo_q <= d.rs_val;
      else if (fire && (d.dec.md_op == M_DIV || d.dec.md_op == M_DIVU)) lo_q <= q_div;
      else if (lo_we)                                                 lo_q <= lo_val;
    end
  end

  always_comb begin
    q          = '0;
    q.pc       = d.pc;
    q.wr_en    = d.dec.wr_en;
    q.dest     = d.dec.dest;
    q.st_data  = d.rt_val;
    q.mem_rd   = d.dec.mem_rd;
    q.mem_wr   = d.dec.mem_wr;
    q.mem_size = d.dec.mem_size;
    q.mem_uns  = d.dec.mem_uns;
    unique case (d.dec.unit)
      U_SHIFT: q.result = sh_res;
      U_LINK:  q.result = link;
      U_MUL:   q.result = mul32;
      U_HILO:  q.result = (d.dec.md_op == M_MFHI) ? hi_rd : lo_rd;
      U_COP0:  q.result = c0_rdata;
      U_DIV:   q.result = '0;
      default: q.result = alu_res;
    endcase
  end
endmodule
