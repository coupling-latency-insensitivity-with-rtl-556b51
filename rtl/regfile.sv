// regfile: 32 x 32-bit register file with one validity token per register
// and a variable-latency read path towards the branch controller.
//
// Tokens: an instruction that writes a register invalidates that
// register's token when it leaves decode (inv_en); the write-back of the
// result writes the register and makes its token valid again (we). R0 is
// always zero and always valid. Decode joins the instruction's token with
// the tokens of the registers it uses, which stalls any read-after-write
// dependence without bypass paths.
//
// Variable latency (RF_v1, input rf_vl): the read path of R16..R31 towards
// the branch controller may take two cycles. When a branch or register
// jump that is otherwise ready to issue (br_req) names a source in
// R16..R31 and rf_vl is set, hold_rf is raised for one cycle; the source
// values are captured in registers (srcA/srcB late copies) and in the
// next cycle the branch controller is fed from them instead of the early
// read. Sources in R0..R15 are always fed early. The late flag clears when
// decode issues (advance). Values towards EXE are the direct read.
// Reads are combinational; writes happen on the rising edge. tokens[0]
// is constant one (R0 is never written).
// Per-register tokens, the R16..R31 slow half, the early/late operand
// selection and the registered hold follow the original design; resetting
// all registers to zero is this design's choice.
module regfile (
  input  logic        clk,
  input  logic        rst_n,
  // reads
  input  logic [4:0]  ra,
  input  logic [4:0]  rb,
  output logic [31:0] a_val,
  output logic [31:0] b_val,
  output logic [31:0] tokens,
  // token invalidation at issue
  input  logic        inv_en,
  input  logic [4:0]  inv_addr,
  // write-back
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  // variable-latency branch read
  input  logic        br_req,
  input  logic        br_uses_a,
  input  logic        br_uses_b,
  input  logic        rf_vl,
  input  logic        advance,
  output logic        hold_rf,
  output logic [31:0] br_a,
  output logic [31:0] br_b
);
  logic [31:0] regs [32];
  logic [31:0] tok_q;
  logic [31:0] a_late, b_late;
  logic        late_q;
  logic        no_src_early;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q <= '1;
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      if (we && waddr != 5'd0) begin
        regs[waddr]  <= wdata;
        tok_q[waddr] <= 1'b1;
      end
      if (inv_en && inv_addr != 5'd0) tok_q[inv_addr] <= 1'b0;
    end
  end

  assign a_val  = regs[ra];
  assign b_val  = regs[rb];
  assign tokens = {tok_q[31:1], 1'b1};

  // a source in the slow half R16..R31
  assign no_src_early = (br_uses_a && ra[4]) || (br_uses_b && rb[4]);
  assign hold_rf = rf_vl && br_req && no_src_early && !late_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      late_q <= 1'b0;
      a_late <= '0;
      b_late <= '0;
    end else begin
      a_late <= a_val;
      b_late <= b_val;
      if (advance)      late_q <= 1'b0;
      else if (hold_rf) late_q <= 1'b1;
    end
  end

  assign br_a = late_q ? a_late : a_val;
  assign br_b = late_q ? b_late : b_val;

  // Write-back only ever targets a register whose token is invalid.
  a_wb_token: assert property (@(posedge clk) disable iff (!rst_n)
                               (we && waddr != 0) |-> !tok_q[waddr]);
endmodule
