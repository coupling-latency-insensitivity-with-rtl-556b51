// alu: arithmetic and logic unit of the EXE stage.
//
// Add, subtract, set-less-than (signed and unsigned), the four logic
// operations and LUI pass-through. Addition and subtraction (a + ~b + 1)
// share one vl_adder, whose critical-path detector raises hold when the
// ALU's variable latency is enabled (alu_v1) and the operation uses the
// adder; the same operands then complete in the next cycle. Signed
// overflow is not trapped (ADD behaves as ADDU), a choice of this design.
// Interface: valid qualifies the operation for the detector; result is
// combinational.
module alu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        vl_en,
  output logic [31:0] result,
  output logic        hold
);
  logic        sub, use_add, cout, crit;
  logic [31:0] sum;

  assign sub     = (op == A_SUB) || (op == A_SLT) || (op == A_SLTU);
  assign use_add = valid && (sub || op == A_ADD);

  vl_adder u_add (
    .clk, .rst_n, .a, .b(sub ? ~b : b), .cin(sub), .use_i(use_add),
    .vl_en, .sum, .cout, .crit, .hold
  );

  always_comb begin
    unique case (op)
      A_ADD, A_SUB: result = sum;
      A_AND:  result = a & b;
      A_OR:   result = a | b;
      A_XOR:  result = a ^ b;
      A_NOR:  result = ~(a | b);
      A_SLT:  result = {31'd0, (a[31] != b[31]) ? a[31] : sum[31]};
      A_SLTU: result = {31'd0, !cout};
      A_LUI:  result = b;
      default: result = sum;
    endcase
  end
endmodule
