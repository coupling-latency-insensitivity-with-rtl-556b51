// branch_ctrl: branch and jump resolution in the ID stage.
//
// Compares the source registers for BEQ/BNE/BLEZ/BGTZ/BLTZ/BGEZ (and the
// linking forms, decoded to the same comparisons) and computes the target:
// PC+4 plus the shifted sign-extended offset for branches, the 26-bit
// index inside the current 256 MB region for J/JAL, rs for JR/JALR.
// Branches are resolved in decode; the instruction that follows a branch
// (the delay slot) is always executed. Combinational.
module branch_ctrl
  import mips_pkg::*;
(
  input  br_op_e      op,
  input  logic [31:0] pc,        // address of the branch
  input  logic [31:0] instr,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        taken,
  output logic [31:0] target
);
  logic [31:0] pc4;
  assign pc4 = pc + 32'd4;

  always_comb begin
    unique case (op)
      B_EQ:  taken = (rs_val == rt_val);
      B_NE:  taken = (rs_val != rt_val);
      B_LEZ: taken = rs_val[31] || (rs_val == 32'd0);
      B_GTZ: taken = !rs_val[31] && (rs_val != 32'd0);
      B_LTZ: taken = rs_val[31];
      B_GEZ: taken = !rs_val[31];
      B_J, B_JR: taken = 1'b1;
      default: taken = 1'b0;
    endcase
    unique case (op)
      B_J:     target = {pc4[31:28], instr[25:0], 2'b00};
      B_JR:    target = rs_val;
      default: target = pc4 + {{14{instr[15]}}, instr[15:0], 2'b00};
    endcase
  end
endmodule
