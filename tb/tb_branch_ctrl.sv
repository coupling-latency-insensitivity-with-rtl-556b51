// tb_branch_ctrl: checks the branch decision and target of every branch
// type on random register values (with equal, zero and negative cases)
// and random offsets, against an independent model.
module tb_branch_ctrl;
  import mips_pkg::*;
  br_op_e op;
  logic [31:0] pc, instr, rs_val, rt_val, target, et;
  logic taken, ek;
  int checks = 0, failures = 0;
  branch_ctrl dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      op = br_op_e'($urandom_range(8));
      pc = $urandom() & ~32'h3; instr = $urandom();
      rs_val = $urandom(); rt_val = $urandom();
      case ($urandom_range(3))
        0: rt_val = rs_val;
        1: rs_val = 0;
        default: ;
      endcase
      #1;
      case (op)
        B_EQ:  ek = rs_val == rt_val;
        B_NE:  ek = rs_val != rt_val;
        B_LEZ: ek = $signed(rs_val) <= 0;
        B_GTZ: ek = $signed(rs_val) > 0;
        B_LTZ: ek = $signed(rs_val) < 0;
        B_GEZ: ek = $signed(rs_val) >= 0;
        B_J, B_JR: ek = 1;
        default: ek = 0;
      endcase
      if (op == B_J) et = ((pc + 4) & 32'hF000_0000) | (32'(instr[25:0]) << 2);
      else if (op == B_JR) et = rs_val;
      else et = pc + 4 + 32'($signed(instr[15:0]) * 4);
      checks++;
      if (taken !== ek || (op != B_NONE && target !== et)) begin
        failures++; if (failures < 10) $display("FAIL %s taken %0d target %h exp %0d %h", op.name(), taken, target, ek, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
