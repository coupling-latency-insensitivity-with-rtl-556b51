// tb_shifter: compares all three shifts for every amount against the
// built-in shift operators on random data.
module tb_shifter;
  import mips_pkg::*;
  shift_op_e op;
  logic [31:0] d, q, e;
  logic [4:0] amt;
  int checks = 0, failures = 0;
  shifter dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = shift_op_e'($urandom_range(2));
      d = $urandom();
      amt = 5'(i % 32);
      #1;
      e = (op == SH_LL) ? d << amt : (op == SH_RL) ? d >> amt : 32'($signed(d) >>> amt);
      checks++;
      if (q !== e) begin failures++; if (failures < 10) $display("FAIL %s %h by %0d: %h", op.name(), d, amt, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
