// tb_alu: checks every ALU operation against an independent model on
// random and corner operands, and that hold appears only for adder
// operations with the ALU's variable latency enabled, lasting one cycle.
module tb_alu;
  import mips_pkg::*;
  logic clk = 0, rst_n = 1;
  logic valid, vl_en, hold;
  alu_op_e op;
  logic [31:0] a, b, result;
  int checks = 0, failures = 0, n_hold = 0;
  alu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      A_ADD: return x + y;
      A_SUB: return x - y;
      A_AND: return x & y;
      A_OR:  return x | y;
      A_XOR: return x ^ y;
      A_NOR: return ~(x | y);
      A_SLT: return 32'($signed(x) < $signed(y));
      A_SLTU: return 32'(x < y);
      default: return y;
    endcase
  endfunction
  initial begin
    valid = 1; vl_en = 0; op = A_ADD; a = 0; b = 0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      op = alu_op_e'($urandom_range(8));
      a = $urandom(); b = $urandom();
      if ($urandom_range(3) == 0) b = a + 32'($urandom_range(7)) - 3;
      if ($urandom_range(7) == 0) a = 32'h8000_0000;
      valid = 1'($urandom_range(3) != 0);
      vl_en = 1'($urandom_range(1));
      #1;
      checks++;
      if (result !== model(op, a, b)) begin
        failures++; if (failures < 10) $display("FAIL %s %h %h -> %h", op.name(), a, b, result);
      end
      checks++;
      if (hold && !(vl_en && valid && (op == A_ADD || op == A_SUB || op == A_SLT || op == A_SLTU))) begin
        failures++; $display("FAIL hold for %s", op.name());
      end
      if (hold) begin
        n_hold++;
        @(posedge clk); #1;
        checks++;
        if (hold) begin failures++; $display("FAIL hold lasted two cycles"); end
      end
    end
    // subtraction of concordant numbers of similar size giving a negative result
    @(negedge clk); op = A_SUB; a = 32'h0000_1001; b = 32'h0000_1000; valid = 1; vl_en = 1;
    @(negedge clk); op = A_SUB; a = 32'h0000_1000; b = 32'h0000_1001;
    #1; checks++; if (!hold) begin failures++; $display("FAIL negative difference not held"); end
    checks++; if (n_hold == 0) begin failures++; $display("FAIL no hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
