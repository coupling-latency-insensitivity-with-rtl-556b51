// tb_divider: checks quotient and remainder of signed and unsigned
// division (including division by zero and the most negative number by
// -1) against an independent model, and that an instruction is held for
// exactly nine cycles in total before it can leave, also when the stage
// after it stops it for a few more cycles.
module tb_divider;
  logic clk = 0, rst_n = 1;
  logic valid, fire, sgn, hold;
  logic [31:0] a, b, q, r, eq, er;
  int checks = 0, failures = 0;
  divider dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  task automatic model();
    if (b == 0) begin
      er = a;
      eq = (sgn && a[31]) ? 32'd1 : 32'hFFFF_FFFF;
    end else if (sgn && a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin
      eq = a; er = 0;
    end else if (sgn) begin
      eq = 32'(longint'($signed(a)) / longint'($signed(b)));
      er = 32'(longint'($signed(a)) % longint'($signed(b)));
    end else begin
      eq = a / b; er = a % b;
    end
  endtask
  initial begin
    valid = 0; fire = 0; sgn = 0; a = 0; b = 0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int cyc, extra;
      cyc = 0;
      @(negedge clk);
      a = $urandom(); b = $urandom() >> $urandom_range(31);
      if (i % 97 == 0) b = 0;
      if (i % 89 == 0) begin a = 32'h8000_0000; b = '1; end
      sgn = 1'($urandom_range(1));
      valid = 1;
      extra = (i % 4 == 0) ? 3 : 0;      // downstream stop after completion
      model();
      #1; check(q == eq && r == er, $sformatf("%0d %h/%h = %h r %h, expected %h r %h", sgn, a, b, q, r, eq, er));
      while (hold) begin
        cyc++;
        @(negedge clk); #1;
      end
      cyc++;
      check(cyc == 9, $sformatf("latency %0d", cyc));
      repeat (extra) begin @(negedge clk); #1; check(!hold, "hold after completion"); end
      fire = 1;
      @(negedge clk); fire = 0; valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
