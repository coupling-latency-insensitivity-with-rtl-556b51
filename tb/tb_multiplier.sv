// tb_multiplier: checks the pipelined multiplier.
// For random signed and unsigned operands: LO is written one cycle after
// start with the low product word; HI is written in the same cycle when
// variable latency is off, one cycle later (hi_late high in between) when
// it is on. Back-to-back starts are also checked, and the 32-bit MUL
// output is checked combinationally.
module tb_multiplier;
  logic clk = 0, rst_n = 1;
  logic start, sgn, vl_en, lo_we, hi_we, hi_late;
  logic [31:0] a, b, mul32, lo_val, hi_val;
  int checks = 0, failures = 0;
  multiplier dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    logic [63:0] p;
    start = 0; sgn = 0; vl_en = 0; a = 0; b = 0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      a = $urandom(); b = $urandom();
      if (i % 5 == 0) a = -a;
      sgn = 1'($urandom_range(1)); vl_en = 1'($urandom_range(1));
      start = 1;
      p = sgn ? 64'($signed(a) * $signed(b)) : 64'(a) * 64'(b);
      #1; check(mul32 == a * b, "mul32");
      @(negedge clk); start = 0;
      #1;
      check(lo_we && lo_val == p[31:0], $sformatf("lo %h expected %h", lo_val, p[31:0]));
      if (!vl_en) begin
        check(hi_we && !hi_late && hi_val == p[63:32], $sformatf("hi fast %h expected %h", hi_val, p[63:32]));
      end else begin
        check(!hi_we && hi_late, "hi late flag");
        @(negedge clk); #1;
        check(hi_we && !lo_we && hi_val == p[63:32], $sformatf("hi slow %h expected %h", hi_val, p[63:32]));
      end
    end
    // back to back fast multiplies: one result per cycle
    @(negedge clk); vl_en = 0; sgn = 0; start = 1; a = 3; b = 4;
    @(negedge clk); a = 5; b = 6;
    #1; check(lo_we && lo_val == 12 && hi_val == 0, "first of pair");
    @(negedge clk); start = 0;
    #1; check(lo_we && lo_val == 30, "second of pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
