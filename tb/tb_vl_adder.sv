// tb_vl_adder: checks the Brent-Kung adder sum and carry against the
// built-in addition for random and corner operands, and the
// variable-latency detector: hold is high exactly when vl_en and use are
// set, the carry out of bit 15 differs from the previous cycle's and
// bits 16..22 all propagate. Holding the same operands for a second cycle
// must clear hold (two-cycle completion).
module tb_vl_adder;
  logic clk = 0, rst_n = 1;
  logic [31:0] a, b, sum;
  logic cin, use_i, vl_en, cout, crit, hold;
  int checks = 0, failures = 0, n_hold = 0;
  bit c15_prev;
  vl_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic bit c15(logic [31:0] x, logic [31:0] y, logic ci);
    logic [16:0] t = {1'b0, x[15:0]} + {1'b0, y[15:0]} + 17'(ci);
    return t[16];
  endfunction
  task automatic step_check();
    logic [32:0] ref_s;
    bit exp_crit;
    #1;
    ref_s = {1'b0, a} + {1'b0, b} + 33'(cin);
    exp_crit = (c15(a, b, cin) != c15_prev) && (((a ^ b) & 32'h007F_0000) == 32'h007F_0000);
    checks += 3;
    if ({cout, sum} !== ref_s) begin failures++; if (failures < 10) $display("FAIL %h+%h+%0d=%h", a, b, cin, sum); end
    if (crit !== exp_crit) begin failures++; if (failures < 10) $display("FAIL crit %h %h", a, b); end
    if (hold !== (exp_crit && vl_en && use_i)) begin failures++; if (failures < 10) $display("FAIL hold"); end
    if (hold) n_hold++;
    @(posedge clk);
    c15_prev = c15(a, b, cin);
    @(negedge clk);
  endtask
  initial begin
    a = 0; b = 0; cin = 0; use_i = 1; vl_en = 1;
    c15_prev = 0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    @(negedge clk);
    // critical case, held for two cycles
    a = 32'h007F_FFFF; b = 32'd1; cin = 0;
    #1; checks++; if (!hold) begin failures++; $display("FAIL critical not held"); end
    step_check();
    #1; checks++; if (hold) begin failures++; $display("FAIL held twice"); end
    step_check();
    for (int i = 0; i < 20000; i++) begin
      int k = $urandom_range(3);
      a = $urandom(); b = $urandom(); cin = 1'($urandom_range(1));
      if (k == 1) b = ~a + 32'($urandom_range(3));          // near-negation: long carries
      if (k == 2) begin a = a | 32'h007F_0000; b = b & 32'hFF80_FFFF; end
      use_i = 1'($urandom_range(1)); vl_en = 1'($urandom_range(1));
      step_check();
    end
    checks++; if (n_hold == 0) begin failures++; $display("FAIL no hold seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
