// tb_regfile: checks the register file with tokens.
// Random sequences invalidate tokens (issue) and later write the register
// back (write-back), with reads on both ports compared against a model of
// values and tokens; R0 stays zero and valid. The variable-latency branch
// read is checked: with RF_v1 set, a branch source in R16..R31 raises
// hold_rf for exactly one cycle and the branch then sees the registered
// copy; sources in R0..R15, or RF_v1 clear, never hold.
module tb_regfile;
  logic clk = 0, rst_n = 1;
  logic [4:0] ra = 0, rb = 0, inv_addr = 0, waddr = 0;
  logic [31:0] a_val, b_val, tokens, wdata = 0, br_a, br_b;
  logic inv_en = 0, we = 0, br_req = 0, br_uses_a = 0, br_uses_b = 0, rf_vl = 0, advance = 0, hold_rf;
  logic [31:0] mreg [32];
  logic [31:0] mtok;
  int checks = 0, failures = 0;
  regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    for (int i = 0; i < 32; i++) mreg[i] = 0;
    mtok = '1;
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int w;
      @(negedge clk);
      ra = 5'($urandom_range(31)); rb = 5'($urandom_range(31));
      // invalidate a valid register, or write back an invalid one
      inv_en = 0; we = 0;
      w = $urandom_range(31);
      if (mtok[w] && $urandom_range(1)) begin inv_en = 1; inv_addr = 5'(w); end
      w = $urandom_range(1, 31);
      if (!mtok[w] && !(inv_en && inv_addr == 5'(w))) begin we = 1; waddr = 5'(w); wdata = $urandom(); end
      #1;
      check(a_val == mreg[ra] && b_val == mreg[rb], "read");
      check(tokens == (mtok | 32'd1), $sformatf("tokens %h expected %h", tokens, mtok | 1));
      @(posedge clk);
      if (we) begin mreg[waddr] = wdata; mtok[waddr] = 1; end
      if (inv_en && inv_addr != 0) mtok[inv_addr] = 0;
    end
    @(negedge clk); inv_en = 0; we = 0;
    // variable-latency branch read
    ra = 5'd17; rb = 5'd3; br_uses_a = 1; br_uses_b = 1; br_req = 1; rf_vl = 1;
    #1; check(hold_rf, "slow source held");
    @(negedge clk); #1;
    check(!hold_rf && br_a == mreg[17] && br_b == mreg[3], "second cycle: late values, no hold");
    advance = 1;
    @(negedge clk); advance = 0;
    ra = 5'd2; rb = 5'd15;
    #1; check(!hold_rf && br_a == mreg[2], "fast sources not held");
    rb = 5'd31; br_uses_b = 0;
    #1; check(!hold_rf, "unused slow source not held");
    br_uses_b = 1; rf_vl = 0;
    #1; check(!hold_rf, "no hold with RF_v1 clear");
    rf_vl = 1; br_req = 0;
    #1; check(!hold_rf, "no hold without request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
