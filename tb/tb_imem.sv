// tb_imem: writes random words through the load port at random word
// addresses and reads them back at the same and at aliased addresses
// (the address wraps modulo the memory size).
module tb_imem;
  logic clk = 0, we = 0;
  logic [31:0] raddr = 0, rdata, waddr = 0, wdata = 0;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  imem #(.DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 32'(i * 4); wdata = $urandom(); model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      int w = $urandom_range(63);
      @(negedge clk);
      we = 1'($urandom_range(1)); waddr = 32'(w * 4) + 32'($urandom_range(3)) * 256; wdata = $urandom();
      raddr = 32'($urandom_range(63) * 4) + 32'($urandom_range(7)) * 256;
      #1; checks++;
      if (rdata !== model[raddr[7:2]]) begin failures++; if (failures < 10) $display("FAIL read %h", raddr); end
      @(posedge clk); if (we) model[w] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
