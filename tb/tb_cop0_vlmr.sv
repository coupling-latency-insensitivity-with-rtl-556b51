// tb_cop0_vlmr: checks the VL Mask Register: reset value 1011, writes to
// register 16 take the low four bits, writes to other registers are
// ignored, register 16 reads back the mask and others read zero.
module tb_cop0_vlmr;
  logic clk = 0, rst_n = 1, we = 0;
  logic [4:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] vlmr, model;
  int checks = 0, failures = 0;
  cop0_vlmr dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;
    #1; checks++; if (vlmr !== 4'b1011) begin failures++; $display("FAIL reset %b", vlmr); end
    model = 4'b1011;
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(1));
      addr = ($urandom_range(1)) ? 5'd16 : 5'($urandom_range(31));
      wdata = $urandom();
      #1;
      checks++;
      if (rdata !== ((addr == 16) ? {28'd0, model} : 32'd0)) begin failures++; $display("FAIL read %0d", addr); end
      @(posedge clk);
      if (we && addr == 16) model = wdata[3:0];
      #1;
      checks++;
      if (vlmr !== model) begin failures++; $display("FAIL vlmr %b expected %b", vlmr, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
