// tb_dmem: random byte, halfword and word loads and stores against a
// byte-array model (big-endian lanes), signed and unsigned loads, and the
// environment port for loading and inspecting words.
module tb_dmem;
  import mips_pkg::*;
  logic clk = 0, en = 0, wr = 0, uns = 0, ext_we = 0;
  mem_size_e size = SZ_W;
  logic [31:0] addr = 0, wdata = 0, rdata, ext_addr = 0, ext_wdata = 0, ext_rdata, e;
  logic [7:0] bytes [256];
  int checks = 0, failures = 0;
  dmem #(.DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ext_we = 1; ext_addr = 32'(i * 4); ext_wdata = $urandom();
      {bytes[4*i], bytes[4*i+1], bytes[4*i+2], bytes[4*i+3]} = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      size = mem_size_e'($urandom_range(2)); uns = 1'($urandom_range(1));
      addr = 32'($urandom_range(255));
      if (size == SZ_H) addr[0] = 0;
      if (size == SZ_W) addr[1:0] = 0;
      en = 1; wr = 1'($urandom_range(1)); wdata = $urandom();
      #1;
      if (!wr) begin
        case (size)
          SZ_B: e = uns ? {24'd0, bytes[addr]} : {{24{bytes[addr][7]}}, bytes[addr]};
          SZ_H: e = uns ? {16'd0, bytes[addr], bytes[addr+1]}
                        : {{16{bytes[addr][7]}}, bytes[addr], bytes[addr+1]};
          default: e = {bytes[addr], bytes[addr+1], bytes[addr+2], bytes[addr+3]};
        endcase
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("FAIL load %s %h: %h exp %h", size.name(), addr, rdata, e); end
      end
      @(posedge clk);
      if (wr) begin
        case (size)
          SZ_B: bytes[addr] = wdata[7:0];
          SZ_H: {bytes[addr], bytes[addr+1]} = wdata[15:0];
          default: {bytes[addr], bytes[addr+1], bytes[addr+2], bytes[addr+3]} = wdata;
        endcase
      end
    end
    @(negedge clk); en = 0;
    for (int i = 0; i < 64; i++) begin
      ext_addr = 32'(i * 4); #1; checks++;
      if (ext_rdata !== {bytes[4*i], bytes[4*i+1], bytes[4*i+2], bytes[4*i+3]}) begin
        failures++; $display("FAIL final word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
