// dmem: data memory with byte, halfword and word access.
//
// DEPTH 32-bit words (the address wraps modulo the memory size). Loads are
// combinational: the addressed byte or halfword is extracted and sign or
// zero extended. Stores write on the rising edge when en and wr are high,
// with byte enables for SB/SH (big-endian lane order as in MIPS R2000,
// byte 0 in bits 31:24). Unaligned halfword/word addresses are served at
// the aligned address. A second port lets the environment load or inspect
// the memory. The memory's readiness (late access) is signalled to the core
// separately. Size, endianness and the debug port are choices of this
// design.
module dmem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        en,
  input  logic        wr,
  input  mem_size_e   size,
  input  logic        uns,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // environment port
  input  logic        ext_we,
  input  logic [31:0] ext_addr,
  input  logic [31:0] ext_wdata,
  output logic [31:0] ext_rdata
);
  localparam int AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];
  logic [31:0] word, wmask, wval;
  logic [1:0]  bo;
  logic [7:0]  byt;
  logic [15:0] half;

  assign word = mem[addr[AW+1:2]];
  assign bo   = addr[1:0];
  assign byt  = word[8*(3-int'(bo)) +: 8];
  assign half = bo[1] ? word[15:0] : word[31:16];

  always_comb begin
    unique case (size)
      SZ_B:    rdata = {{24{!uns && byt[7]}}, byt};
      SZ_H:    rdata = {{16{!uns && half[15]}}, half};
      default: rdata = word;
    endcase
    unique case (size)
      SZ_B: begin
        wmask = 32'hFF00_0000 >> (8 * bo);
        wval  = {4{wdata[7:0]}};
      end
      SZ_H: begin
        wmask = bo[1] ? 32'h0000_FFFF : 32'hFFFF_0000;
        wval  = {2{wdata[15:0]}};
      end
      default: begin
        wmask = 32'hFFFF_FFFF;
        wval  = wdata;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (en && wr) mem[addr[AW+1:2]] <= (word & ~wmask) | (wval & wmask);
    else if (ext_we) mem[ext_addr[AW+1:2]] <= ext_wdata;
  end

  assign ext_rdata = mem[ext_addr[AW+1:2]];
endmodule
