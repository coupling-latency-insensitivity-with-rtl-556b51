// cop0_vlmr: the VL Mask Register, mapped as register 16 of coprocessor 0.
//
// Four configuration bits, one per variable-latency unit: bit 3 mul_v1,
// bit 2 pcp8_v1, bit 1 alu_v1, bit 0 RF_v1 (the order of the 4-bit VL code
// Multiplier, PC+8, ALU, RF). Set to one, a bit makes its unit take an
// extra cycle whenever its critical path is activated. Written by MTC0
// and read by MFC0 with register number 16; COP0 registers 0..15 are not
// implemented and read as zero, writes to them are ignored. The reset
// value is 1011: the PC+8 adder starts fast because the boot check of it
// runs first, the other units start in the safe slow mode until the
// self-test clears their bits. Writes take effect on the next clock edge.
// rdata[31:4] is constant zero because the register has only four bits;
// only wdata[3:0] is used for the same reason.
// The four bits, their order and the use of COP0 register 16 follow the
// original scheme; the reset value 1011 is this design's reading of which
// units its self-test starts from.
module cop0_vlmr
  import mips_pkg::*;
#(
  parameter logic [3:0] RESET_VLMR = 4'b1011
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [4:0]  addr,      // write and read register number
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic [3:0]  vlmr
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                       vlmr <= RESET_VLMR;
    else if (we && addr == VLMR_REG)  vlmr <= wdata[3:0];

  assign rdata = (addr == VLMR_REG) ? {28'd0, vlmr} : 32'd0;
endmodule
