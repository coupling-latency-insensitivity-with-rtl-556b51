// imem: instruction memory.
//
// DEPTH 32-bit words, read asynchronously by the fetch stage at the word
// address pc[.. :2] (the address wraps modulo the memory size), written
// one word per clock through a load port used to place a program before
// reset is released. Size and load port are choices of this design.
module imem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic [31:0] raddr,     // byte address
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,     // byte address
  input  logic [31:0] wdata
);
  localparam int AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW+1:2]] <= wdata;

  assign rdata = mem[raddr[AW+1:2]];
endmodule
