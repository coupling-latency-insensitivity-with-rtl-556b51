// mips_top: the latency-insensitive, variable-latency MIPS core with its
// instruction and data memories.
//
// The core fetches from imem and loads/stores through dmem, both read
// combinationally. Programs are placed through the prog_* port (one word
// per clock, normally while rst_n is low); data memory can be loaded and
// inspected through the dm_* port while the core is not storing.
// dmem_wait models a data memory that is late: while it is high, a load or
// store in MEM waits and the latency-insensitive protocol stalls the
// stages behind it. Status outputs: the VL Mask Register, per-cycle event
// flags and the write-back trace of every completed instruction.
// Memory sizes are parameters (IMEM_WORDS, DMEM_WORDS) chosen by this
// design.
// The stage structure and the memories' place in it follow the original
// pipeline; the load/inspect ports, the dmem_wait input and the 1024-word
// default sizes are this design's own, for simulation and integration.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS   = 1024,
  parameter int unsigned DMEM_WORDS   = 1024,
  parameter bit          BOOT_PRELOAD = 1'b1,
  parameter int unsigned DIV_LATENCY  = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  input  logic        dm_we,
  input  logic [31:0] dm_addr,
  input  logic [31:0] dm_wdata,
  output logic [31:0] dm_rdata,
  input  logic        dmem_wait,
  output logic [3:0]  vlmr,
  output ev_t         ev,
  output logic        wb_valid,
  output logic [31:0] wb_pc,
  output logic        wb_we,
  output logic [4:0]  wb_rd,
  output logic [31:0] wb_data
);
  logic [31:0] imem_addr, imem_data, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_en, dmem_wr, dmem_uns;
  mem_size_e   dmem_size;

  mips_core #(.BOOT_PRELOAD(BOOT_PRELOAD), .DIV_LATENCY(DIV_LATENCY)) u_core (
    .clk, .rst_n, .imem_addr, .imem_data, .dmem_en, .dmem_wr, .dmem_size,
    .dmem_uns, .dmem_addr, .dmem_wdata, .dmem_rdata, .dmem_ready(!dmem_wait),
    .vlmr, .ev, .wb_valid, .wb_pc, .wb_we, .wb_rd, .wb_data
  );

  imem #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk, .raddr(imem_addr), .rdata(imem_data),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata)
  );

  dmem #(.DEPTH(DMEM_WORDS)) u_dmem (
    .clk, .en(dmem_en), .wr(dmem_wr), .size(dmem_size), .uns(dmem_uns),
    .addr(dmem_addr), .wdata(dmem_wdata), .rdata(dmem_rdata),
    .ext_we(dm_we), .ext_addr(dm_addr), .ext_wdata(dm_wdata), .ext_rdata(dm_rdata)
  );
endmodule
