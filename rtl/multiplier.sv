// multiplier: internally pipelined 32x32 multiplier with variable latency
// on the upper half of the 64-bit product.
//
// Cycle 0 (the MULT/MULTU is in EXE, start high): the 33-bit signed or
// zero extended operands are multiplied by the low and high halves of the
// second operand and the two partial products are registered (the internal
// pipeline register). Cycle 1: the partial products are summed and LO is
// written. HI is written in cycle 1 as well, unless variable latency was
// enabled at start (mul_v1), in which case the upper half is registered
// once more and HI is written in cycle 2 (three cycles instead of two).
// hi_late is high during cycle 1 of such a slow multiplication; the EXE
// dispatcher holds a following HI/LO move or multiply for that cycle.
// The 32-bit MUL does not use the pipeline: its low word (mul32) is
// produced in the EXE cycle and has no extra latency.
// Pipelining split and timing are this design's choices within the rules
// stated for the multiplier.
module multiplier (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,     // MULT/MULTU leaves EXE this cycle
  input  logic        sgn,       // MULT (signed) vs MULTU
  input  logic        vl_en,     // mul_v1
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] mul32,     // low word of a*b for MUL
  output logic        lo_we,
  output logic [31:0] lo_val,
  output logic        hi_we,
  output logic [31:0] hi_val,
  output logic        hi_late    // slow upper half still in flight
);
  logic signed [32:0] xa, xb;
  logic signed [49:0] pp_lo_n;   // xa * b[15:0]
  logic signed [49:0] pp_hi_n;   // xa * xb[32:16]
  logic signed [49:0] pp_lo_q, pp_hi_q;
  logic               s1_v, s1_vl, s2_v;
  logic        [31:0] hi_q;
  logic signed [65:0] prod;

  assign xa = {sgn & a[31], a};
  assign xb = {sgn & b[31], b};
  assign pp_lo_n = xa * $signed({1'b0, b[15:0]});
  assign pp_hi_n = xa * $signed(xb[32:16]);
  assign mul32   = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_vl <= 1'b0; s2_v <= 1'b0;
      pp_lo_q <= '0; pp_hi_q <= '0; hi_q <= '0;
    end else begin
      s1_v  <= start;
      s1_vl <= vl_en;
      if (start) begin
        pp_lo_q <= pp_lo_n;
        pp_hi_q <= pp_hi_n;
      end
      s2_v <= s1_v && s1_vl;
      if (s1_v && s1_vl) hi_q <= prod[63:32];
    end
  end

  assign prod   = 66'(pp_lo_q) + (66'(pp_hi_q) <<< 16);
  assign lo_we  = s1_v;
  assign lo_val = prod[31:0];
  assign hi_we  = (s1_v && !s1_vl) || s2_v;
  assign hi_val = s2_v ? hi_q : prod[63:32];
  assign hi_late = s1_v && s1_vl;
endmodule
