// vl_adder: 32-bit Brent-Kung parallel-prefix adder with a detector of
// critical-path activation, used for the ALU adder/subtractor and the PC+8
// link adder.
//
// The sum is computed by a radix-2 Brent-Kung prefix tree (up-sweep over
// generate/propagate pairs, then down-sweep). The detector follows the
// design: the carry out of bit 15 (C15) is registered every cycle, and
// the addition is declared slow when C15 differs from its value in the
// previous cycle and the propagate bits P16..P22 are all one, i.e. the
// changed carry ripples at least to sum bit 23. With vl_en (alu_v1 or
// pcp8_v1) set and use high, hold is raised for one cycle; because the flop
// then holds the new C15, the same operands do not raise hold again, so a
// slow addition completes in two cycles.
// Interface: a, b, cin -> sum, cout (combinational); hold is combinational
// from the inputs and the C15 flop. cmp_vl is the combinational
// detection condition without vl_en and use.
module vl_adder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  input  logic        use_i,     // the sum is needed this cycle
  input  logic        vl_en,     // variable latency enabled (VLMR bit)
  output logic [31:0] sum,
  output logic        cout,
  output logic        crit,      // critical path activated
  output logic        hold
);
  logic [31:0] g0, p0;
  logic [32:0] c;                // c[i] = carry into bit i
  logic c15_q;

  // Brent-Kung prefix network on (g,p) pairs with carry-in folded into bit 0.
  always_comb begin
    logic [31:0] g, p;
    g0 = a & b;
    p0 = a ^ b;
    g = g0;
    p = p0;
    g[0] = g0[0] | (p0[0] & cin);
    // up-sweep
    for (int l = 0; l < 5; l++) begin
      for (int i = 0; i < 32; i++) begin
        if ((i % (2 << l)) == ((2 << l) - 1)) begin
          g[i] = g[i] | (p[i] & g[i - (1 << l)]);
          p[i] = p[i] & p[i - (1 << l)];
        end
      end
    end
    // down-sweep
    for (int l = 3; l >= 0; l--) begin
      for (int i = 0; i < 32; i++) begin
        if ((i % (2 << l)) == ((1 << l) - 1) && i >= (2 << l)) begin
          g[i] = g[i] | (p[i] & g[i - (1 << l)]);
          p[i] = p[i] & p[i - (1 << l)];
        end
      end
    end
    c[0] = cin;
    for (int i = 0; i < 32; i++) c[i+1] = g[i];
  end

  assign sum  = p0 ^ c[31:0];
  assign cout = c[32];

  // c[16] is the carry out of bit 15 (C15 of the design).
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c15_q <= 1'b0;
    else        c15_q <= c[16];

  assign crit = (c[16] ^ c15_q) && (&p0[22:16]);
  assign hold = vl_en && use_i && crit;
endmodule
