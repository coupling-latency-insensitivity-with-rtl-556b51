// shifter: MIPS shift unit of the EXE stage.
//
// Logical left, logical right and arithmetic right shifts of a 32-bit
// operand by 0..31 places, written as a five-level barrel shifter. The
// amount is the instruction's shamt field or the low five bits of rs
// (chosen by the caller). Combinational, one cycle, no variable latency.
// The original only names the shifter; the barrel structure is this
// design's choice.
module shifter
  import mips_pkg::*;
(
  input  shift_op_e   op,
  input  logic [31:0] d,
  input  logic [4:0]  amt,
  output logic [31:0] q
);
  function automatic logic [31:0] rev(input logic [31:0] v);
    for (int i = 0; i < 32; i++) rev[i] = v[31-i];
  endfunction

  always_comb begin
    logic [31:0] x;
    logic        fill;
    fill = (op == SH_RA) && d[31];
    // reverse for left shifts so that one right-shifting network serves all
    x = (op == SH_LL) ? rev(d) : d;
    for (int s = 0; s < 5; s++)
      if (amt[s]) x = (x >> (1 << s)) | ({32{fill}} << (32 - (1 << s)));
    q = (op == SH_LL) ? rev(x) : x;
  end
endmodule
