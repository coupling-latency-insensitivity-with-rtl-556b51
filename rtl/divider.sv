// divider: multicycle combinational divider with a fixed latency.
//
// The quotient and remainder are produced by a combinational restoring
// divider (one conditional subtraction per quotient bit) on the operand
// magnitudes, with the signs fixed afterwards (quotient truncated towards
// zero, remainder with the sign of the dividend, as MIPS DIV/DIVU).
// The path is allowed LATENCY cycles: while a division is present (valid),
// hold stays high until LATENCY cycles have elapsed, so the instruction
// occupies EXE for exactly LATENCY cycles; the count restarts when it
// leaves (fire). Division by zero gives what the restoring array yields:
// quotient magnitude all ones (then sign-corrected) and remainder equal to
// the dividend (a choice of this design; MIPS leaves it undefined).
module divider #(
  parameter int unsigned LATENCY = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        fire,
  input  logic        sgn,
  input  logic [31:0] a,         // dividend
  input  logic [31:0] b,         // divisor
  output logic [31:0] q,
  output logic [31:0] r,
  output logic        hold
);
  logic [$clog2(LATENCY+1)-1:0] cnt;
  logic [31:0] ma, mb, uq, ur;
  logic        na, nb;

  assign na = sgn && a[31];
  assign nb = sgn && b[31];
  assign ma = na ? -a : a;
  assign mb = nb ? -b : b;

  always_comb begin
    logic [32:0] rem;
    rem = '0;
    uq  = '0;
    for (int i = 31; i >= 0; i--) begin
      rem = {rem[31:0], ma[i]};
      if (rem >= {1'b0, mb}) begin
        rem   = rem - {1'b0, mb};
        uq[i] = 1'b1;
      end
    end
    ur = rem[31:0];
  end

  assign q = (na != nb) ? -uq : uq;
  assign r = na ? -ur : ur;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    cnt <= '0;
    else if (fire)                 cnt <= '0;
    else if (valid && hold)        cnt <= cnt + 1'b1;

  assign hold = valid && (cnt != ($bits(cnt))'(LATENCY - 1));
endmodule
