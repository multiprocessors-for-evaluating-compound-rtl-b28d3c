// recip_rom: table of initial approximations to 1/B for the Newton-Raphson
// reciprocal (read combinationally in the Exponent/Logic I stage).
//
// B is a normalized two's complement mantissa, 1/2 < |B| <= 1.  The table is
// addressed by the sign of B and the AW mantissa bits that follow the leading
// mantissa bit.  An entry holds the fraction part A0 of an estimate A0' of 1/B
// that is larger in magnitude than 1/B over the whole address interval:
//   B > 0:  A0' = 1 + A0,  A0 = 0.s1...s(MW-1)
//   B < 0:  A0' = -1 + A0, A0 = 1.s1...s(MW-1)
// so A0 has the sign of B.  Entries are computed at elaboration:
//   B > 0:  A0' = ceil(2^(AW+1) / (2^AW + idx))          (upper bound of 1/B)
//   B < 0:  |A0'| = ceil(2^(AW+1) / (2^(AW+1) - idx - 1))
// both rounded up to MW-1 fraction bits and capped just below 2.
// The table size (AW) is this design's choice; the source only says that a
// ROM holds the initial guesses.  The relative error of a guess is below
// 2^-(AW+1), so two Newton-Raphson steps reach the full mantissa width.
module recip_rom
  import arith_pkg::*;
#(
  parameter int AW = 8
) (
  input  logic signed [MW-1:0] b,
  output logic signed [MW-1:0] a0
);

  localparam int N = 2 ** (AW + 1);

  logic [MW-1:0] table_q [N];

  function automatic logic [MW-1:0] entry(int unsigned addr);
    longint unsigned num, den, ap, cap;
    longint          a;
    num = 64'd1 << (MW - 1 + AW + 1);
    cap = (64'd1 << MW) - 1;
    if (addr < (1 << AW)) begin
      den = (64'd1 << AW) + 64'(addr);
      ap  = (num + den - 1) / den;
      if (ap > cap) ap = cap;
      a   = longint'(ap) - (longint'(1) << (MW - 1));
    end else begin
      den = (64'd1 << (AW + 1)) - 64'(addr - (1 << AW)) - 1;
      ap  = (num + den - 1) / den;
      if (ap > cap) ap = cap;
      a   = (longint'(1) << (MW - 1)) - longint'(ap);
    end
    return a[MW-1:0];
  endfunction

  initial begin
    for (int i = 0; i < N; i++) table_q[i] = entry(i);
  end

  assign a0 = signed'(table_q[{b[MW-1], b[MW-3 -: AW]}]);

endmodule
