// muladd: the Multiply/Add stage core of a PE (combinational).
//
// It computes one of four operations on two's complement fractions a and b:
//   MA_ADD / MA_SUB   a + b, a - b
//   MA_MUL            a * b
//   MA_MULACC         a * b +- b
//   MA_TWOMINUS       2 - (a * b +- b)
// where the sign of the +-b term is '-' when neg is set.  With b_uns set, b is
// read as an unsigned fraction b0.b1... in [0, 2) (its top bit weighs +1):
// the Newton-Raphson steps use this for B' = 2 - A'B, which is always positive
// and may exceed 1 by a little.  The last two are one
// Newton-Raphson reciprocal step split over two stages: with A the fraction
// part of an estimate A' = A +- 1 of 1/B, 2 - A'B = 2 - (A*B +- B) and
// A'(2 - A'B) = A*X +- X.
//
// Structure, as in the source's Multiply/Add figure: an array forms
// D = sum a_i b_j 2^(-i-j) over the fraction bits only, kept in carry-save form
// (C, S) by one row of 3:2 counters per multiplier bit.  A shift/complement/
// bypass unit turns a and b into two more terms (the sign-bit corrections of
// the two's complement product, the +-b term and the constant 2), complements
// C and S for 2 - (...), or bypasses the array for add and subtract.  A 4-input
// carry-save adder reduces A'+B'+C'+S' to carry and sum, and one carry-propagate
// adder (written as '+', the synthesis tool picks a lookahead structure) gives
// the result.  All four operations share the array and the final adder.
//
// Output r is RW-bit two's complement with FR fraction bits: value r * 2^-FR.
// The result is exact (no rounding); callers truncate it to a word.
module muladd
  import arith_pkg::*;
(
  input  ma_op_e                op,
  input  logic signed [MW-1:0]  a,
  input  logic signed [MW-1:0]  b,
  input  logic                  neg,
  input  logic                  b_uns,
  output logic signed [RW-1:0]  r
);

  localparam logic [RW-1:0] ONE = RW'(1) << FR;   // 1.0 in result scaling
  localparam logic [RW-1:0] ULP = RW'(1);

  typedef struct packed {
    logic [RW-1:0] s;
    logic [RW-1:0] c;
  } cs_t;

  function automatic cs_t csa(logic [RW-1:0] x, logic [RW-1:0] y, logic [RW-1:0] z);
    cs_t o;
    o.s = x ^ y ^ z;
    o.c = ((x & y) | (x & z) | (y & z)) << 1;
    return o;
  endfunction

  logic          a0, b0;
  logic [MW-2:0] af, bf;
  logic [RW-1:0] afx, bfx, av, bv;
  logic [RW-1:0] corr_a, corr_b, pm_b;
  cs_t           arr, red1, red2;
  logic [RW-1:0] ta, tb, tc, ts;

  assign a0 = a[MW-1];
  assign b0 = b[MW-1];
  assign af = a[MW-2:0];
  assign bf = b[MW-2:0];

  // Iterative array of the fraction bits, carry-save.
  always_comb begin
    arr = '0;
    for (int i = 0; i < MW - 1; i++) begin
      arr = csa(arr.s, arr.c, bf[i] ? (RW'(af) << i) : '0);
    end
  end

  // Left shift, complement, bypass.
  always_comb begin
    afx    = RW'(af) << (MW - 1);
    bfx    = RW'(bf) << (MW - 1);
    av     = RW'(a) << (MW - 1);       // sign-extended by the signed cast
    bv     = b_uns ? (RW'(unsigned'(b)) << (MW - 1)) : (RW'(b) << (MW - 1));
    // signed b:   a*b = D + a0*b0 - a0*Bfrac - b0*Afrac
    // unsigned b: a*b = D - a0*Bfrac + b0*a
    if (b_uns) corr_a = b0 ? av : '0;
    else       corr_a = b0 ? (~afx + ULP) : '0;
    corr_b = (a0 ? (~bfx + ULP) : '0) + ((a0 & b0 & !b_uns) ? ONE : '0);
    pm_b   = neg ? (~bv + ULP) : bv;
    unique case (op)
      MA_ADD: begin
        ta = av;  tb = bv;  tc = '0;  ts = '0;
      end
      MA_SUB: begin
        ta = av;  tb = ~bv; tc = '0;  ts = ULP;
      end
      MA_MUL: begin
        ta = corr_a;  tb = corr_b;  tc = arr.c;  ts = arr.s;
      end
      MA_MULACC: begin
        ta = corr_a;  tb = corr_b + pm_b;  tc = arr.c;  ts = arr.s;
      end
      MA_TWOMINUS: begin
        // 2 - (C + S + A' + B') = ~C + ~S + 2 ulp - A' + (2 - B')
        ta = ~corr_a + ULP;
        tb = (ONE << 1) + (ULP << 1) - corr_b - pm_b;
        tc = ~arr.c;
        ts = ~arr.s;
      end
      default: begin
        ta = '0;  tb = '0;  tc = '0;  ts = '0;
      end
    endcase
  end

  // A' + B' + C' + S' in carry-save, then the carry-propagate adder.
  always_comb begin
    red1 = csa(ta, tb, tc);
    red2 = csa(red1.s, red1.c, ts);
  end

  assign r = signed'(red2.s + red2.c);

endmodule
