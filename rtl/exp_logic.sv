// exp_logic: combinational core of an Exponent/Logic stage.
//
// Picks the two operands (and the sign reference) of the following
// Multiply/Add stage from the lanes x, y, z (and r1, the result of stage I,
// when used as stage II), then
//   floating add/subtract: compares exponents and aligns the mantissa of the
//     smaller operand by an arithmetic right shift (a zero operand never
//     forces alignment); result exponent = larger exponent;
//   floating multiply: adds the exponents;
//   Newton-Raphson steps: passes the exponent of operand a (the estimate);
//   logic operations (AND, OR, XOR, NOT on the whole word) and pass: computes
//     the result here, the Multiply/Add stage then bypasses it.
// Output valid is the AND of the valid bits of the operands the op reads.
// Alignment truncates the shifted-out bits (no guard bits): a choice of this
// design, the source does not describe rounding.
module exp_logic
  import arith_pkg::*;
(
  input  unit_cfg_t u,
  input  flit_t     x,
  input  flit_t     y,
  input  flit_t     z,
  input  flit_t     r1,
  output prep_t     p
);

  function automatic flit_t pick(lane_e l, flit_t fx, flit_t fy, flit_t fz, flit_t fr);
    unique case (l)
      LN_X:    return fx;
      LN_Y:    return fy;
      LN_Z:    return fz;
      default: return fr;
    endcase
  endfunction

  flit_t             fa, fb, fs;
  logic signed [EW:0] d;
  int unsigned       shamt;

  always_comb begin
    fa = pick(u.a, x, y, z, r1);
    fb = pick(u.b, x, y, z, r1);
    fs = pick(u.s, x, y, z, r1);
    p      = '0;
    p.op   = u.op;
    p.a    = fa.w.m;
    p.b    = fb.w.m;
    p.neg  = fs.w.m[MW-1];
    p.lres = fa.w;
    d      = '0;
    shamt  = 0;
    unique case (u.op)
      OP_PASS, OP_NOT: p.v = fa.v;
      OP_NR_TWOMINUS, OP_NR_STEP, OP_NR_LAST: p.v = fa.v & fb.v & fs.v;
      default: p.v = fa.v & fb.v;
    endcase
    unique case (u.op)
      OP_FADD, OP_FSUB: begin
        if (fa.w.m == '0) begin
          p.e = (EW+1)'(fb.w.e);
        end else if (fb.w.m == '0) begin
          p.e = (EW+1)'(fa.w.e);
        end else begin
          d = (EW+1)'(fa.w.e) - (EW+1)'(fb.w.e);
          if (d >= 0) begin
            shamt = (d > (EW+1)'(MW)) ? MW : int'(d);
            p.e   = (EW+1)'(fa.w.e);
            p.b   = fb.w.m >>> shamt;
          end else begin
            d     = -d;
            shamt = (d > (EW+1)'(MW)) ? MW : int'(d);
            p.e   = (EW+1)'(fb.w.e);
            p.a   = fa.w.m >>> shamt;
          end
        end
      end
      OP_FMUL:                p.e = (EW+1)'(fa.w.e) + (EW+1)'(fb.w.e);
      OP_NR_STEP, OP_NR_LAST: p.e = (EW+1)'(fa.w.e);
      OP_AND:                 p.lres = fa.w & fb.w;
      OP_OR:                  p.lres = fa.w | fb.w;
      OP_XOR:                 p.lres = fa.w ^ fb.w;
      OP_NOT:                 p.lres = ~fa.w;
      default:                p.e = '0;
    endcase
  end

endmodule
