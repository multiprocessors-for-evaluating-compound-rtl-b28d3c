// pe: one processing element, a 7-stage linear arithmetic pipeline.
//
// Stages: Receive | Exponent/Logic I | Multiply/Add I | Exponent/Logic II |
// Multiply/Add II | Normalize | Transmit.  Three operand lanes x, y, z
// (ports A/A', B/B', C/C') enter at Receive and travel down the pipeline
// unchanged; stage pair I produces result r1 from two of x, y, z, and stage
// pair II produces r2 from two of x, y, z, r1.  A PE therefore performs two
// operations at once, either side by side (a*c and a*d) or chained
// (y + x*z, x OR (y AND z)).  Exponent/Logic I can also replace lane x by
// the ROM guess of 1/y with the exponent of y negated, which starts a
// Newton-Raphson reciprocal: 2 - A0*B in Multiply/Add I and A1 = A0(2 - A0*B)
// in Multiply/Add II; a second PE repeats the step (2 - A1*B, A2) and its
// Normalize stage delivers 1/B.  Normalize normalizes r1 and r2 when they
// come from floating-point operations.  Transmit merges both sides of a
// branch and drives the three result ports D, E, F; these also feed back to
// the Receive stage.
//
// Linearity: there is no feedback between stages, so every operation,
// including the reciprocal step, accepts a new operand set every cycle.
// Latency: PE_DEPTH = 7 cycles from an operand at mem_in/net_in to its result
// at out (plus the programmed delay of port C).  cfg must be held stable
// while data flows; it is loaded by the local controller.
module pe
  import arith_pkg::*;
#(
  parameter int ROM_AW = 8,
  parameter int CDEPTH = 63
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cfg_t           cfg,
  input  flit_t [NPORT-1:0] mem_in,
  input  flit_t [NPORT-1:0] net_in,
  output flit_t [NPORT-1:0] out
);

  // stage 1: Receive
  flit_t [NPORT-1:0] s1;
  pe_receive #(.CDEPTH(CDEPTH)) u_rx (
    .clk(clk), .rst_n(rst_n), .src(cfg.src), .fb(cfg.fb), .cdly(cfg.cdly),
    .mem_in(mem_in), .net_in(net_in), .fb_in(out), .q(s1)
  );

  // stage 2: Exponent/Logic I (with the reciprocal ROM)
  logic signed [MW-1:0] rom_a0;
  flit_t                x1;
  prep_t                p1;
  recip_rom #(.AW(ROM_AW)) u_rom (.b(s1[1].w.m), .a0(rom_a0));

  always_comb begin
    x1 = s1[0];
    if (cfg.rom_x) begin
      x1.v   = s1[1].v;
      x1.w.m = rom_a0;
      x1.w.e = -s1[1].w.e;
    end
  end

  exp_logic u_el1 (.u(cfg.u1), .x(x1), .y(s1[1]), .z(s1[2]), .r1('0), .p(p1));

  flit_t x2, y2, z2;
  prep_t p2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x2 <= '0; y2 <= '0; z2 <= '0; p2 <= '0;
    end else begin
      x2 <= x1; y2 <= s1[1]; z2 <= s1[2]; p2 <= p1;
    end
  end

  // stage 3: Multiply/Add I
  flit_t r1c;
  ma_stage u_ma1 (.p(p2), .r(r1c));

  flit_t x3, y3, z3, r13;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x3 <= '0; y3 <= '0; z3 <= '0; r13 <= '0;
    end else begin
      x3 <= x2; y3 <= y2; z3 <= z2; r13 <= r1c;
    end
  end

  // stage 4: Exponent/Logic II
  prep_t p3;
  exp_logic u_el2 (.u(cfg.u2), .x(x3), .y(y3), .z(z3), .r1(r13), .p(p3));

  flit_t x4, y4, z4, r14;
  prep_t p4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x4 <= '0; y4 <= '0; z4 <= '0; r14 <= '0; p4 <= '0;
    end else begin
      x4 <= x3; y4 <= y3; z4 <= z3; r14 <= r13; p4 <= p3;
    end
  end

  // stage 5: Multiply/Add II
  flit_t r2c;
  ma_stage u_ma2 (.p(p4), .r(r2c));

  flit_t x5, y5, z5, r15, r25;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x5 <= '0; y5 <= '0; z5 <= '0; r15 <= '0; r25 <= '0;
    end else begin
      x5 <= x4; y5 <= y4; z5 <= z4; r15 <= r14; r25 <= r2c;
    end
  end

  // stage 6: Normalize
  word_t n1, n2;
  normalize u_n1 (.i_w(r15.w), .o_w(n1));
  normalize u_n2 (.i_w(r25.w), .o_w(n2));

  flit_t x6, y6, z6, r16, r26;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x6 <= '0; y6 <= '0; z6 <= '0; r16 <= '0; r26 <= '0;
    end else begin
      x6  <= x5; y6 <= y5; z6 <= z5;
      r16 <= '{v: r15.v, w: is_float_op(cfg.u1.op) ? n1 : r15.w};
      r26 <= '{v: r25.v, w: is_float_op(cfg.u2.op) ? n2 : r25.w};
    end
  end

  // stage 7: Transmit
  pe_transmit u_tx (
    .clk(clk), .rst_n(rst_n), .cond(cfg.cond), .clane(cfg.clane),
    .out_t(cfg.out_t), .out_f(cfg.out_f),
    .x(x6), .y(y6), .z(z6), .r1(r16), .r2(r26), .q(out)
  );

endmodule
