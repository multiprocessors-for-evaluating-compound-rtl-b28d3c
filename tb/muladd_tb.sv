// muladd_tb: self-checking test of the Multiply/Add core.
// Drives random and corner-case fractions through all five operation classes
// and compares the exact result with 64-bit integer arithmetic on the
// operands' integer images (a*b scaled by 2^FR is simply a_int*b_int).
module muladd_tb;
  import arith_pkg::*;

  ma_op_e               op;
  logic signed [MW-1:0] a, b;
  logic                 neg, uns;
  logic signed [RW-1:0] r;
  int checks = 0, failures = 0;

  muladd dut (.op(op), .a(a), .b(b), .neg(neg), .b_uns(uns), .r(r));

  function automatic longint expect_r(ma_op_e o, longint ai, longint bi, logic ng);
    longint bs, pm;
    bs = bi <<< (MW - 1);
    pm = ng ? -bs : bs;
    unique case (o)
      MA_ADD:      return (ai <<< (MW - 1)) + bs;
      MA_SUB:      return (ai <<< (MW - 1)) - bs;
      MA_MUL:      return ai * bi;
      MA_MULACC:   return ai * bi + pm;
      default:     return (longint'(2) <<< FR) - (ai * bi + pm);
    endcase
  endfunction

  task automatic run(ma_op_e o, logic signed [MW-1:0] av, logic signed [MW-1:0] bv, logic ng,
                     logic u = 1'b0);
    longint e, got;
    op = o; a = av; b = bv; neg = ng; uns = u;
    #1;
    e   = expect_r(o, longint'(av), u ? longint'(unsigned'(bv)) : longint'(bv), ng);
    got = longint'(r);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h neg=%0d got=%0d exp=%0d", o.name(), av, bv, ng, got, e);
    end
  endtask

  localparam logic signed [MW-1:0] MINF = {1'b1, {(MW-1){1'b0}}};
  localparam logic signed [MW-1:0] MAXF = {1'b0, {(MW-1){1'b1}}};

  initial begin
    ma_op_e ops [5] = '{MA_ADD, MA_SUB, MA_MUL, MA_MULACC, MA_TWOMINUS};
    foreach (ops[k]) begin
      run(ops[k], MINF, MINF, 1'b0);
      run(ops[k], MINF, MAXF, 1'b1);
      run(ops[k], MAXF, MAXF, 1'b0);
      run(ops[k], '0, MINF, 1'b1);
      run(ops[k], MAXF, '0, 1'b0);
      for (int i = 0; i < 400; i++)
        run(ops[k], MW'($urandom), MW'($urandom), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
