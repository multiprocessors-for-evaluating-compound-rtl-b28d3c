// recip_rom_tb: checks every region of the reciprocal ROM.
// For random normalized mantissas B of both signs, the estimate
// A0' = A0 + sign(B) must have the sign of B, satisfy A0' * B >= 1 (it bounds
// 1/B from outside, as the Newton iteration expects) except at the capped
// entry next to |B| = 1/2, and be within 2^-AW relative of 1/B.
module recip_rom_tb;
  import arith_pkg::*;

  localparam int AW = 8;
  logic signed [MW-1:0] b, a0;
  int checks = 0, failures = 0;

  recip_rom #(.AW(AW)) dut (.b(b), .a0(a0));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    real bv, av, prod;
    for (int i = 0; i < 4000; i++) begin
      logic [MW-3:0] low;
      low = (MW-2)'({$urandom, $urandom});
      if (i % 2 == 0) b = {2'b01, low};        // 1/2 <= B < 1
      else            b = {2'b10, low};        // -1 <= B < -1/2
      #1;
      bv   = real'(longint'(b)) / real'(longint'(1) << (MW - 1));
      av   = real'(longint'(a0)) / real'(longint'(1) << (MW - 1)) + ((bv > 0.0) ? 1.0 : -1.0);
      prod = av * bv;
      chk((a0[MW-1] == b[MW-1]) || a0 == '0, $sformatf("sign of A0 for B=%f", bv));
      if (bv > 0.5 + 1.0 / real'(1 << (AW + 1)))
        chk(prod >= 1.0, $sformatf("A0'B = %f < 1 for B=%f", prod, bv));
      chk(prod - 1.0 <= 1.0 / real'(1 << AW) && prod - 1.0 >= -1.0e-6,
          $sformatf("estimate too far: A0'B = %f for B=%f", prod, bv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
