// register_file_tb: writes random words to every entry in random order,
// with out-of-range writes in between, and checks that every entry shows its
// last written value as a valid flit, and that reset clears the entries.
module register_file_tb;
  import arith_pkg::*;

  localparam int NREG = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we = 0;
  logic [7:0] idx;
  word_t      wdata;
  flit_t      rd [NREG];
  word_t      model [NREG];
  int checks = 0, failures = 0;

  register_file #(.NREG(NREG)) dut (.*);

  initial begin
    idx = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NREG; i++) model[i] = '0;
    for (int t = 0; t < 200; t++) begin
      we = 1; idx = 8'($urandom % (NREG + 2)); wdata = word_t'($urandom);
      if (int'(idx) < NREG) model[idx] = wdata;
      @(negedge clk);
      we = 0;
      for (int i = 0; i < NREG; i++) begin
        checks++;
        if (rd[i] != '{v: 1'b1, w: model[i]}) begin
          failures++;
          if (failures < 10) $display("FAIL entry %0d", i);
        end
      end
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < NREG; i++) begin
      checks++;
      if (rd[i].w != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
