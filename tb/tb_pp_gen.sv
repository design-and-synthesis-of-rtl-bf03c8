// tb_pp_gen: checks the partial product matrix. For a 4x4 instance all
// operand pairs are applied, for an 8x8 instance 2000 random pairs; every
// matrix bit is compared with the product of the two operand bits, and the
// weighted sum of the matrix with the integer product a * b.
module tb_pp_gen;
  logic [3:0] a4, b4;
  logic [3:0] pp4 [4];
  logic [7:0] a8, b8;
  logic [7:0] pp8 [8];
  int checks = 0, failures = 0;

  pp_gen #(.N(4)) dut4 (.a(a4), .b(b4), .pp(pp4));
  pp_gen #(.N(8)) dut8 (.a(a8), .b(b8), .pp(pp8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int total;
      {a4, b4} = 8'(v);
      #1;
      total = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (pp4[i][j] !== (b4[i] && a4[j])) begin
            failures++;
            $display("FAIL N=4 a=%0d b=%0d pp[%0d][%0d]=%0b", a4, b4, i, j, pp4[i][j]);
          end
          total += int'(pp4[i][j]) << (i + j);
        end
      checks++;
      if (total != int'(a4) * int'(b4)) begin
        failures++;
        $display("FAIL N=4 weighted sum %0d for a=%0d b=%0d", total, a4, b4);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int total;
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      #1;
      total = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) total += int'(pp8[i][j]) << (i + j);
      checks++;
      if (total != int'(a8) * int'(b8)) begin
        failures++;
        $display("FAIL N=8 weighted sum %0d for a=%0d b=%0d", total, a8, b8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
