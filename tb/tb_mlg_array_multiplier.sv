// tb_mlg_array_multiplier: exhaustive test of the majority-logic array
// multiplier at N = 4 (256 pairs) and N = 8 (65536 pairs), and corner
// operands at N = 5 to cover an odd width. Products are compared with
// integer multiplication.
module tb_mlg_array_multiplier;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  int checks = 0, failures = 0;

  mlg_array_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  mlg_array_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  mlg_array_multiplier #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 !== 8'(int'(a4) * int'(b4))) begin
        failures++;
        $display("FAIL N=4 %0d * %0d = %0d", a4, b4, p4);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 !== 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 20) $display("FAIL N=8 %0d * %0d = %0d", a8, b8, p8);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v);
      #1;
      checks++;
      if (p5 !== 10'(int'(a5) * int'(b5))) begin
        failures++;
        if (failures < 20) $display("FAIL N=5 %0d * %0d = %0d", a5, b5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
