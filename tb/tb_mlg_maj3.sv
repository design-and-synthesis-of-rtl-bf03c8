// tb_mlg_maj3: exhaustive test of the three-input majority gate against its
// truth table (output 1 when two or more inputs are 1, counted bit by bit).
module tb_mlg_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  mlg_maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
