// tb_mlg_lf_adder: tests the majority-logic Ladner-Fischer adder at several
// widths against integer addition: exhaustive at W = 8 (all a, b and
// carry-in), exhaustive at W = 5 and W = 2, random plus carry-chain corner
// cases at W = 12 and W = 20 (the accumulator widths of the 4x4 and 8x8
// MACs) and at W = 32.
module tb_mlg_lf_adder;
  int checks = 0, failures = 0;

  logic [1:0]  a2, b2, s2;   logic ci2, co2;
  logic [4:0]  a5, b5, s5;   logic ci5, co5;
  logic [7:0]  a8, b8, s8;   logic ci8, co8;
  logic [11:0] a12, b12, s12; logic ci12, co12;
  logic [19:0] a20, b20, s20; logic ci20, co20;
  logic [31:0] a32, b32, s32; logic ci32, co32;

  mlg_lf_adder #(.W(2))  dut2  (.a(a2),  .b(b2),  .cin(ci2),  .sum(s2),  .cout(co2));
  mlg_lf_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));
  mlg_lf_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  mlg_lf_adder           dut12 (.a(a12), .b(b12), .cin(ci12), .sum(s12), .cout(co12));
  mlg_lf_adder #(.W(20)) dut20 (.a(a20), .b(b20), .cin(ci20), .sum(s20), .cout(co20));
  mlg_lf_adder #(.W(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  // Compare a result {cout, sum} with the reference a + b + cin.
  task automatic check(string tag, longint unsigned got, longint unsigned ref_a,
                       longint unsigned ref_b, bit ref_c);
    longint unsigned expected;
    expected = ref_a + ref_b + 64'(ref_c);
    checks++;
    if (got != expected) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: %0d + %0d + %0d gave %0d", tag, ref_a, ref_b, ref_c, got);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 5); v++) begin
      {ci2, a2, b2} = 5'(v);
      #1 check("W2", {co2, s2}, a2, b2, ci2);
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {ci5, a5, b5} = 11'(v);
      #1 check("W5", {co5, s5}, a5, b5, ci5);
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      #1 check("W8", {co8, s8}, a8, b8, ci8);
    end
    // Carry-chain corners: all-ones plus one, alternating patterns.
    for (int n = 0; n < 6; n++) begin
      case (n)
        0: begin a12 = '1; b12 = '0; ci12 = 1; a20 = '1; b20 = '0; ci20 = 1; a32 = '1; b32 = '0; ci32 = 1; end
        1: begin a12 = '1; b12 = 1;  ci12 = 0; a20 = '1; b20 = 1;  ci20 = 0; a32 = '1; b32 = 1;  ci32 = 0; end
        2: begin a12 = '1; b12 = '1; ci12 = 1; a20 = '1; b20 = '1; ci20 = 1; a32 = '1; b32 = '1; ci32 = 1; end
        3: begin a12 = 12'h555; b12 = 12'haaa; ci12 = 1;
                 a20 = 20'h55555; b20 = 20'haaaaa; ci20 = 1;
                 a32 = 32'h5555_5555; b32 = 32'haaaa_aaaa; ci32 = 1; end
        4: begin a12 = 12'h7ff; b12 = 12'h001; ci12 = 0;
                 a20 = 20'h7ffff; b20 = 20'h00001; ci20 = 0;
                 a32 = 32'h7fff_ffff; b32 = 32'h1; ci32 = 0; end
        default: begin a12 = '0; b12 = '0; ci12 = 0; a20 = '0; b20 = '0; ci20 = 0; a32 = '0; b32 = '0; ci32 = 0; end
      endcase
      #1;
      check("W12", {co12, s12}, a12, b12, ci12);
      check("W20", {co20, s20}, a20, b20, ci20);
      check("W32", {co32, s32}, a32, b32, ci32);
    end
    for (int n = 0; n < 20000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom);
      a20 = 20'($urandom); b20 = 20'($urandom); ci20 = 1'($urandom);
      a32 = $urandom;      b32 = $urandom;      ci32 = 1'($urandom);
      #1;
      check("W12", {co12, s12}, a12, b12, ci12);
      check("W20", {co20, s20}, a20, b20, ci20);
      check("W32", {co32, s32}, a32, b32, ci32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
