// tb_mlg_mac: tests the MAC unit at N = 4 (default) and N = 8 with a
// reference model in the testbench. Every cycle the operands and the
// enable are random; the combinational product is compared with a * b and,
// one clock edge later, the accumulator with the running sum modulo
// 2**ACC_W. The accumulator must not change before the clock edge (latency
// of exactly one cycle). Also checked: hold with en = 0, wrap-around of the
// accumulator, and clearing by reset in the middle of a run.
module tb_mlg_mac;
  localparam int A4 = 12, A8 = 20;
  logic        clk = 0, rst_n = 1;
  logic        en4 = 0, en8 = 0;
  logic [3:0]  a4 = '0, b4 = '0;
  logic [7:0]  a8 = '0, b8 = '0;
  logic [7:0]  p4;
  logic [15:0] p8;
  logic [A4-1:0] acc4, m4;
  logic [A8-1:0] acc8, m8;
  int checks = 0, failures = 0, wraps4 = 0, wraps8 = 0, holds = 0, resets = 0;

  mlg_mac          dut4 (.clk(clk), .rst_n(rst_n), .en(en4), .a(a4), .b(b4),
                         .product(p4), .acc(acc4));
  mlg_mac #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .en(en8), .a(a8), .b(b8),
                         .product(p8), .acc(acc8));

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m4 = '0; m8 = '0;
    #1 rst_n = 0;
    #1;
    checks++; if (acc4 !== '0 || acc8 !== '0) fail("reset value");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint unsigned next4, next8;
      @(negedge clk);
      if (n == 1500) begin
        // Reset in the middle of a run clears both accumulators at once.
        rst_n = 0;
        #1;
        checks++; if (acc4 !== '0 || acc8 !== '0) fail("mid-run reset");
        m4 = '0; m8 = '0; resets++;
        rst_n = 1;
      end
      en4 = ($urandom % 8) != 0;
      en8 = ($urandom % 8) != 0;
      a4 = 4'($urandom); b4 = 4'($urandom);
      a8 = 8'($urandom); b8 = 8'($urandom);
      // Full-scale operands now and then so that the accumulators wrap often.
      if ($urandom % 4 == 0) begin a4 = '1; b4 = '1; a8 = '1; b8 = '1; end
      #1;
      checks++; if (p4 !== 8'(a4 * b4))  fail($sformatf("p4 %0d*%0d=%0d", a4, b4, p4));
      checks++; if (p8 !== 16'(a8 * b8)) fail($sformatf("p8 %0d*%0d=%0d", a8, b8, p8));
      // Nothing may reach the accumulator before the clock edge.
      checks++; if (acc4 !== m4 || acc8 !== m8) fail("accumulator changed before the edge");
      next4 = longint'(m4) + longint'(a4) * longint'(b4);
      next8 = longint'(m8) + longint'(a8) * longint'(b8);
      if (en4) begin
        if (next4 >> A4 != 0) wraps4++;
        m4 = A4'(next4);
      end else holds++;
      if (en8) begin
        if (next8 >> A8 != 0) wraps8++;
        m8 = A8'(next8);
      end else holds++;
      @(posedge clk);
      #1;
      checks++; if (acc4 !== m4) fail($sformatf("acc4=%0d expected %0d", acc4, m4));
      checks++; if (acc8 !== m8) fail($sformatf("acc8=%0d expected %0d", acc8, m8));
    end
    checks++;
    if (wraps4 == 0 || wraps8 == 0 || holds == 0 || resets == 0)
      fail($sformatf("mechanism not seen: wraps4=%0d wraps8=%0d holds=%0d resets=%0d",
                     wraps4, wraps8, holds, resets));
    $display("wraps4=%0d wraps8=%0d holds=%0d resets=%0d", wraps4, wraps8, holds, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
