// tb_mlg_mac_top: end-to-end test of both MAC units with all parameters at
// their defaults (4x4 unit with a 12-bit accumulator, 8x8 unit with a
// 20-bit accumulator).
//
// Part 1 computes dot products: the accumulators are cleared by reset, then
// vectors of 4 to 16 operand pairs are streamed one pair per clock, and the
// final accumulator values are compared with dot products worked out in the
// testbench. One of them uses full-scale operands only, so that it is long
// enough to wrap the accumulators. Part 2 streams random operands with a
// random enable and checks every product and every accumulator value, one
// cycle after the operands. The mechanisms counted are: accumulate, hold
// (en = 0), wrap-around of an accumulator, clear by reset, and the
// one-cycle latency; each must be seen at least once.
module tb_mlg_mac_top;
  localparam int A4 = 12, A8 = 20;
  logic        clk = 0, rst_n = 1;
  logic        en4 = 0, en8 = 0;
  logic [3:0]  a4 = '0, b4 = '0;
  logic [7:0]  a8 = '0, b8 = '0;
  logic [7:0]  product4;
  logic [15:0] product8;
  logic [A4-1:0] acc4;
  logic [A8-1:0] acc8;
  longint unsigned m4 = 0, m8 = 0;   // reference sums, not yet wrapped
  int checks = 0, failures = 0;
  int n_acc = 0, n_hold = 0, n_wrap = 0, n_reset = 0, n_latency = 0, n_dot = 0;

  mlg_mac_top dut (
    .clk(clk), .rst_n(rst_n),
    .en4(en4), .a4(a4), .b4(b4), .product4(product4), .acc4(acc4),
    .en8(en8), .a8(a8), .b8(b8), .product8(product8), .acc8(acc8)
  );

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Clear both accumulators with the asynchronous reset.
  task automatic clear();
    @(negedge clk);
    en4 = 0; en8 = 0;
    rst_n = 0;
    #1;
    checks++; if (acc4 !== '0 || acc8 !== '0) fail("reset did not clear");
    rst_n = 1;
    m4 = 0; m8 = 0;
    n_reset++;
  endtask

  // Apply one operand pair to each unit for one clock and check the result.
  task automatic step(bit e4, bit e8, logic [3:0] x4, logic [3:0] y4,
                      logic [7:0] x8, logic [7:0] y8);
    logic [A4-1:0] before4;
    logic [A8-1:0] before8;
    @(negedge clk);
    en4 = e4; en8 = e8; a4 = x4; b4 = y4; a8 = x8; b8 = y8;
    #1;
    checks++; if (product4 !== 8'(x4 * y4))  fail($sformatf("product4 %0d*%0d=%0d", x4, y4, product4));
    checks++; if (product8 !== 16'(x8 * y8)) fail($sformatf("product8 %0d*%0d=%0d", x8, y8, product8));
    before4 = acc4; before8 = acc8;
    checks++;
    if (before4 !== A4'(m4) || before8 !== A8'(m8)) fail("accumulator moved before the clock edge");
    else if (e4 || e8) n_latency++;
    if (e4) begin
      if (((m4 + x4 * y4) >> A4) != (m4 >> A4)) n_wrap++;
      m4 += x4 * y4; n_acc++;
    end else n_hold++;
    if (e8) begin
      if (((m8 + x8 * y8) >> A8) != (m8 >> A8)) n_wrap++;
      m8 += x8 * y8; n_acc++;
    end else n_hold++;
    @(posedge clk);
    #1;
    checks++; if (acc4 !== A4'(m4)) fail($sformatf("acc4=%0d expected %0d", acc4, A4'(m4)));
    checks++; if (acc8 !== A8'(m8)) fail($sformatf("acc8=%0d expected %0d", acc8, A8'(m8)));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Part 1: dot products, the sum worked out separately from the stream.
    for (int v = 0; v < 12; v++) begin
      int len;
      longint unsigned dot4, dot8;
      logic [3:0] x4 [32], y4 [32];
      logic [7:0] x8 [32], y8 [32];
      len = (v == 11) ? 20 : 4 + ($urandom % 13);
      dot4 = 0; dot8 = 0;
      for (int k = 0; k < len; k++) begin
        if (v == 11) begin
          x4[k] = '1; y4[k] = '1; x8[k] = '1; y8[k] = '1;   // overflows both
        end else begin
          x4[k] = 4'($urandom); y4[k] = 4'($urandom);
          x8[k] = 8'($urandom); y8[k] = 8'($urandom);
        end
        dot4 += longint'(x4[k]) * longint'(y4[k]);
        dot8 += longint'(x8[k]) * longint'(y8[k]);
      end
      clear();
      for (int k = 0; k < len; k++) step(1, 1, x4[k], y4[k], x8[k], y8[k]);
      // Idle cycles: the result must stay put.
      step(0, 0, 4'($urandom), 4'($urandom), 8'($urandom), 8'($urandom));
      step(0, 0, 4'($urandom), 4'($urandom), 8'($urandom), 8'($urandom));
      checks++;
      if (acc4 !== A4'(dot4) || acc8 !== A8'(dot8))
        fail($sformatf("dot product %0d: got %0d/%0d expected %0d/%0d",
                       v, acc4, acc8, A4'(dot4), A8'(dot8)));
      n_dot++;
    end
    // Part 2: random stream with random enables.
    clear();
    for (int n = 0; n < 2000; n++) begin
      step(($urandom % 4) != 0, ($urandom % 4) != 0,
           4'($urandom), 4'($urandom), 8'($urandom), 8'($urandom));
    end
    $display("accumulate=%0d hold=%0d wrap=%0d reset=%0d latency=%0d dot_products=%0d",
             n_acc, n_hold, n_wrap, n_reset, n_latency, n_dot);
    checks++; if (n_acc    == 0) fail("no accumulate seen");
    checks++; if (n_hold   == 0) fail("no hold seen");
    checks++; if (n_wrap   == 0) fail("no wrap-around seen");
    checks++; if (n_reset  == 0) fail("no reset seen");
    checks++; if (n_latency == 0) fail("latency never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
