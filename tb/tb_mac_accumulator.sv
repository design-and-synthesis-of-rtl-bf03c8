// tb_mac_accumulator: checks the accumulator register: asynchronous clear,
// load on a clock edge with en = 1, hold with en = 0, against a reference
// register kept in the testbench.
module tb_mac_accumulator;
  localparam int W = 12;
  logic         clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  mac_accumulator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #1 rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %0h", q); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (en) begin model = d; loads++; end else holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%0b q=%0h expected %0h", n, en, q, model);
      end
    end
    // Asynchronous clear in the middle of a cycle.
    @(negedge clk);
    en = 0; d = '1;
    #2 rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async clear q=%0h", q); end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL load/hold not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
