// mac_accumulator: the register of the MAC that holds the running sum.
//
// A W-bit synchronous register. On a rising clock edge with en = 1 it loads
// d, the new sum from the adder; with en = 0 it keeps its value. rst_n
// clears it asynchronously to zero. q is the register output, fed back to
// the adder and brought out as the MAC result.
// A register-based synchronous accumulator follows the design description;
// the load enable and the active-low asynchronous reset are this design's
// choices.
module mac_accumulator #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      q <= d;
    end
  end

endmodule
