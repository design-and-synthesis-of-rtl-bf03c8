// mlg_mac: N x N unsigned multiply-accumulate unit built on majority logic.
//
// Datapath, in the order of the block diagram:
//   mlg_array_multiplier   p = a * b (AND partial products, majority-logic
//                          full-adder reduction), 2N bits;
//   mlg_lf_adder           acc + p, a Ladner-Fischer prefix adder of
//                          majority gates, ACC_W bits, carry-in 0;
//   mac_accumulator        the register that stores the sum and feeds it
//                          back to the adder.
// Timing: on every rising clock edge with en = 1 the accumulator takes
// acc + a*b, so a product appears in acc one cycle after its operands.
// Multiplier and adder are one combinational path between the operand
// inputs / accumulator and the register. product shows a*b of the current
// operands combinationally. The accumulator wraps modulo 2**ACC_W.
// The three-block structure, the feedback and the use of majority logic
// follow the design description; unsigned operands, the accumulator width
// (2N + ACC_GUARD bits), the enable and the reset are this design's choices.
module mlg_mac
  import mlg_pkg::*;
#(
  parameter int unsigned N     = N_BASE,
  parameter int unsigned ACC_W = acc_width(N)
) (
  input  logic             clk,
  input  logic             rst_n,     // asynchronous, active low: clears acc
  input  logic             en,        // accumulate a*b on this clock edge
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-1:0]   product,   // a * b, combinational
  output logic [ACC_W-1:0] acc        // running sum
);

  logic [ACC_W-1:0] sum;
  logic             unused_cout;

  mlg_array_multiplier #(.N(N)) u_mult (.a(a), .b(b), .p(product));

  mlg_lf_adder #(.W(ACC_W)) u_add (
    .a   (acc),
    .b   (ACC_W'(product)),
    .cin (1'b0),
    .sum (sum),
    .cout(unused_cout)   // dropped: the accumulator wraps around
  );

  mac_accumulator #(.W(ACC_W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (sum),
    .q    (acc)
  );

endmodule
