// mlg_mac_top: the two majority-logic MAC configurations side by side.
//
// The base 4x4 unit (4-bit operands, 8-bit product) and its 8x8 expansion
// (8-bit operands, 16-bit product) are both instances of mlg_mac, built the
// same way with wider multiplier array, adder and accumulator. They share
// the clock and the reset and otherwise have their own ports; each
// accumulates its product one clock edge after its enable is high, exactly
// as mlg_mac. Accumulators are 12 and 20 bits wide (product plus 4 guard
// bits, this design's choice).
module mlg_mac_top
  import mlg_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  // 4x4 unit
  input  logic                                 en4,
  input  logic [N_BASE-1:0]                    a4,
  input  logic [N_BASE-1:0]                    b4,
  output logic [2*N_BASE-1:0]                  product4,
  output logic [acc_width(N_BASE)-1:0]         acc4,
  // 8x8 unit
  input  logic                                 en8,
  input  logic [N_EXPANDED-1:0]                a8,
  input  logic [N_EXPANDED-1:0]                b8,
  output logic [2*N_EXPANDED-1:0]              product8,
  output logic [acc_width(N_EXPANDED)-1:0]     acc8
);

  mlg_mac #(.N(N_BASE)) u_mac4 (
    .clk(clk), .rst_n(rst_n), .en(en4),
    .a(a4), .b(b4), .product(product4), .acc(acc4)
  );

  mlg_mac #(.N(N_EXPANDED)) u_mac8 (
    .clk(clk), .rst_n(rst_n), .en(en8),
    .a(a8), .b(b8), .product(product8), .acc(acc8)
  );

endmodule
