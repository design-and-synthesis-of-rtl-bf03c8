// mlg_array_multiplier: N x N unsigned array multiplier whose reduction
// path is built from majority-logic full adders.
//
// The partial products come from pp_gen (AND gates). They are reduced by a
// carry-save array of N-1 rows of N majority-logic full adders; row i adds
// partial product row i to the sum and carry vectors of row i-1, aligned by
// weight:
//   row i, column j:  pp[i][j] + s[i-1][j+1] + c[i-1][j]  ->  s[i][j], c[i][j]
// Product bit i (i < N) leaves the array as s[i][0]. A final row of N
// majority-logic full adders, chained as a ripple-carry adder, merges the
// remaining sum and carry vectors into the upper N product bits.
// Majority logic in the reduction path follows the design description; the
// carry-save array with a final ripple row (Braun organisation) is this
// design's choice of array. Full adders whose third input is the constant 0
// act as half adders. Purely combinational.
module mlg_array_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,     // multiplicand
  input  logic [N-1:0]   b,     // multiplier
  output logic [2*N-1:0] p      // product a * b
);

  logic [N-1:0] pp [N];
  logic [N-1:0] s  [N];   // s[i][j]: sum of row i, column j, weight i+j
  logic [N-1:0] c  [N];   // c[i][j]: carry of row i, column j, weight i+j+1
  logic [N:0]   rc;       // ripple carries of the final row

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  // Row 0 is the first partial product row itself.
  assign s[0] = pp[0];
  assign c[0] = '0;

  for (genvar i = 1; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic s_in;
      if (j == N - 1) begin : g_edge
        assign s_in = 1'b0;
      end else begin : g_inner
        assign s_in = s[i-1][j+1];
      end
      mlg_full_adder u_fa (
        .a   (pp[i][j]),
        .b   (s_in),
        .cin (c[i-1][j]),
        .sum (s[i][j]),
        .cout(c[i][j])
      );
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_low
    assign p[i] = s[i][0];
  end

  // Final ripple row: product bit N+k from s[N-1][k+1] and c[N-1][k].
  assign rc[0] = 1'b0;
  for (genvar k = 0; k < N; k++) begin : g_final
    logic s_in;
    if (k == N - 1) begin : g_edge
      assign s_in = 1'b0;
    end else begin : g_inner
      assign s_in = s[N-1][k+1];
    end
    mlg_full_adder u_fa (
      .a   (s_in),
      .b   (c[N-1][k]),
      .cin (rc[k]),
      .sum (p[N+k]),
      .cout(rc[k+1])
    );
  end
  // The last carry is always 0: (2**N-1)**2 fits in 2N bits.
  always_comb begin
    assert (rc[N] == 1'b0) else $error("array multiplier: final carry set");
  end

endmodule
