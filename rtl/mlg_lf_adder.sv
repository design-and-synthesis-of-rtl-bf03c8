// mlg_lf_adder: W-bit Ladner-Fischer parallel-prefix adder built from
// majority gates and inverters.
//
// Bit level: generate g_i = M(a_i, b_i, 0) and propagate p_i = M(a_i, b_i, 1)
// (AND and OR). The carry-in is folded into bit 0 as g_0 = M(a_0, b_0, cin),
// the carry out of bit 0.
// Prefix tree (Ladner-Fischer, odd/even form):
//   level 1        every odd bit i merges with bit i-1;
//   levels 2..K    the odd bits form a Sklansky tree: at level k+1 an odd
//                  bit i with bit k of i set merges with the group ending at
//                  bit ((i >> (k+1)) << (k+1)) + 2**k - 1;
//   last level     every even bit i >= 2 merges with the finished odd bit
//                  i-1.
// After it, G_i is the carry into bit i+1. Each sum bit is built like the
// majority full adder, from the carry into and out of the bit:
//   s_i = M(~c_{i+1}, c_i, M(a_i, b_i, ~c_i)).
// The adder type and its use of majority logic follow the design's block
// diagram; the tree shape, the AND/OR propagate and the sum network are this
// design's choices. Any W >= 2 is allowed. Purely combinational; the depth
// is ceil(log2(W)) + 1 prefix levels.
module mlg_lf_adder #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LOGW = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned NLV  = LOGW + 2;   // bit level, LOGW tree levels, fix-up

  logic [W-1:0] gl [NLV];
  logic [W-1:0] pl [NLV];
  logic [W:0]   c;

  // Bit-level generate and propagate.
  for (genvar i = 0; i < W; i++) begin : g_bit
    mlg_maj3 u_g (.a(a[i]), .b(b[i]), .c((i == 0) ? cin : 1'b0), .y(gl[0][i]));
    mlg_maj3 u_p (.a(a[i]), .b(b[i]), .c(1'b1),                   .y(pl[0][i]));
  end

  // Level 1 (pairs) and levels 2..LOGW (Sklansky over odd bits).
  for (genvar lv = 1; lv <= LOGW; lv++) begin : g_lvl
    localparam int unsigned K = lv - 1;
    for (genvar i = 0; i < W; i++) begin : g_node
      localparam int unsigned J = ((i >> (K + 1)) << (K + 1)) + (1 << K) - 1;
      if ((i % 2 == 1) && (((i >> K) & 1) == 1)) begin : g_cell
        mlg_prefix_cell u_cell (
          .g_hi(gl[lv-1][i]), .p_hi(pl[lv-1][i]),
          .g_lo(gl[lv-1][J]), .p_lo(pl[lv-1][J]),
          .g   (gl[lv][i]),   .p   (pl[lv][i])
        );
      end else begin : g_wire
        assign gl[lv][i] = gl[lv-1][i];
        assign pl[lv][i] = pl[lv-1][i];
      end
    end
  end

  // Fix-up level: even bits merge with the finished odd bit below them.
  for (genvar i = 0; i < W; i++) begin : g_fix
    if ((i % 2 == 0) && (i >= 2)) begin : g_cell
      mlg_prefix_cell u_cell (
        .g_hi(gl[LOGW][i]),   .p_hi(pl[LOGW][i]),
        .g_lo(gl[LOGW][i-1]), .p_lo(pl[LOGW][i-1]),
        .g   (gl[NLV-1][i]),  .p   (pl[NLV-1][i])
      );
    end else begin : g_wire
      assign gl[NLV-1][i] = gl[LOGW][i];
      assign pl[NLV-1][i] = pl[LOGW][i];
    end
  end

  // Carries and majority-logic sum bits.
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_sum
    logic t;
    assign c[i+1] = gl[NLV-1][i];
    mlg_maj3 u_t (.a(a[i]),     .b(b[i]), .c(~c[i]), .y(t));
    mlg_maj3 u_s (.a(~c[i+1]),  .b(c[i]), .c(t),     .y(sum[i]));
  end

  assign cout = c[W];

endmodule
