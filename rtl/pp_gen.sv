// pp_gen: partial product matrix of an N x N unsigned multiplication.
//
// Partial products use plain AND gates, not majority logic, so that the
// first stage of the multiplication stays simple and exact:
// pp[i][j] = b[i] & a[j], with weight 2**(i+j). Row i is the multiplicand
// a gated by multiplier bit b[i]. Purely combinational.
module pp_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,              // multiplicand
  input  logic [N-1:0] b,              // multiplier
  output logic [N-1:0] pp [N]          // pp[i][j] = b[i] & a[j]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end

endmodule
