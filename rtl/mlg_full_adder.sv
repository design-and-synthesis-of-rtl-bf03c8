// mlg_full_adder: one-bit full adder made of three majority gates.
//
// The carry is the majority of the three inputs, cout = M(a, b, cin), as
// in the design description. The sum is formed from majority gates and
// inversion only, with no XOR:
//   t    = M(a, b, ~cin)
//   sum  = M(~cout, cin, t)
// which equals a ^ b ^ cin for all eight input patterns. The exact sum
// network is this design's choice; the description only says that the sum
// combines majority logic with inversion. Purely combinational.
module mlg_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic t;

  mlg_maj3 u_carry (.a(a), .b(b), .c(cin),  .y(cout));
  mlg_maj3 u_mid   (.a(a), .b(b), .c(~cin), .y(t));
  mlg_maj3 u_sum   (.a(~cout), .b(cin), .c(t), .y(sum));

endmodule
