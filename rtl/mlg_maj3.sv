// mlg_maj3: three-input majority logic gate (MLG).
//
// The output is 1 when at least two of the three inputs are 1:
// y = a&b | b&c | c&a. This is the only arithmetic primitive of the MAC:
// every carry, sum, generate and propagate signal of the full adders, the
// array multiplier and the prefix adder is built from this gate and
// inverters. A majority gate with one input tied to 0 acts as AND, tied to
// 1 as OR. Purely combinational.
module mlg_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  assign y = (a & b) | (b & c) | (c & a);

endmodule
