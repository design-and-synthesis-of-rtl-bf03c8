// mlg_pkg: constants shared by the majority-logic MAC units.
//
// The two operand widths are the two configurations of the design: a 4x4
// base unit and its 8x8 expansion. The product of an N x N unsigned
// multiplication is 2N bits wide. How many bits the accumulator adds on top
// of the product is not specified for this design; ACC_GUARD is this
// design's choice and lets 2**ACC_GUARD full-scale products be summed
// before the accumulator wraps around.
package mlg_pkg;

  localparam int unsigned N_BASE     = 4;  // 4x4 MAC
  localparam int unsigned N_EXPANDED = 8;  // 8x8 MAC
  localparam int unsigned ACC_GUARD  = 4;  // accumulator bits beyond the product

  // Accumulator width for an N-bit operand unit.
  function automatic int unsigned acc_width(int unsigned n);
    return 2 * n + ACC_GUARD;
  endfunction

endpackage
