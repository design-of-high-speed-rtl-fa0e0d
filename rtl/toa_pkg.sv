// Shared constants and types of the three-operand adder.
//
// TOA_N is the operand width of the adder as published (16-bit operands,
// 18-bit result). pg_t bundles the generate/propagate pair that travels
// through the Kogge-Stone prefix tree; each tree level holds one pg_t per
// bit position.
package toa_pkg;

  // Default operand width: three 16-bit operands giving an 18-bit sum.
  parameter int unsigned TOA_N = 16;

  // Generate / propagate pair of one bit position or one bit group.
  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

endpackage : toa_pkg
