// Saltire cell: one position of the base logic (stage 2).
//
// Takes the sum bit S_i of the full adder at position i and the carry
// cy_{i-1} of the full adder to its right (the external carry input at
// position 0) and forms the bit generate and propagate of the two-operand
// addition S + 2*cy:
//   G_i = S_i & cy_{i-1}      P_i = S_i ^ cy_{i-1}
// Purely combinational; these are the equations of the architecture.
module saltire_cell (
  input  logic s_i,
  input  logic cy_im1,
  output logic g,
  output logic p
);

  always_comb begin
    g = s_i & cy_im1;
    p = s_i ^ cy_im1;
  end

endmodule : saltire_cell
