// Grey cell of the prefix tree.
//
// Used where the lower group already reaches bit 0, so only the group
// generate is needed (it is the carry into the next position):
//   g = gk | (pk & gj)
// One AND and one OR, as in the published cell schematic. Purely
// combinational.
module grey_cell (
  input  logic gk,
  input  logic pk,
  input  logic gj,
  output logic g
);

  always_comb begin
    g = gk | (pk & gj);
  end

endmodule : grey_cell
