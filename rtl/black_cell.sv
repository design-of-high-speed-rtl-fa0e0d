// Black cell of the prefix tree.
//
// Merges an upper group (i:k) with the adjacent lower group (k-1:j):
//   g = gk | (pk & gj)   (group generate G_{i:j})
//   p = pk & pj          (group propagate P_{i:j})
// Port names and the two-AND, one-OR structure follow the published cell
// schematic. Purely combinational.
module black_cell (
  input  logic gk,
  input  logic pk,
  input  logic gj,
  input  logic pj,
  output logic g,
  output logic p
);

  always_comb begin
    g = gk | (pk & gj);
    p = pk & pj;
  end

endmodule : black_cell
