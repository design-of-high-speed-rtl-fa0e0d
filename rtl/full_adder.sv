// One-bit full adder: the cell of the bit-addition stage.
//
// Adds three bits of equal weight and returns their sum bit s_i (weight 1)
// and carry bit cy_i (weight 2). s_i is the three-input XOR, cy_i the
// majority function. Purely combinational, no clock.
//
// The full adder itself is the classic cell named by the architecture; its
// gate-level expressions are this implementation's choice (XOR/majority).
module full_adder (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic s_i,
  output logic cy_i
);

  always_comb begin
    s_i  = a_i ^ b_i ^ c_i;
    cy_i = (a_i & b_i) | (b_i & c_i) | (a_i & c_i);
  end

endmodule : full_adder
