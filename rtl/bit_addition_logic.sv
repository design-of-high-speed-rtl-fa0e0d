// Bit-addition logic: stage 1 of the three-operand adder.
//
// A row of N independent full adders compresses the three N-bit operands
// a, b, c into two words with a + b + c = s + 2*cy: the sum word s (bit i
// has weight 2^i) and the carry word cy (bit i has weight 2^(i+1)). There is
// no carry chain between the cells, so the delay is one full adder whatever
// N is. Purely combinational.
module bit_addition_logic #(
  parameter int unsigned N = toa_pkg::TOA_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a_i (a[i]),
      .b_i (b[i]),
      .c_i (c[i]),
      .s_i (s[i]),
      .cy_i(cy[i])
    );
  end

endmodule : bit_addition_logic
