// Base logic: stage 2 of the three-operand adder, N+1 saltire cells.
//
// The stage-1 words are realigned so that bit i of the second operand is the
// carry of position i-1: position 0 pairs S_0 with the external carry input
// cin, positions 1..N-1 pair S_i with cy_{i-1}, and the extra position N
// pairs cy_{N-1} with a sum bit of 0 (there is no S_N), giving G_N = 0 and
// P_N = cy_{N-1}. Outputs g and p are the N+1 bit generates and propagates
// fed to the prefix tree. Purely combinational.
//
// The cell count N+1 and the use of cin in the first cell follow the
// architecture; tying the missing S_N to 0 is this implementation's reading.
module base_logic #(
  parameter int unsigned N = toa_pkg::TOA_N
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] cy,
  input  logic         cin,
  output logic [N:0]   g,
  output logic [N:0]   p
);

  // Operands of the saltire cells: sum bits padded with a 0 at position N,
  // carries shifted up by one with cin entering at position 0.
  logic [N:0] s_ext;
  logic [N:0] cy_shift;

  assign s_ext    = {1'b0, s};
  assign cy_shift = {cy, cin};

  for (genvar i = 0; i <= N; i++) begin : g_cell
    saltire_cell u_cell (
      .s_i   (s_ext[i]),
      .cy_im1(cy_shift[i]),
      .g     (g[i]),
      .p     (p[i])
    );
  end

endmodule : base_logic
