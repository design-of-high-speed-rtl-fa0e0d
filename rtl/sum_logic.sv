// Sum logic: stage 4 of the three-operand adder (prefix post-processing).
//
// Combines the bit propagates p of the N+1 positions with the carries from
// the prefix tree, g_grp[i] = G_{i:0}:
//   s[0]   = p[0]                 (the carry input is already inside G_0/P_0)
//   s[i]   = p[i] ^ g_grp[i-1]    for 1 <= i <= N
//   s[N+1] = g_grp[N]             (carry-out)
// Purely combinational. The architecture names this stage but does not
// spell it out; these are the usual post-processing equations of a
// parallel-prefix adder.
module sum_logic #(
  parameter int unsigned N = toa_pkg::TOA_N
) (
  input  logic [N:0]   p,
  input  logic [N:0]   g_grp,
  output logic [N+1:0] s
);

  always_comb begin
    s[0]   = p[0];
    s[N:1] = p[N:1] ^ g_grp[N-1:0];
    s[N+1] = g_grp[N];
  end

endmodule : sum_logic
