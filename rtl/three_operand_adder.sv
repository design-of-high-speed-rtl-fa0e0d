// Three-operand binary adder: s = a + b + c + cin, in four combinational
// stages, with a carry path of logarithmic depth.
//
//   1. bit_addition_logic: N full adders reduce a, b, c to a sum word S and
//      a carry word cy (a + b + c = S + 2*cy), one full-adder delay.
//   2. base_logic: N+1 saltire cells form G_i = S_i & cy_{i-1} and
//      P_i = S_i ^ cy_{i-1}; cin takes the place of cy_{-1}.
//   3. pg_logic: a Kogge-Stone tree of black and grey cells over the N+1
//      positions yields every carry G_{i:0} in ceil(log2(N+1)) levels.
//   4. sum_logic: s_i = P_i ^ G_{i-1:0}, s_{N+1} = G_{N:0}.
// Unlike a carry-save adder with a ripple-carry second stage, no carry
// ripples through N cells; unlike two cascaded prefix adders, only one
// prefix tree is needed.
//
// Interface: operands a, b, c (N bits), carry input cin, result s
// (N+2 bits, enough for 3*(2^N - 1) + 1). Default N = 16 as published
// (a, b, c are 15:0 and S is 17:0). There is no clock: s settles one
// combinational delay after the inputs. Register the inputs and outputs
// outside this module if a pipelined adder is wanted.
module three_operand_adder #(
  parameter int unsigned N = toa_pkg::TOA_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N+1:0] s
);

  logic [N-1:0] s_bit;   // stage-1 sum word
  logic [N-1:0] cy_bit;  // stage-1 carry word
  logic [N:0]   g_bit;   // stage-2 bit generates
  logic [N:0]   p_bit;   // stage-2 bit propagates
  logic [N:0]   g_grp;   // stage-3 group generates G_{i:0}

  bit_addition_logic #(.N(N)) u_bit_add (
    .a (a),
    .b (b),
    .c (c),
    .s (s_bit),
    .cy(cy_bit)
  );

  base_logic #(.N(N)) u_base (
    .s  (s_bit),
    .cy (cy_bit),
    .cin(cin),
    .g  (g_bit),
    .p  (p_bit)
  );

  pg_logic #(.W(N + 1)) u_pg (
    .g_in (g_bit),
    .p_in (p_bit),
    .g_out(g_grp)
  );

  sum_logic #(.N(N)) u_sum (
    .p    (p_bit),
    .g_grp(g_grp),
    .s    (s)
  );

endmodule : three_operand_adder
