// Generate-and-propagate (PG) logic: stage 3, a Kogge-Stone prefix tree.
//
// Input: the bit generates g_in and propagates p_in of W positions. Output:
// the group generates g_out[i] = G_{i:0}, i.e. the carry out of position i.
// The tree has ceil(log2 W) levels. At level l the span is d = 2^l and
// position i
//   - i <  d     : passes through unchanged (a buffer, a wire here),
//   - d <= i < 2d: grey cell; the lower group (i-d) already reaches bit 0,
//                  so only the generate is formed,
//   - i >= 2d    : black cell, forming both group generate and propagate.
// This is the placement of the published 16-bit Kogge-Stone tree; for the
// W = 17 positions of the three-operand adder one more level is needed
// (5 instead of 4). After a grey cell the propagate of that position is
// never read again, so it is simply carried along; p_in[0] is not read by
// any cell because position 0 is buffered at every level.
// Purely combinational; the depth is log2(W) cell delays.
module pg_logic #(
  parameter int unsigned W = toa_pkg::TOA_N + 1
) (
  input  logic [W-1:0] g_in,
  input  logic [W-1:0] p_in,
  output logic [W-1:0] g_out
);

  import toa_pkg::pg_t;

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;

  // Each tree level holds its own array: cur is what the level reads (the
  // inputs, or the previous level's result), nxt what it produces.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    pg_t cur [W];
    pg_t nxt [W];

    for (genvar i = 0; i < W; i++) begin : g_pos
      if (l == 0) begin : g_from_in
        assign cur[i] = '{g: g_in[i], p: p_in[i]};
      end else begin : g_from_prev
        assign cur[i] = g_level[l-1].nxt[i];
      end

      if (i < D) begin : g_buf
        assign nxt[i] = cur[i];
      end else if (i < 2 * D) begin : g_grey
        grey_cell u_grey (
          .gk(cur[i].g),
          .pk(cur[i].p),
          .gj(cur[i-D].g),
          .g (nxt[i].g)
        );
        assign nxt[i].p = cur[i].p;
      end else begin : g_black
        black_cell u_black (
          .gk(cur[i].g),
          .pk(cur[i].p),
          .gj(cur[i-D].g),
          .pj(cur[i-D].p),
          .g (nxt[i].g),
          .p (nxt[i].p)
        );
      end
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_out_map
    if (LEVELS == 0) begin : g_direct
      assign g_out[i] = g_in[i];
    end else begin : g_tree
      assign g_out[i] = g_level[LEVELS-1].nxt[i].g;
    end
  end

endmodule : pg_logic
