// mag_comparator: N-bit unsigned magnitude comparator built as a binary tree
// of 2-bit comparator cells.
//
// The operands are zero-extended to W, the next power of two >= N (at least
// 2); for the default N = 8 no extension happens. Level 0 has W/2 cells, each
// comparing one aligned bit pair (a[2k+1:2k] against b[2k+1:2k]). Every
// further level merges two neighbouring results with the same cell, feeding
// the more significant pair's (a_big, b_big) into its bit-1 inputs and the
// less significant pair's into its bit-0 inputs, so the higher field wins
// unless it is equal. After log2(W) levels one cell remains; it gives
// a_gt_b (A > B) and a_lt_b (A < B). The tree uses W-1 cells in all (N-1 when
// N is a power of two) and its depth grows as log2(N). Combinational.
module mag_comparator #(
  parameter int unsigned N = 8    // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         a_gt_b,    // a > b (the "A_big" output)
  output logic         a_lt_b     // a < b (the "B_big" output)
);
  localparam int unsigned W = (N < 2) ? 2 : (1 << $clog2(N));  // padded width
  localparam int unsigned L = $clog2(W);                       // tree levels

  logic [W-1:0] ax, bx;
  assign ax = W'(a);
  assign bx = W'(b);

  // gt[j][k] / lt[j][k]: result of cell k on level j (W >> (j+1) cells).
  logic [W/2-1:0] gt [L];
  logic [W/2-1:0] lt [L];

  for (genvar k = 0; k < W / 2; k++) begin : g_leaf
    comp2_cell u_cell (
      .a1(ax[2*k+1]), .a0(ax[2*k]),
      .b1(bx[2*k+1]), .b0(bx[2*k]),
      .a_big(gt[0][k]), .b_big(lt[0][k])
    );
  end

  for (genvar j = 1; j < L; j++) begin : g_level
    for (genvar k = 0; k < (W >> (j + 1)); k++) begin : g_node
      comp2_cell u_cell (
        .a1(gt[j-1][2*k+1]), .a0(gt[j-1][2*k]),
        .b1(lt[j-1][2*k+1]), .b0(lt[j-1][2*k]),
        .a_big(gt[j][k]), .b_big(lt[j][k])
      );
    end
    // Slots above this level's cell count are never used; tie them off.
    if ((W >> (j + 1)) < W / 2) begin : g_fill
      assign gt[j][W/2-1:(W >> (j + 1))] = '0;
      assign lt[j][W/2-1:(W >> (j + 1))] = '0;
    end
  end

  assign a_gt_b = gt[L-1][0];
  assign a_lt_b = lt[L-1][0];
endmodule
