// or_tree: log2(N)-stage OR tree.
//
// Reduces the N match flags of the dictionary cells to the single Matched
// signal, pairwise, one level per stage, so Matched is ready in the same cycle
// as the comparisons. Combinational. The function and the tree shape follow
// the design; inputs beyond N in the padded top level are zero.
module or_tree #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] x,
  output logic         y
);
  localparam int unsigned L = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P = 2 ** L;

  logic [P-1:0] lvl [L+1];

  assign lvl[0] = P'(x);
  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar j = 0; j < P; j++) begin : g_node
      if (j < (P >> (l + 1))) begin : g_or
        assign lvl[l+1][j] = lvl[l][2*j] | lvl[l][2*j+1];
      end else begin : g_zero
        assign lvl[l+1][j] = 1'b0;
      end
    end
  end
  assign y = lvl[L][0];
endmodule
