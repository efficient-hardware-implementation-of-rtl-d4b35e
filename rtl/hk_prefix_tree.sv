// hk_prefix_tree: binary parallel-prefix tree for the H or K group signals.
//
// Given NG group pairs (g_j, p_j), j = 0 the least significant, it returns
// for every j the combined span 0..j and outputs its generate term, which is
// H_{4j+2} (IS_K = 0, operator (g,p) o (g',p') = (g + p g', p p')) or
// K_{4j+2} (IS_K = 1, operator (g,p) . (g',p') = (g (p + g'), p + p')).
// Group 0 must carry ph_0 = 0 / pk_0 = 1 (see hk_group_pg), so that the span
// generate is the H or K value itself.
// The tree is of the Kogge-Stone kind: ceil(log2 NG) levels, level l
// combining each position with the one 2^l below it. The operators follow
// the published design; the tree shape is this design's choice, made to match
// the log2-depth prefix adder it is compared with. The published design builds the
// tree from alternating inverting gates; here both polarities are left to
// synthesis.
//
// Interface: gp (NG hk_gp_t) in; y (NG bits) out. Purely combinational.
module hk_prefix_tree
  import hk3x_pkg::*;
#(
  parameter int unsigned NG   = 4,
  parameter bit          IS_K = 1'b0
) (
  input  hk_gp_t [NG-1:0] gp,
  output logic   [NG-1:0] y
);

  localparam int unsigned L = (NG > 1) ? $clog2(NG) : 0;

  hk_gp_t [NG-1:0] lvl [L+1];

  assign lvl[0] = gp;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar j = 0; j < NG; j++) begin : g_node
      if (j >= (1 << l)) begin : g_op
        if (IS_K) begin : g_k
          assign lvl[l+1][j] = hk_op_k(lvl[l][j], lvl[l][j - (1 << l)]);
        end else begin : g_h
          assign lvl[l+1][j] = hk_op_h(lvl[l][j], lvl[l][j - (1 << l)]);
        end
      end else begin : g_pass
        assign lvl[l+1][j] = lvl[l][j];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NG; j++) y[j] = lvl[L][j].g;
  end

endmodule
