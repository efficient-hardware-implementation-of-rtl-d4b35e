// ppahk: parallel-prefix 3X generator (PPAHK).
//
// Computes S = 3X = 2X + X for an N-bit two's complement X as an (N+2)-bit
// two's complement S. A first level (hk_group_pg) forms gh/ph and gk/pk for
// each four-bit group; two independent binary prefix trees (hk_prefix_tree)
// turn them into H_{4j+2} and K_{4j+2} for all groups at once; the final
// addition (hk_final_add) produces the sum bits. The default N = 18 gives
// four groups (H_2, H_6, H_10, H_14) and two tree levels, as in the published
// design's illustration; S_15 .. S_17 and the carry S_18 come from the local
// H_16/K_16 of the top four-bit sum module.
//
// Interface: x (N bits, N even, N >= 4) in; s (N+2 bits) out.
// Purely combinational, no clock.
module ppahk
  import hk3x_pkg::*;
#(
  parameter int unsigned N = 18,
  localparam int unsigned J = N / 4
) (
  input  logic [N-1:0] x,
  output logic [N+1:0] s
);

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("ppahk: N must be even and at least 4");
  end

  hk_gp_t [J-1:0] gph, gpk;
  logic   [J-1:0] h, k;

  hk_group_pg #(.N(N)) u_pg (
    .x   (x),
    .gph (gph),
    .gpk (gpk)
  );

  hk_prefix_tree #(.NG(J), .IS_K(1'b0)) u_tree_h (
    .gp (gph),
    .y  (h)
  );

  hk_prefix_tree #(.NG(J), .IS_K(1'b1)) u_tree_k (
    .gp (gpk),
    .y  (k)
  );

  hk_final_add #(.N(N)) u_sum (
    .x (x),
    .h (h),
    .k (k),
    .s (s)
  );

endmodule
