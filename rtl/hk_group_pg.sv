// hk_group_pg: group generate/propagate signals for H and K.
//
// One group j covers the input bits feeding position 4j+2. For j >= 1:
//   gh_j = x_{4j+2} | x_{4j+1} & x_{4j}        ph_j = x_{4j+1} & x_{4j-1}
//   gk_j = x_{4j+2} & (x_{4j+1} | x_{4j})      pk_j = x_{4j+1} | x_{4j-1}
// and for j = 0 gh_0 = x_2 | x_1 & x_0 (= H_2), gk_0 = x_2 & x_1 (= K_2).
// With these, H_{4j+2} = gh_j | ph_j & H_{4j-2} and
// K_{4j+2} = gk_j & (pk_j | K_{4j-2}); only one H and one K in four bit
// positions needs to be looked ahead. The equations follow the published design.
// Group 0 has no incoming span; this module gives it ph_0 = 0 and pk_0 = 1
// (its own choice), which make the combined spans of the look-ahead and
// prefix networks come out as H_{4j+2} and K_{4j+2} with no carry input.
//
// Interface: x (N bits, N >= 4) in; gph[j], gpk[j] (hk_gp_t each) out for
// j = 0 .. N/4-1. Purely combinational.
module hk_group_pg
  import hk3x_pkg::*;
#(
  parameter int unsigned N = 68,
  localparam int unsigned J = N / 4
) (
  input  logic   [N-1:0] x,
  output hk_gp_t [J-1:0] gph,
  output hk_gp_t [J-1:0] gpk
);

  if (N < 4) begin : g_bad_n
    $error("hk_group_pg: N must be at least 4");
  end

  always_comb begin
    gph[0].g = x[2] | (x[1] & x[0]);
    gph[0].p = 1'b0;
    gpk[0].g = x[2] & x[1];
    gpk[0].p = 1'b1;
    for (int j = 1; j < J; j++) begin
      gph[j].g = x[4*j+2] | (x[4*j+1] & x[4*j]);
      gph[j].p = x[4*j+1] & x[4*j-1];
      gpk[j].g = x[4*j+2] & (x[4*j+1] | x[4*j]);
      gpk[j].p = x[4*j+1] | x[4*j-1];
    end
  end

endmodule
