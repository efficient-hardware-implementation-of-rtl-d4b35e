// cla_k4: first-level four-group carry look-ahead unit for K (CLA-III).
//
// The AND/OR dual of cla_h4. Takes four consecutive group pairs (gk_m, pk_m),
// m = 0..3, and K_in = K_{4j+2}. Produces
//   k_o[0] = gk_0 (pk_0 | K_in)
//   k_o[1] = gk_1 (pk_1 | gk_0 (pk_0 | K_in))
//   k_o[2] = gk_2 (pk_2 | gk_1 (pk_1 | gk_0 (pk_0 | K_in)))
// and the block's group signals, inverted, for the second level:
//   gk_n_o = ~(gk_3 (pk_3 | gk_2 (pk_2 | gk_1 (pk_1 | gk_0))))
//   pk_n_o = ~(pk_3 | pk_2 | pk_1 | pk_0)
// so that K_out = GK (PK | K_in). Equations follow the published design.
//
// Interface: gk, pk (4 bits each), k_in in; k_o (3 bits), gk_n_o, pk_n_o out.
// Purely combinational.
module cla_k4 (
  input  logic [3:0] gk,
  input  logic [3:0] pk,
  input  logic       k_in,
  output logic [2:0] k_o,
  output logic       gk_n_o,
  output logic       pk_n_o
);

  always_comb begin
    k_o[0] = gk[0] & (pk[0] | k_in);
    k_o[1] = gk[1] & (pk[1] | (gk[0] & (pk[0] | k_in)));
    k_o[2] = gk[2] & (pk[2] | (gk[1] & (pk[1] | (gk[0] & (pk[0] | k_in)))));
    gk_n_o = ~(gk[3] & (pk[3] | (gk[2] & (pk[2] | (gk[1] & (pk[1] | gk[0]))))));
    pk_n_o = ~(pk[3] | pk[2] | pk[1] | pk[0]);
  end

endmodule
