// cla_h4: first-level four-group carry look-ahead unit for H (CLA-I).
//
// Takes four consecutive group pairs (gh_m, ph_m), m = 0..3 (0 the least
// significant), and the H value below them, H_in = H_{4j+2}. Produces
//   h_o[0] = gh_0 | ph_0 H_in
//   h_o[1] = gh_1 | ph_1 (gh_0 | ph_0 H_in)
//   h_o[2] = gh_2 | ph_2 (gh_1 | ph_1 (gh_0 | ph_0 H_in))
// that is H at the next three group positions, plus the block's group
// generate and propagate in inverted form for the second level:
//   gh_n_o = ~(gh_3 | ph_3 (gh_2 | ph_2 (gh_1 | ph_1 gh_0)))
//   ph_n_o = ~(ph_3 ph_2 ph_1 ph_0)
// The H of the fourth position comes from the second level (cla_h_l2).
// Equations and the inverted group outputs follow the published design.
//
// Interface: gh, ph (4 bits each), h_in in; h_o (3 bits), gh_n_o, ph_n_o out.
// Purely combinational.
module cla_h4 (
  input  logic [3:0] gh,
  input  logic [3:0] ph,
  input  logic       h_in,
  output logic [2:0] h_o,
  output logic       gh_n_o,
  output logic       ph_n_o
);

  always_comb begin
    h_o[0] = gh[0] | (ph[0] & h_in);
    h_o[1] = gh[1] | (ph[1] & gh[0]) | (ph[1] & ph[0] & h_in);
    h_o[2] = gh[2] | (ph[2] & gh[1]) | (ph[2] & ph[1] & gh[0])
           | (ph[2] & ph[1] & ph[0] & h_in);
    gh_n_o = ~(gh[3] | (ph[3] & (gh[2] | (ph[2] & (gh[1] | (ph[1] & gh[0]))))));
    ph_n_o = ~(ph[3] & ph[2] & ph[1] & ph[0]);
  end

endmodule
