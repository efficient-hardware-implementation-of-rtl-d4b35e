// cla_h_l2: second-level carry look-ahead unit for H (CLA-II).
//
// Takes the inverted group generate/propagate of up to four cla_h4 blocks
// (block 0 the least significant) and H_2, the H value below block 0. Gives
// H at the top position of every block:
//   h_o[b] = GH_b | PH_b h_o[b-1],   h_o[-1] = H_2
// written, as in the published design, directly on the inverted inputs:
//   h_o[0] = ~(GHn_0 & (PHn_0 | ~H_2))
//   h_o[1] = ~(GHn_1 & (PHn_1 | GHn_0 & (PHn_0 | ~H_2)))  ... and so on.
// The generate loop below writes these nested terms; each output is a function of the
// inputs only, which synthesis is free to flatten. In a 68-bit
// generator the outputs are H_18, H_34, H_50 and H_66, and also the H input
// of the next cla_h4 block.
//
// Interface: gh_n, ph_n (4 bits each), h2 in; h_o (4 bits) out.
// Purely combinational.
module cla_h_l2 (
  input  logic [3:0] gh_n,
  input  logic [3:0] ph_n,
  input  logic       h2,
  output logic [3:0] h_o
);

  // inverted H below each block: hn[b] = ~H below block b
  logic [4:0] hn;

  assign hn[0] = ~h2;

  for (genvar b = 0; b < 4; b++) begin : g_blk
    assign hn[b+1] = gh_n[b] & (ph_n[b] | hn[b]);
    assign h_o[b]  = ~hn[b+1];
  end

endmodule
