// cla_k_l2: second-level carry look-ahead unit for K (CLA-IV).
//
// Takes the inverted group generate/propagate of up to four cla_k4 blocks
// (block 0 the least significant) and K_2, the K value below block 0. Gives
// K at the top position of every block:
//   k_o[b] = GK_b (PK_b | k_o[b-1]),   k_o[-1] = K_2
// computed on the inverted inputs as
//   ~k_o[b] = GKn_b | PKn_b & ~k_o[b-1]
// In a 68-bit generator the outputs are K_18, K_34, K_50 and K_66, and also
// the K input of the next cla_k4 block. Follows the published design.
//
// Interface: gk_n, pk_n (4 bits each), k2 in; k_o (4 bits) out.
// Purely combinational.
module cla_k_l2 (
  input  logic [3:0] gk_n,
  input  logic [3:0] pk_n,
  input  logic       k2,
  output logic [3:0] k_o
);

  logic [4:0] kn;

  assign kn[0] = ~k2;

  for (genvar b = 0; b < 4; b++) begin : g_blk
    assign kn[b+1] = gk_n[b] | (pk_n[b] & kn[b]);
    assign k_o[b]  = ~kn[b+1];
  end

endmodule
