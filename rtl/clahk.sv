// clahk: two-level carry look-ahead 3X generator (CLAHK).
//
// Computes S = 3X = 2X + X for an N-bit two's complement X as an (N+2)-bit
// two's complement S. H and K are only looked ahead at the positions 4j+2,
// one per four bits, using group signals that take the input bits themselves
// as generate and propagate terms:
//   hk_group_pg    gh/ph, gk/pk per group j; H_2 = gh_0, K_2 = gk_0
//   cla_h4 x4      (first level, H) groups 4b+1 .. 4b+4 of block b
//   cla_k4 x4      (first level, K) same groups
//   cla_h_l2       (second level, H) H at the top group of each block
//   cla_k_l2       (second level, K) K at the top group of each block
//   hk_final_add   sum bits from x and H/K at the group positions
// Block b's carry input is H_2/K_2 for b = 0 and the second level's output
// for block b-1 otherwise. With the default N = 68 there are 17 groups
// (H_2 .. H_66) and the second level gives H_18, H_34, H_50 and H_66, as in
// the published design. Smaller widths pad the unused groups with zeros; the
// structure holds up to 16 groups above group 0, that is N <= 70.
// The H and K networks are independent and work in parallel.
//
// Interface: x (N bits, N even, 4 <= N <= 70) in; s (N+2 bits) out.
// Purely combinational, no clock.
module clahk
  import hk3x_pkg::*;
#(
  parameter int unsigned N = 68,
  localparam int unsigned J = N / 4
) (
  input  logic [N-1:0] x,
  output logic [N+1:0] s
);

  if (N < 4 || N > 70 || N % 2 != 0) begin : g_bad_n
    $error("clahk: N must be even and between 4 and 70");
  end

  hk_gp_t [J-1:0] gph, gpk;

  hk_group_pg #(.N(N)) u_pg (
    .x   (x),
    .gph (gph),
    .gpk (gpk)
  );

  // groups 1..16 laid out for four first-level blocks; unused ones are 0
  logic [15:0] gh, ph, gk, pk;

  always_comb begin
    gh = '0; ph = '0; gk = '0; pk = '0;
    for (int j = 1; j < J; j++) begin
      gh[j-1] = gph[j].g;
      ph[j-1] = gph[j].p;
      gk[j-1] = gpk[j].g;
      pk[j-1] = gpk[j].p;
    end
  end

  logic [3:0]  gh_n, ph_n, gk_n, pk_n;   // first-level group outputs
  logic [3:0]  h_blk, k_blk;             // H/K at the top group of each block
  logic [15:0] h_grp, k_grp;             // H/K at groups 1..16

  for (genvar b = 0; b < 4; b++) begin : g_blk
    logic h_in, k_in;
    if (b == 0) begin : g_first
      assign h_in = gph[0].g;
      assign k_in = gpk[0].g;
    end else begin : g_next
      assign h_in = h_blk[b-1];
      assign k_in = k_blk[b-1];
    end

    cla_h4 u_cla_h (
      .gh     (gh[4*b +: 4]),
      .ph     (ph[4*b +: 4]),
      .h_in   (h_in),
      .h_o    (h_grp[4*b +: 3]),
      .gh_n_o (gh_n[b]),
      .ph_n_o (ph_n[b])
    );

    cla_k4 u_cla_k (
      .gk     (gk[4*b +: 4]),
      .pk     (pk[4*b +: 4]),
      .k_in   (k_in),
      .k_o    (k_grp[4*b +: 3]),
      .gk_n_o (gk_n[b]),
      .pk_n_o (pk_n[b])
    );

    assign h_grp[4*b+3] = h_blk[b];
    assign k_grp[4*b+3] = k_blk[b];
  end

  cla_h_l2 u_cla_h_l2 (
    .gh_n (gh_n),
    .ph_n (ph_n),
    .h2   (gph[0].g),
    .h_o  (h_blk)
  );

  cla_k_l2 u_cla_k_l2 (
    .gk_n (gk_n),
    .pk_n (pk_n),
    .k2   (gpk[0].g),
    .k_o  (k_blk)
  );

  // H/K at every group position 4j+2, j = 0 .. J-1
  logic [16:0] h_all, k_all;
  assign h_all = {h_grp, gph[0].g};
  assign k_all = {k_grp, gpk[0].g};

  hk_final_add #(.N(N)) u_sum (
    .x (x),
    .h (h_all[J-1:0]),
    .k (k_all[J-1:0]),
    .s (s)
  );

endmodule
