// hk_final_add: final addition of the look-ahead and prefix 3X generators.
//
// Once H and K are known at every group position 4j+2 (j = 0 .. N/4-1),
// this block forms the whole (N+2)-bit result S = 3X:
//   S_0 = x_0,  S_1 = x_1 ^ x_0,  S_2 = x_2 ^ (x_1 & ~x_0)
//   S_3 .. S_{N-1}: one hk_add4 per group, each fed by H/K of its group
//   S_N     = H_{N-2} & x_{N-1} | K_{N-2}      (the last carry)
//   S_{N+1} = x_{N-1}                          (sign)
// When N is a multiple of 4, H_{N-2}/K_{N-2} are the top group's inputs;
// otherwise (N = 4J+2) they are the local pair of the top hk_add4. Inputs
// above bit N-1 of the top hk_add4 are tied to 0 and its surplus outputs
// are not used (when N is a multiple of 4 the local pairs h_mid/k_mid of
// all copies go unused, which lint reports as unused signals; synthesis
// removes that logic). The equations follow the published design; covering both
// width classes with one structure is this design's own arrangement.
//
// Interface: x (N bits, N even, N >= 4), h, k (N/4 bits, h[j] = H_{4j+2})
// in; s (N+2 bits) out. Purely combinational.
module hk_final_add #(
  parameter int unsigned N = 68,
  localparam int unsigned J = N / 4
) (
  input  logic [N-1:0] x,
  input  logic [J-1:0] h,
  input  logic [J-1:0] k,
  output logic [N+1:0] s
);

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("hk_final_add: N must be even and at least 4");
  end

  localparam int unsigned XW = 4 * J + 3;   // x padded up to bit 4(J-1)+6

  logic [XW-1:3]  xp;      // xp[i] = x_i, 0 above N-1
  logic [4*J-1:0] sg;      // sg[4j+m] = S_{4j+3+m}
  logic [J-1:0]   hm, km;  // H/K at 4j+4

  assign xp = (XW-3)'(x >> 3);

  for (genvar j = 0; j < J; j++) begin : g_add
    hk_add4 u_add4 (
      .x     (xp[4*j+3 +: 4]),
      .h_in  (h[j]),
      .k_in  (k[j]),
      .s     (sg[4*j +: 4]),
      .h_mid (hm[j]),
      .k_mid (km[j])
    );
  end

  logic h_top, k_top;   // H_{N-2}, K_{N-2}

  if (N % 4 == 0) begin : g_top_group
    assign h_top = h[J-1];
    assign k_top = k[J-1];
  end else begin : g_top_local
    assign h_top = hm[J-1];
    assign k_top = km[J-1];
  end

  always_comb begin
    s[0] = x[0];
    s[1] = x[1] ^ x[0];
    s[2] = x[2] ^ (x[1] & ~x[0]);
    for (int i = 3; i < N; i++) s[i] = sg[i-3];
    s[N]   = (h_top & x[N-1]) | k_top;
    s[N+1] = x[N-1];
  end

endmodule
