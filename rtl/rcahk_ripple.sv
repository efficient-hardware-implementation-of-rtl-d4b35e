// rcahk_ripple: 3X generator with one H/K ripple step per bit.
//
// Computes S = 3X = 2X + X for an N-bit two's complement X, giving an
// (N+2)-bit two's complement S. Instead of a chain of full adders it ripples
// two carry-like signals, one bit at a time:
//   H_0 = x_0, K_0 = 0
//   H_i = x_i & H_{i-1} (i odd),  x_i | H_{i-1} (i even)
//   K_i = x_i | K_{i-1} (i odd),  x_i & K_{i-1} (i even)
// and forms each sum bit from the previous position's pair:
//   S_i = x_i ^ ( H_{i-1} & ~K_{i-1})  for i odd
//   S_i = x_i ^ (~H_{i-1} &  K_{i-1})  for i even     (H_{-1} = K_{-1} = 0)
// The top two bits are S_N = C_{N-1} (the last carry, C_i = H_{i-1} K_i for i
// odd and H_i K_{i-1} for i even) and S_{N+1} = x_{N-1}, so no sign
// extension is needed. The H and K chains are independent, so they ripple
// side by side. These recurrences and output equations follow the published
// design; the width N = 12 is that of its illustration. The gate-level
// polarity of the chain (inverting gates) is left to synthesis.
//
// Interface: x (N bits) in, s (N+2 bits) out. Purely combinational, no clock.
module rcahk_ripple #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0] x,
  output logic [N+1:0] s
);

  if (N < 2) begin : g_bad_n
    $error("rcahk_ripple: N must be at least 2");
  end

  logic [N-1:0] h, k;

  assign h[0] = x[0];
  assign k[0] = 1'b0;

  for (genvar i = 1; i < N; i++) begin : g_chain
    if (i % 2 == 1) begin : g_odd
      assign h[i] = x[i] & h[i-1];
      assign k[i] = x[i] | k[i-1];
    end else begin : g_even
      assign h[i] = x[i] | h[i-1];
      assign k[i] = x[i] & k[i-1];
    end
  end

  always_comb begin
    s[0] = x[0];
    for (int i = 1; i < N; i++) begin
      if (i % 2 == 1) s[i] = x[i] ^ ( h[i-1] & ~k[i-1]);
      else            s[i] = x[i] ^ (~h[i-1] &  k[i-1]);
    end
    // last carry C_{N-1}
    if ((N - 1) % 2 == 1) s[N] = h[N-2] & k[N-1];
    else                  s[N] = h[N-1] & k[N-2];
    s[N+1] = x[N-1];
  end

endmodule
