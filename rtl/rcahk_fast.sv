// rcahk_fast: fast ripple 3X generator (RCAHK), two bits per stage.
//
// Computes S = 3X = 2X + X for an N-bit two's complement X (N even), giving an
// (N+2)-bit two's complement S. Bits are taken in pairs (i, i+1), i even.
// Each stage receives H_{i-1} and K_{i-1}, produces both sum bits directly
//   S_i     = x_i     ^ (~H_{i-1} & K_{i-1})
//   S_{i+1} = x_{i+1} ^ (~x_i & H_{i-1} | x_i & ~K_{i-1})
// and hands on the pair two positions further up in one complex gate each:
//   H_{i+1} = x_{i+1} & (x_i | H_{i-1})      (OR-AND)
//   K_{i+1} = x_{i+1} | (x_i & K_{i-1})      (AND-OR)
// so the ripple length is N/2 gates, with H and K travelling in parallel.
// H_{-1} = K_{-1} = 0. S_N is the last carry
//   C_{N-1} = H_{N-1} | x_{N-2} & K_{N-3}
// and S_{N+1} = x_{N-1}. The stage equations follow the published design
// (its illustration has N = 12, the default here); in the S_{i+1} equation
// the selecting bit is x_i, the bit just below, as the per-bit form of the
// sum requires. Which stages use inverting gates is left to synthesis.
//
// Interface: x (N bits) in, s (N+2 bits) out. Purely combinational, no clock.
module rcahk_fast #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0] x,
  output logic [N+1:0] s
);

  if (N < 2 || N % 2 != 0) begin : g_bad_n
    $error("rcahk_fast: N must be even and at least 2");
  end

  localparam int unsigned P = N / 2;   // number of two-bit stages

  // hc[p], kc[p] = H and K at bit 2p-1 (the input of stage p); hc[0] = H_{-1}
  logic [P:0] hc, kc;

  assign hc[0] = 1'b0;
  assign kc[0] = 1'b0;

  for (genvar p = 0; p < P; p++) begin : g_stage
    assign s[2*p]   = x[2*p] ^ (~hc[p] & kc[p]);
    assign s[2*p+1] = x[2*p+1] ^ ((~x[2*p] & hc[p]) | (x[2*p] & ~kc[p]));
    assign hc[p+1]  = x[2*p+1] & (x[2*p] | hc[p]);
    assign kc[p+1]  = x[2*p+1] | (x[2*p] & kc[p]);
  end

  assign s[N]   = hc[P] | (x[N-2] & kc[P-1]);
  assign s[N+1] = x[N-1];

endmodule
