// hk3x_top: the H/K family of 3X generators, side by side.
//
// The hard multiple 3X of radix-8 (Booth-3) multiplication is normally made
// by a full adder chain computing 2X + X. Because neighbouring adder cells
// see the same input bit, the carries collapse into two simpler signals, H
// and K, which can be rippled, looked ahead or prefix-combined much like a
// carry but with the input bits themselves as generate/propagate terms.
// Four generators built on that idea are instantiated here, each with its own
// operand and result, at the widths of the published design's illustrations:
//   ripple : rcahk_ripple, one H/K step per bit        (N_RIPPLE = 12)
//   rca    : rcahk_fast, two bits per step (RCAHK)     (N_RCA    = 12)
//   cla    : clahk, two-level look-ahead (CLAHK)       (N_CLA    = 68)
//   ppa    : ppahk, parallel prefix (PPAHK)            (N_PPA    = 18)
// All produce S = 3X, (N+2) bits two's complement, from an N-bit two's
// complement X, combinationally. They are alternatives: an integrator would
// keep the one that suits its width and timing.
//
// Interface: x_<g> in, s_<g> out for each generator g. No clock.
module hk3x_top #(
  parameter int unsigned N_RIPPLE = 12,
  parameter int unsigned N_RCA    = 12,
  parameter int unsigned N_CLA    = 68,
  parameter int unsigned N_PPA    = 18
) (
  input  logic [N_RIPPLE-1:0] x_ripple,
  output logic [N_RIPPLE+1:0] s_ripple,
  input  logic [N_RCA-1:0]    x_rca,
  output logic [N_RCA+1:0]    s_rca,
  input  logic [N_CLA-1:0]    x_cla,
  output logic [N_CLA+1:0]    s_cla,
  input  logic [N_PPA-1:0]    x_ppa,
  output logic [N_PPA+1:0]    s_ppa
);

  rcahk_ripple #(.N(N_RIPPLE)) u_ripple (.x(x_ripple), .s(s_ripple));
  rcahk_fast   #(.N(N_RCA))    u_rca    (.x(x_rca),    .s(s_rca));
  clahk        #(.N(N_CLA))    u_cla    (.x(x_cla),    .s(s_cla));
  ppahk        #(.N(N_PPA))    u_ppa    (.x(x_ppa),    .s(s_ppa));

endmodule
