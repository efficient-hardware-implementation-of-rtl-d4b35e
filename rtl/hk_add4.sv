// hk_add4: four-bit final-sum module of the H/K 3X generators.
//
// Given H_b and K_b at a group position b = 4j+2 and the four input bits
// above it, x_{b+1} .. x_{b+4}, it forms the four sum bits S_{b+1} .. S_{b+4}
// without any carry signal:
//   S_{b+1} = x_{b+1} ^ (H_b & ~K_b)
//   S_{b+2} = x_{b+2} ^ (x_{b+1} & ~H_b | ~x_{b+1} & K_b)
//   H_{b+2} = x_{b+2} | x_{b+1} & H_b       K_{b+2} = x_{b+2} & (x_{b+1} | K_b)
//   S_{b+3} = x_{b+3} ^ (H_{b+2} & ~K_{b+2})
//   S_{b+4} = x_{b+4} ^ (x_{b+3} & ~H_{b+2} | ~x_{b+3} & K_{b+2})
// The local pair H_{b+2}, K_{b+2} is also brought out (h_mid, k_mid); a
// generator whose width N has N-2 = b+2 needs it for its top bits.
// Equations follow the published design.
//
// Interface: x (4 bits, x[0] = x_{b+1}), h_in, k_in in; s (4 bits, s[0] =
// S_{b+1}), h_mid, k_mid out. Purely combinational.
module hk_add4 (
  input  logic [3:0] x,
  input  logic       h_in,
  input  logic       k_in,
  output logic [3:0] s,
  output logic       h_mid,
  output logic       k_mid
);

  always_comb begin
    h_mid = x[1] | (x[0] & h_in);
    k_mid = x[1] & (x[0] | k_in);
    s[0]  = x[0] ^ (h_in & ~k_in);
    s[1]  = x[1] ^ ((x[0] & ~h_in) | (~x[0] & k_in));
    s[2]  = x[2] ^ (h_mid & ~k_mid);
    s[3]  = x[3] ^ ((x[2] & ~h_mid) | (~x[2] & k_mid));
  end

endmodule
