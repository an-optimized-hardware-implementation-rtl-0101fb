// grain_g: NFSR feedback of Grain-128AEAD (one copy).
//
//   g = s0 + b0 + b26 + b56 + b91 + b96 + b3 b67 + b11 b13 + b17 b18
//       + b27 b59 + b40 b48 + b61 b65 + b68 b84 + b88 b92 b93 b95
//       + b70 b78 b82 + b22 b24 b25
//
// The LFSR bit s0 is included here, so g is the value shifted into the
// NFSR outside initialisation.  Combinational; b[j] is b_{i+j}.
module grain_g
  import grain_pkg::*;
(
  input  logic [WIN-1:0] b,
  input  logic           s0,
  output logic           g
);
  logic lin, quad, cub;

  always_comb begin
    lin  = s0 ^ b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96];
    quad = (b[3]  & b[67]) ^ (b[11] & b[13]) ^ (b[17] & b[18]) ^
           (b[27] & b[59]) ^ (b[40] & b[48]) ^ (b[61] & b[65]) ^
           (b[68] & b[84]);
    cub  = (b[88] & b[92] & b[93] & b[95]) ^
           (b[70] & b[78] & b[82]) ^
           (b[22] & b[24] & b[25]);
    g    = lin ^ quad ^ cub;
  end
endmodule
