// grain_y: pre-output function y of Grain-128AEAD (one copy).
//
//   h = b12 s8 + s13 s20 + b95 s42 + s60 s79 + b12 b95 s94
//   y = h + s93 + b2 + b15 + b36 + b45 + b64 + b73 + b89
//
// The two terms sharing b12 (b12 s8 + b12 b95 s94, the "AB xor ACD" shape)
// are kept separate here; a synthesis tool may factor them.  Combinational.
module grain_y
  import grain_pkg::*;
(
  input  logic [WIN-1:0] b,
  input  logic [WIN-1:0] s,
  output logic           y
);
  logic h;

  always_comb begin
    h = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^
        (s[60] & s[79]) ^ (b[12] & b[95] & s[94]);
    y = h ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^ b[73] ^ b[89];
  end
endmodule
