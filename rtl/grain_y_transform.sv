// grain_y_transform: the pre-output function y split into three parts for
// the bit-serial Galois-form registers.
//
// During initialisation y is added to the new bit of both registers.  Instead
// of computing all of y for position 127 in one clock, y is cut into three
// groups of terms that are added to the same register bit as it passes
// positions 127, 126 and 125.  The group added at 127 - d has its indices
// lowered by d, because it reads the state d clocks later:
//   y127 = b12 s8 + s13 s20 + b95 s42
//   y126 = b11 b94 s93 + b72 + b1 + s59 s78
//   y125 = s91 + b87 + b13 + b34 + b43 + b62
// Shifting y126 back up by one and y125 by two gives the thirteen terms of
// y again.  The split is the one given for the bit-serial version;
// nothing else is this module's own.  Purely combinational; inputs are the
// register bits b[0..95] and s[0..94] of the current clock.
module grain_y_transform (
  input  logic [95:0] b,
  input  logic [94:0] s,
  output logic        y127,
  output logic        y126,
  output logic        y125
);
  assign y127 = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]);
  assign y126 = (b[11] & b[94] & s[93]) ^ b[72] ^ b[1] ^ (s[59] & s[78]);
  assign y125 = s[91] ^ b[87] ^ b[13] ^ b[34] ^ b[43] ^ b[62];
endmodule
