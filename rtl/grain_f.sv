// grain_f: LFSR feedback function f of Grain-128AEAD (one copy).
//
//   f = s0 + s7 + s38 + s70 + s81 + s96      (+ is XOR)
//
// s[j] is LFSR bit s_{i+j} of the window the copy looks at; an n-way unrolled
// core instantiates one copy per new bit with the window moved by k.
// Purely combinational.  The taps are the cipher's; the 97-bit window port is
// this design's choice (bit 96 is the highest tap of every function).
module grain_f
  import grain_pkg::*;
(
  input  logic [WIN-1:0] s,
  output logic           f
);
  assign f = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
endmodule
