// grain_crypt: keystream extraction and encryption/decryption.
//
// In normal operation the even y bits are keystream: z[i] = y[2i].  Each
// message bit m[i] whose ce[i] is high is XORed with z[i] (encrypted or
// decrypted); with ce[i] low it passes unchanged, as for associated data
// that is authenticated but not encrypted.  Outside normal operation the
// keystream and the data output are forced to zero.  Combinational.
// P = N/2 bits per call; for N = 1 (bit-serial) P = 1, y[0] is the
// keystream bit and normal must only be high on keystream clocks.
// The split of y into keystream and MAC bits and the ce mux follow the
// architecture; a per-bit ce is this design's reading of "per message bit".
module grain_crypt #(
  parameter int unsigned N = 64,
  localparam int unsigned P = (N > 1) ? N / 2 : 1
) (
  input  logic [N-1:0]   y,
  input  logic           normal,
  input  logic [P-1:0]   m,
  input  logic [P-1:0]   ce,
  output logic [P-1:0]   z,
  output logic [P-1:0]   t
);
  always_comb begin
    for (int i = 0; i < P; i++) z[i] = normal & y[2*i];
    t = normal ? (m ^ (ce & z)) : '0;
  end
endmodule
