// grain_ref_pkg: bit-serial reference model of Grain-128AEAD for the
// testbenches, written straight from the cipher equations one clock at a
// time (no unrolling, no shared code with the RTL).
//
//   ref_y    : pre-output stream y_0 .. y_{n-1} for a key and IV
//   ref_aead : ciphertext bits and 64-bit tag for a message bit stream,
//              per-bit encrypt flags and the encrypt/decrypt select
// Key bit i is key[i]; IV bit i is iv[i].  LFSR bits 96..126 start at one,
// bit 127 at zero.  Clocks 0..255 feed y back, clocks 256..383 add key bit
// t-256 into the LFSR feedback; y_256..y_319 initialise the accumulator,
// y_320..y_383 the shift register; then z_i = y_{384+2i} and the register
// takes y_{384+2i+1}.
package grain_ref_pkg;

  typedef bit bitq_t[$];

  function automatic bitq_t ref_y(input bit [127:0] key, input bit [95:0] iv,
                                  input int unsigned nbits);
    bit [127:0] b, s;
    bit         y, f, g, sn, bn;
    bitq_t      out;
    b = key;
    s = {1'b0, {31{1'b1}}, iv};
    for (int unsigned t = 0; t < nbits; t++) begin
      y = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79])
        ^ (b[12] & b[95] & s[94]) ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45]
        ^ b[64] ^ b[73] ^ b[89];
      f = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
      g = b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96] ^ (b[3] & b[67]) ^ (b[11] & b[13])
        ^ (b[17] & b[18]) ^ (b[27] & b[59]) ^ (b[40] & b[48]) ^ (b[61] & b[65])
        ^ (b[68] & b[84]) ^ (b[88] & b[92] & b[93] & b[95]) ^ (b[70] & b[78] & b[82])
        ^ (b[22] & b[24] & b[25]);
      sn = f;
      bn = g ^ s[0];
      if (t < 256) begin
        sn ^= y;
        bn ^= y;
      end else if (t < 384) begin
        sn ^= key[t-256];
      end
      out.push_back(y);
      s = {sn, s[127:1]};
      b = {bn, b[127:1]};
    end
    return out;
  endfunction

  // m: message bits as applied to the cipher input (plaintext when
  // encrypting, ciphertext when decrypting), padding included.
  // ce[i] = 1: bit i is XORed with the keystream.  dec = 1: the result is
  // the authenticated plaintext; dec = 0: the input is.
  function automatic void ref_aead(input bit [127:0] key, input bit [95:0] iv,
                                   input bitq_t m, input bitq_t ce, input bit dec,
                                   output bitq_t c, output bit [63:0] tag);
    bitq_t      ys;
    bit [63:0]  a, r;
    bit         z, ci, p;
    int unsigned len;
    len = m.size();
    ys  = ref_y(key, iv, 384 + 2 * len);
    for (int j = 0; j < 64; j++) begin
      a[j] = ys[256+j];
      r[j] = ys[320+j];
    end
    c = {};
    for (int unsigned i = 0; i < len; i++) begin
      z  = ys[384+2*i];
      ci = m[i] ^ (ce[i] & z);
      c.push_back(ci);
      p  = dec ? ci : m[i];
      if (p) a ^= r;
      r = {ys[384+2*i+1], r[63:1]};
    end
    tag = a;
  endfunction

endpackage
