// grain_unrolled_tb: checks the N-way unrolled feedback network against N
// bit-serial steps of the cipher, for random register contents, key bits
// and IV bits, in every control mode (reset, loading, initialisation with
// y fed back, accumulator loading with the key added, normal).  Runs the
// default N = 64 (copies chained across the register end) and N = 8.
module grain_unrolled_tb;
  int checks = 0, failures = 0;

  typedef struct packed { bit run, load, init, accload; } mode_t;

  function automatic bit fy(bit [127:0] b, bit [127:0] s);
    return (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79])
         ^ (b[12] & b[95] & s[94]) ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45]
         ^ b[64] ^ b[73] ^ b[89];
  endfunction
  function automatic bit ff(bit [127:0] s);
    return s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
  endfunction
  function automatic bit fg(bit [127:0] b);
    return b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96] ^ (b[3] & b[67]) ^ (b[11] & b[13])
         ^ (b[17] & b[18]) ^ (b[27] & b[59]) ^ (b[40] & b[48]) ^ (b[61] & b[65])
         ^ (b[68] & b[84]) ^ (b[88] & b[92] & b[93] & b[95]) ^ (b[70] & b[78] & b[82])
         ^ (b[22] & b[24] & b[25]);
  endfunction

  // expected new bits of N serial steps, packed {y, b_new, s_new}
  function automatic bit [191:0] expect_bits(int n, bit [127:0] s, bit [127:0] b, mode_t m,
                                             bit [63:0] key, bit [63:0] iv);
    bit [63:0] so, bo, yo;
    bit yk, sn, bn;
    so = '0; bo = '0; yo = '0;
    for (int k = 0; k < n; k++) begin
      yk = fy(b, s);
      if (!m.run) begin sn = 0; bn = 0; end
      else if (m.load) begin sn = iv[k]; bn = key[k]; end
      else begin
        sn = ff(s) ^ (m.init & yk) ^ (m.accload & key[k]);
        bn = fg(b) ^ s[0] ^ (m.init & yk);
      end
      so[k] = sn; bo[k] = bn; yo[k] = yk;
      s = {sn, s[127:1]};
      b = {bn, b[127:1]};
    end
    return {yo, bo, so};
  endfunction

  // N = 64 instance
  logic [127:0] s, b;
  mode_t        md;
  logic [63:0]  key, iv;
  logic [31:0]  sl64, bl64, yl64, sh64, bh64, yh64;
  grain_unrolled dut64 (
    .s, .b, .run(md.run), .load(md.load), .init(md.init), .accload(md.accload),
    .key_i(key), .ivpad_i(iv), .s_lo(sl64), .b_lo(bl64), .y_lo(yl64),
    .s_hi(sh64), .b_hi(bh64), .y_hi(yh64));

  // N = 8 instance
  logic [7:0] sl8, bl8, yl8;
  logic       sh8, bh8, yh8;
  grain_unrolled #(.N(8)) dut8 (
    .s, .b, .run(md.run), .load(md.load), .init(md.init), .accload(md.accload),
    .key_i(key[7:0]), .ivpad_i(iv[7:0]), .s_lo(sl8), .b_lo(bl8), .y_lo(yl8),
    .s_hi(sh8), .b_hi(bh8), .y_hi(yh8));

  mode_t modes[5] = '{'{0, 0, 0, 0}, '{1, 1, 0, 0}, '{1, 0, 1, 0}, '{1, 0, 0, 1}, '{1, 0, 0, 0}};

  initial begin
    bit [191:0] e;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) begin s[i*32 +: 32] = $urandom; b[i*32 +: 32] = $urandom; end
      key = {$urandom, $urandom}; iv = {$urandom, $urandom};
      md = modes[n % 5];
      #1;
      e = expect_bits(64, s, b, md, key, iv);
      checks++;
      if ({sh64, sl64} !== e[63:0] || {bh64, bl64} !== e[127:64] || {yh64, yl64} !== e[191:128]) begin
        failures++; $display("FAIL N=64 mode %b", md);
      end
      e = expect_bits(8, s, b, md, key, iv);
      checks++;
      if (sl8 !== e[7:0] || bl8 !== e[71:64] || yl8 !== e[135:128] || {sh8, bh8, yh8} !== 3'b0) begin
        failures++; $display("FAIL N=8 mode %b", md);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
