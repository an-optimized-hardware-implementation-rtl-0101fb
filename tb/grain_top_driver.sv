// grain_top_driver: stimulus and checking for one grain128aead_top
// instance, shared by the end-to-end testbenches.
//
// For each run it draws a random key, IV, associated-data length and
// message length, pulses start, feeds the key and IV during loading and the
// key again while y_flag is high, then streams associated data (ce = 0),
// message bits (ce = 1), the padding one and zero fill, N/2 bits per clock.
// Every run is encrypted and then decrypted with the same key and IV; the
// keystream, data output, tag and tag timing are compared with the
// bit-serial model in grain_ref_pkg.  Phase lengths are checked against
// 128/N, 256/N, 128/N clocks and the tag against TAGLAT clocks after the
// last word.  Some runs are cut short by a new start to exercise restart.
// For N = 1 a message bit is taken every second normal clock (msg_take_o);
// the clocks in between carry MAC bits, and inputs there are randomised to
// show they are ignored.  Counts of each mechanism seen are reported
// through ports.
module grain_top_driver
  import grain_ref_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned TAGLAT  = 2,
  parameter int unsigned RUNS    = 4,
  parameter int unsigned MAXBITS = 300
) (
  input  logic           clk,
  output logic           start_i,
  output logic [N-1:0]   key_i,
  output logic [N-1:0]   iv_i,
  output logic [((N > 1) ? N / 2 : 1)-1:0] msg_i,
  output logic [((N > 1) ? N / 2 : 1)-1:0] ce_i,
  output logic           cm_i,
  output logic           last_i,
  input  logic           load_o,
  input  logic           y_flag_o,
  input  logic           normal_o,
  input  logic           msg_take_o,
  input  logic [((N > 1) ? N / 2 : 1)-1:0] ks_o,
  input  logic [((N > 1) ? N / 2 : 1)-1:0] data_o,
  input  logic [63:0]    tag_o,
  input  logic           tag_valid_o,
  output int             checks,
  output int             failures,
  output int             n_enc,
  output int             n_dec,
  output int             n_ad_bits,
  output int             n_restart,
  output int             n_key_readd,
  output int             n_mac_clk,
  output logic           done
);
  localparam int unsigned P     = (N > 1) ? N / 2 : 1;
  localparam int unsigned C_INI = 128 / N;
  localparam int unsigned C_ACC = 384 / N;
  localparam int unsigned C_NRM = 512 / N;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("N=%0d FAIL %s at %0t", N, what, $time);
    end
  endtask

  // One run: input bits in (padded), flags ce, mode dec.  Expected data and
  // tag from the model.  abort_words >= 0 stops after that many words.
  task automatic run(input bit [127:0] key, input bit [95:0] iv, input bitq_t in_bits,
                     input bitq_t ce_bits, input bit dec, input int abort_words,
                     output bitq_t out_bits);
    bitq_t     exp_c, ys;
    bit [63:0] exp_tag;
    int        words, c, w, last_c;
    bit [N-1:0] chunk;
    ref_aead(key, iv, in_bits, ce_bits, dec, exp_c, exp_tag);
    ys = ref_y(key, iv, 384 + 2 * in_bits.size());
    words = in_bits.size() / P;
    out_bits = {};
    @(negedge clk);
    start_i = 1'b1;
    c = 0;
    forever begin
      @(negedge clk);
      start_i = 1'b0;
      msg_i = '0; ce_i = '0; last_i = 1'b0; cm_i = dec;
      key_i = N'($urandom); iv_i = N'($urandom);
      if (c < C_INI) begin
        for (int k = 0; k < N; k++) begin
          key_i[k] = key[c*N+k];
          if (c*N + k < 96) iv_i[k] = iv[c*N+k];   // above 95: random, must be ignored
        end
        #1 check(load_o && !y_flag_o && !normal_o, "loading phase");
      end else if (c < C_ACC) begin
        #1 check(!load_o && !y_flag_o && !normal_o, "initialisation phase");
      end else if (c < C_NRM) begin
        for (int k = 0; k < N; k++) key_i[k] = key[(c-C_ACC)*N+k];
        n_key_readd++;
        #1 check(!load_o && y_flag_o && !normal_o, "accumulator loading phase");
      end else if (N == 1 && (c - C_NRM) % 2 == 1) begin
        // bit-serial: MAC clock between two message bits, inputs ignored
        msg_i = P'($urandom); ce_i = P'($urandom); last_i = 1'($urandom);
        n_mac_clk++;
        #1 check(normal_o && !msg_take_o && ks_o == '0 && data_o == '0 &&
                 tag_o == '0 && !tag_valid_o, "bit-serial MAC clock");
      end else begin
        w = (N == 1) ? (c - C_NRM) / 2 : c - C_NRM;
        for (int i = 0; i < P; i++) begin
          msg_i[i] = in_bits[w*P+i];
          ce_i[i]  = ce_bits[w*P+i];
          if (!ce_bits[w*P+i] && w*P+i < in_bits.size()) n_ad_bits++;
        end
        last_i = (w == words - 1);
        #1;
        check(normal_o && msg_take_o && !load_o && !y_flag_o, "normal phase");
        for (int i = 0; i < P; i++) chunk[i] = ys[384 + 2*(w*P+i)];
        check(ks_o == chunk[P-1:0], "keystream");
        for (int i = 0; i < P; i++) begin
          chunk[i] = exp_c[w*P+i];
          out_bits.push_back(data_o[i]);
        end
        check(data_o == chunk[P-1:0], "data output");
        check(tag_o == '0 && !tag_valid_o, "tag hidden before end");
        if (abort_words >= 0 && w == abort_words) begin
          n_restart++;
          return;
        end
        if (w == words - 1) begin
          last_c = c;
          break;
        end
      end
      c++;
    end
    // tag timing
    for (int d = 1; d <= int'(TAGLAT); d++) begin
      @(negedge clk);
      msg_i = '0; ce_i = '0; last_i = 1'b0;
      #1;
      if (d < int'(TAGLAT)) check(!tag_valid_o && tag_o == '0, "tag not early");
      else begin
        check(tag_valid_o, "tag valid at expected latency");
        check(tag_o == exp_tag, "tag value");
      end
    end
    @(negedge clk);
    #1 check(tag_valid_o && tag_o == exp_tag, "tag held");
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    bit [127:0] key;
    bit [95:0]  iv;
    bitq_t      pt, ce, ct, back, dummy;
    int         ad, ml, tot;
    checks = 0; failures = 0; n_enc = 0; n_dec = 0; n_ad_bits = 0;
    n_restart = 0; n_key_readd = 0; n_mac_clk = 0; done = 1'b0;
    start_i = 1'b0; key_i = '0; iv_i = '0; msg_i = '0; ce_i = '0;
    cm_i = 1'b0; last_i = 1'b0;
    repeat (3) @(negedge clk);
    for (int rn = 0; rn < int'(RUNS); rn++) begin
      for (int i = 0; i < 4; i++) key[i*32 +: 32] = $urandom;
      for (int i = 0; i < 3; i++) iv[i*32 +: 32] = $urandom;
      if (rn == 0) begin key = '0; iv = '0; end
      ad = $urandom_range(0, MAXBITS / 3);
      ml = $urandom_range(0, MAXBITS);
      pt = {}; ce = {};
      for (int i = 0; i < ad; i++) begin pt.push_back(1'($urandom)); ce.push_back(1'b0); end
      for (int i = 0; i < ml; i++) begin pt.push_back(1'($urandom)); ce.push_back(1'b1); end
      pt.push_back(1'b1); ce.push_back(1'b0);                  // padding bit
      tot = ((pt.size() + P - 1) / P) * P;
      while (pt.size() < tot) begin pt.push_back(1'b0); ce.push_back(1'b0); end
      if (rn == 1) run(key, iv, pt, ce, 1'b0, 1, dummy);        // cut short by restart
      run(key, iv, pt, ce, 1'b0, -1, ct);                        // encrypt
      run(key, iv, ct, ce, 1'b1, -1, back);                      // decrypt
      check(back == pt, "decryption returns plaintext");
    end
    done = 1'b1;
  end
endmodule
