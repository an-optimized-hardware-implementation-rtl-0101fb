// grain128aead_top_tb: end-to-end test of the Grain-128AEAD top level in
// nine configurations run side by side:
//   A: N = 64, shift-register controller (K = 1), isolated authentication
//      (the default configuration)
//   B: N = 8 with the state-machine controller, isolated
//   C: N = 2, shift-register controller with K = 2, no isolation
//   D: N = 32, shift-register controller with K = 2, isolated
//   E: N = 1, the bit-serial version: shift-register controller (K = 1),
//      authentication at half rate, no isolation
//   F: N = 64 with the state-machine controller, isolated
//   G: N = 4, Galois-form registers, shift-register controller, isolated
//   H: N = 16, Galois-form registers, state machine, isolated
//   I: N = 1, Galois-form registers with the initialisation y split into
//      taps (YTRANS), shift-register controller, no isolation
// Each is driven by grain_top_driver against the bit-serial reference model:
// encryption, decryption, associated data, restart and tag timing.  The
// testbench also fails if any mechanism was never exercised.
module grain128aead_top_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int chk[9], fail[9], enc[9], dec[9], ad[9], rst[9], kr[9], mc[9];
  logic dn[9];

  grain_top_bench #(.N(64), .SHIFT_CTRL(1'b1), .K(1), .ISOLATE(1'b1), .RUNS(4)) u_a (
    .clk, .rst_n, .checks(chk[0]), .failures(fail[0]), .n_enc(enc[0]), .n_dec(dec[0]),
    .n_ad_bits(ad[0]), .n_restart(rst[0]), .n_key_readd(kr[0]), .n_mac_clk(mc[0]), .done(dn[0]));
  grain_top_bench #(.N(8), .SHIFT_CTRL(1'b0), .K(1), .ISOLATE(1'b1), .RUNS(3)) u_b (
    .clk, .rst_n, .checks(chk[1]), .failures(fail[1]), .n_enc(enc[1]), .n_dec(dec[1]),
    .n_ad_bits(ad[1]), .n_restart(rst[1]), .n_key_readd(kr[1]), .n_mac_clk(mc[1]), .done(dn[1]));
  grain_top_bench #(.N(2), .SHIFT_CTRL(1'b1), .K(2), .ISOLATE(1'b0), .RUNS(3)) u_c (
    .clk, .rst_n, .checks(chk[2]), .failures(fail[2]), .n_enc(enc[2]), .n_dec(dec[2]),
    .n_ad_bits(ad[2]), .n_restart(rst[2]), .n_key_readd(kr[2]), .n_mac_clk(mc[2]), .done(dn[2]));
  grain_top_bench #(.N(32), .SHIFT_CTRL(1'b1), .K(2), .ISOLATE(1'b1), .RUNS(3)) u_d (
    .clk, .rst_n, .checks(chk[3]), .failures(fail[3]), .n_enc(enc[3]), .n_dec(dec[3]),
    .n_ad_bits(ad[3]), .n_restart(rst[3]), .n_key_readd(kr[3]), .n_mac_clk(mc[3]), .done(dn[3]));

  grain_top_bench #(.N(1), .SHIFT_CTRL(1'b1), .K(1), .ISOLATE(1'b0), .RUNS(3)) u_e (
    .clk, .rst_n, .checks(chk[4]), .failures(fail[4]), .n_enc(enc[4]), .n_dec(dec[4]),
    .n_ad_bits(ad[4]), .n_restart(rst[4]), .n_key_readd(kr[4]), .n_mac_clk(mc[4]), .done(dn[4]));

  grain_top_bench #(.N(64), .SHIFT_CTRL(1'b0), .K(1), .ISOLATE(1'b1), .RUNS(2)) u_f (
    .clk, .rst_n, .checks(chk[5]), .failures(fail[5]), .n_enc(enc[5]), .n_dec(dec[5]),
    .n_ad_bits(ad[5]), .n_restart(rst[5]), .n_key_readd(kr[5]), .n_mac_clk(mc[5]), .done(dn[5]));

  grain_top_bench #(.N(4), .SHIFT_CTRL(1'b1), .K(1), .ISOLATE(1'b1), .GALOIS(1'b1), .RUNS(3)) u_g (
    .clk, .rst_n, .checks(chk[6]), .failures(fail[6]), .n_enc(enc[6]), .n_dec(dec[6]),
    .n_ad_bits(ad[6]), .n_restart(rst[6]), .n_key_readd(kr[6]), .n_mac_clk(mc[6]), .done(dn[6]));
  grain_top_bench #(.N(16), .SHIFT_CTRL(1'b0), .K(1), .ISOLATE(1'b1), .GALOIS(1'b1), .RUNS(3)) u_h (
    .clk, .rst_n, .checks(chk[7]), .failures(fail[7]), .n_enc(enc[7]), .n_dec(dec[7]),
    .n_ad_bits(ad[7]), .n_restart(rst[7]), .n_key_readd(kr[7]), .n_mac_clk(mc[7]), .done(dn[7]));
  grain_top_bench #(.N(1), .SHIFT_CTRL(1'b1), .K(1), .ISOLATE(1'b0), .GALOIS(1'b1), .YTRANS(1'b1), .RUNS(2)) u_i (
    .clk, .rst_n, .checks(chk[8]), .failures(fail[8]), .n_enc(enc[8]), .n_dec(dec[8]),
    .n_ad_bits(ad[8]), .n_restart(rst[8]), .n_key_readd(kr[8]), .n_mac_clk(mc[8]), .done(dn[8]));

  task automatic need(input int cnt, input string what);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-30s %0d", what, cnt);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5] && dn[6] && dn[7] && dn[8]);
    @(posedge clk);
    for (int i = 0; i < 9; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("mechanisms exercised:");
    need(enc[0] + enc[1] + enc[2] + enc[3] + enc[4] + enc[5] + enc[6] + enc[7] + enc[8], "encryptions");
    need(dec[0] + dec[1] + dec[2] + dec[3] + dec[4] + dec[5] + dec[6] + dec[7] + dec[8], "decryptions");
    need(ad[0] + ad[1] + ad[2] + ad[3] + ad[4] + ad[5] + ad[6] + ad[7] + ad[8], "associated-data bits");
    need(rst[0] + rst[1] + rst[2] + rst[3] + rst[4] + rst[5] + rst[6] + rst[7] + rst[8], "restarts mid-message");
    need(kr[0] + kr[1] + kr[2] + kr[3] + kr[4] + kr[5] + kr[6] + kr[7] + kr[8], "key re-add clocks");
    need(enc[1] + enc[5] + enc[7], "state-machine controller runs");
    need(enc[0] + enc[2] + enc[3] + enc[4] + enc[8], "shift controller runs");
    need(enc[2] + enc[4] + enc[8], "non-isolated runs");
    need(enc[0] + enc[5], "64-way unrolled runs");
    need(enc[4] + enc[8], "bit-serial runs");
    need(mc[4] + mc[8], "bit-serial MAC-only clocks");
    need(enc[6] + enc[7] + enc[8], "Galois-form register runs");
    need(enc[8], "y-transform runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
