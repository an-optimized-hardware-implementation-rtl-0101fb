// grain128aead_full_tb: the top level exactly as delivered (every parameter
// at its default: 64-way unrolled, shift-register controller, isolated
// authentication) taken through complete encrypt and decrypt operations
// with random keys, IVs, associated data and messages, checked against the
// bit-serial reference model, including phase lengths (2 loading, 4
// initialisation, 2 accumulator-loading clocks) and the two-clock tag latency.
module grain128aead_full_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start, cm, last, load, yflag, normal, take, tv, done;
  logic [63:0]    key, iv;
  logic [31:0]    msg, ce, ks, data;
  logic [63:0]    tag;
  int checks, failures, n_enc, n_dec, n_ad, n_rst, n_kr, n_mc;

  grain128aead_top u_dut (
    .clk, .rst_n, .start_i(start), .key_i(key), .iv_i(iv), .msg_i(msg), .ce_i(ce),
    .cm_i(cm), .last_i(last), .load_o(load), .y_flag_o(yflag), .normal_o(normal), .msg_take_o(take),
    .ks_o(ks), .data_o(data), .tag_o(tag), .tag_valid_o(tv)
  );

  grain_top_driver #(.N(64), .TAGLAT(2), .RUNS(6), .MAXBITS(2000)) u_drv (
    .clk, .start_i(start), .key_i(key), .iv_i(iv), .msg_i(msg), .ce_i(ce), .cm_i(cm),
    .last_i(last), .load_o(load), .y_flag_o(yflag), .normal_o(normal), .msg_take_o(take), .ks_o(ks),
    .data_o(data), .tag_o(tag), .tag_valid_o(tv), .checks, .failures, .n_enc, .n_dec,
    .n_ad_bits(n_ad), .n_restart(n_rst), .n_key_readd(n_kr), .n_mac_clk(n_mc), .done
  );

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(posedge clk);
    if (n_enc == 0 || n_dec == 0 || n_ad == 0 || n_rst == 0 || n_kr == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("runs: %0d encrypt, %0d decrypt, %0d restarts", n_enc, n_dec, n_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
