// grain_top_bench: one grain128aead_top instance with chosen parameters,
// wired to a grain_top_driver.  Used by the end-to-end testbench to run
// several configurations side by side; counts come out through ports.
module grain_top_bench #(
  parameter int unsigned N          = 64,
  parameter bit          SHIFT_CTRL = 1'b1,
  parameter int unsigned K          = 1,
  parameter bit          ISOLATE    = 1'b1,
  parameter bit          GALOIS     = 1'b0,
  parameter bit          YTRANS     = 1'b0,
  parameter int unsigned RUNS       = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_enc,
  output int   n_dec,
  output int   n_ad_bits,
  output int   n_restart,
  output int   n_key_readd,
  output int   n_mac_clk,
  output logic done
);
  logic           start, cm, last, load, yflag, normal, take, tv;
  logic [N-1:0]   key, iv;
  logic [((N > 1) ? N / 2 : 1)-1:0] msg, ce, ks, data;
  logic [63:0]    tag;

  grain128aead_top #(.N(N), .SHIFT_CTRL(SHIFT_CTRL), .K(K), .ISOLATE(ISOLATE), .GALOIS(GALOIS), .YTRANS(YTRANS)) u_dut (
    .clk, .rst_n, .start_i(start), .key_i(key), .iv_i(iv), .msg_i(msg), .ce_i(ce),
    .cm_i(cm), .last_i(last), .load_o(load), .y_flag_o(yflag), .normal_o(normal),
    .msg_take_o(take), .ks_o(ks), .data_o(data), .tag_o(tag), .tag_valid_o(tv)
  );

  grain_top_driver #(.N(N), .TAGLAT((ISOLATE ? 2 : 1) + (N == 1 ? 1 : 0)), .RUNS(RUNS)) u_drv (
    .clk, .start_i(start), .key_i(key), .iv_i(iv), .msg_i(msg), .ce_i(ce), .cm_i(cm),
    .last_i(last), .load_o(load), .y_flag_o(yflag), .normal_o(normal), .msg_take_o(take), .ks_o(ks),
    .data_o(data), .tag_o(tag), .tag_valid_o(tv), .checks, .failures, .n_enc, .n_dec,
    .n_ad_bits, .n_restart, .n_key_readd, .n_mac_clk, .done
  );
endmodule
