// grain_galois_fsr_tb: checks the Galois-form register pair against the
// bit-serial reference model at N = 16 (default), 8, 2 and 1, and at N = 1
// with the initialisation y split into taps (YTRANS).
//
// Each instance is taken through loading (key and padded IV, N bits per
// clock, load_pos = clock * N), initialisation, accumulator loading with
// the key added again, and normal operation.  Every y bit from the first
// initialisation clock on is compared with the reference pre-output
// sequence, which is what the Fibonacci form produces; a mismatch means the
// transformed state is not equivalent.  Several key/IV pairs are run back
// to back, so a reload over a running state is covered too.  Counts are
// printed in the TB_RESULT line; a watchdog ends a stuck run.
module grain_galois_fsr_tb;
  import grain_ref_pkg::*;

  localparam int unsigned NI = 5;
  localparam int unsigned NS [NI] = '{16, 8, 2, 1, 1};
  localparam bit          YT [NI] = '{0, 0, 0, 0, 1};
  localparam int unsigned RUNS = 3;
  localparam int unsigned NORM_BITS = 256;   // bit-steps checked after accload

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  logic done [NI];

  for (genvar n = 0; n < NI; n++) begin : g_inst
    localparam int unsigned N = NS[n];
    logic         run, load, init, accload;
    logic [6:0]   load_pos;
    logic [N-1:0] key_c, iv_c, y;

    grain_galois_fsr #(.N(N), .YTRANS(YT[n])) u_dut (
      .clk, .rst_n, .run, .load, .init, .accload, .load_pos,
      .key_i(key_c), .ivpad_i(iv_c), .y
    );

    initial begin
      bit [127:0] key, ivp;
      bit [95:0]  iv;
      bitq_t      ys;
      int         total, t;
      done[n] = 1'b0;
      run = 1'b0; load = 1'b0; init = 1'b0; accload = 1'b0;
      load_pos = '0; key_c = '0; iv_c = '0;
      wait (rst_n);
      for (int r = 0; r < int'(RUNS); r++) begin
        for (int i = 0; i < 4; i++) key[i*32 +: 32] = $urandom;
        for (int i = 0; i < 3; i++) iv[i*32 +: 32] = $urandom;
        ivp   = {1'b0, {31{1'b1}}, iv};
        total = 384 + NORM_BITS;
        ys    = ref_y(key, iv, total);
        for (int c = 0; c < (128 + total) / int'(N); c++) begin
          @(negedge clk);
          run     = 1'b1;
          load    = (c < 128 / int'(N));
          init    = (c >= 128 / int'(N)) && (c < 384 / int'(N));
          accload = (c >= 384 / int'(N)) && (c < 512 / int'(N));
          load_pos = load ? 7'(c * int'(N)) : '0;
          for (int k = 0; k < int'(N); k++) begin
            key_c[k] = 1'($urandom);
            iv_c[k]  = 1'($urandom);
            if (load) begin
              key_c[k] = key[c*N + k];
              iv_c[k]  = ivp[c*N + k];
            end else if (accload) key_c[k] = key[(c - 384 / int'(N))*N + k];
          end
          #1;
          if (!load) begin
            for (int k = 0; k < int'(N); k++) begin
              t = (c - 128 / int'(N)) * int'(N) + k;
              checks++;
              if (y[k] !== ys[t]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL N=%0d YTRANS=%0d run %0d y bit %0d", N, YT[n], r, t);
              end
            end
          end
        end
      end
      done[n] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
