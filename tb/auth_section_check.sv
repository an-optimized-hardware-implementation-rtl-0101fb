// auth_section_check: drives one auth_section instance through accumulator
// loading and several messages with random y words, message bits, results
// and cm, and compares tag and tag timing with a bit-serial model of the
// Grain-128AEAD authentication (first 64 loading bits -> accumulator, next
// 64 -> shift register, then per message bit: if plaintext bit, a ^= r;
// r takes the next odd y bit).  Results go out through ports.
module auth_section_check
  import grain_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter bit          ISO = 1'b1,
  parameter int unsigned MSGS = 6
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned P = N / 2;

  logic           rst_n, clr, cm, last, tv;
  ctrl_t          ctrl;
  logic [N-1:0]   y;
  logic [P-1:0]   m, t;
  logic [63:0]    tag;

  auth_section #(.N(N), .ISOLATE(ISO)) dut (
    .clk, .rst_n, .clr, .ctrl, .y, .m, .t, .cm, .last, .tag, .tag_valid(tv));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d %s at %0t", N, what, $time); end
  endtask

  initial begin
    bit [63:0] a, r;
    bit        p;
    bit        ld[$];
    int        words;
    checks = 0; failures = 0; done = 0;
    rst_n = 0; clr = 0; ctrl = '0; y = '0; m = '0; t = '0; cm = 0; last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int msg = 0; msg < int'(MSGS); msg++) begin
      @(negedge clk);
      clr = 1; ctrl = '0;
      @(negedge clk);
      clr = 0;
      ld = {};
      for (int c = 0; c < 128 / int'(N); c++) begin
        ctrl = '0; ctrl.accload = 1; ctrl.acc_copy = (c == 64 / int'(N));
        y = N'({$urandom, $urandom});
        for (int i = 0; i < int'(N); i++) ld.push_back(y[i]);
        #1 chk(tag == '0 && !tv, "tag hidden during loading");
        @(negedge clk);
      end
      for (int j = 0; j < 64; j++) begin a[j] = ld[j]; r[j] = ld[64+j]; end
      words = $urandom_range(1, 12);
      for (int w = 0; w < words; w++) begin
        ctrl = '0; ctrl.normal = 1;
        y = N'({$urandom, $urandom}); m = P'($urandom); t = P'($urandom); cm = 1'($urandom);
        last = (w == words - 1);
        for (int i = 0; i < int'(P); i++) begin
          p = cm ? t[i] : m[i];
          if (p) a ^= r;
          r = {y[2*i+1], r[63:1]};
        end
        #1 chk(tag == '0 && !tv, "tag hidden before last");
        @(negedge clk);
      end
      last = 0; m = '0; t = '0;
      for (int d = 1; d <= (ISO ? 2 : 1); d++) begin
        y = N'({$urandom, $urandom}); m = P'($urandom);
        #1;
        if (d < (ISO ? 2 : 1)) chk(!tv && tag == '0, "tag not early");
        else begin
          chk(tv, "tag valid at latency");
          chk(tag == a, "tag value");
        end
        @(negedge clk);
      end
      // keeps the tag while normal continues with other data
      #1 chk(tv && tag == a, "tag held after last");
    end
    done = 1;
  end
endmodule
