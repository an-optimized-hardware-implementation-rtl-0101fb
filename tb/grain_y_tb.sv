// grain_y_tb: checks the pre-output function y.  Walking ones over b and s
// toggle y only at the linear taps (b2, b15, b36, b45, b64, b73, b89, s93);
// every product term is exercised alone, and random windows are compared
// with a model that evaluates h and the linear part separately.
module grain_y_tb;
  logic [96:0] b, s;
  logic        y;
  int checks = 0, failures = 0;

  grain_y dut (.b, .s, .y);

  function automatic bit model(logic [96:0] bb, logic [96:0] ss);
    bit h, l;
    h = (bb[12] && ss[8]) ^ (ss[13] && ss[20]) ^ (bb[95] && ss[42]) ^
        (ss[60] && ss[79]) ^ (bb[12] && bb[95] && ss[94]);
    l = ss[93];
    l ^= bb[2] ^ bb[15] ^ bb[36] ^ bb[45] ^ bb[64] ^ bb[73] ^ bb[89];
    return h ^ l;
  endfunction

  task automatic chk(input bit exp, input string what);
    #1;
    checks++;
    if (y !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 97; k++) begin
      s = '0; b = '0; b[k] = 1'b1;
      chk(k == 2 || k == 15 || k == 36 || k == 45 || k == 64 || k == 73 || k == 89,
          $sformatf("b walking one %0d", k));
      b = '0; s[k] = 1'b1;
      chk(k == 93, $sformatf("s walking one %0d", k));
    end
    b = '0; s = '0; b[12] = 1; s[8] = 1;               chk(1'b1, "b12 s8");
    b = '0; s = '0; s[13] = 1; s[20] = 1;              chk(1'b1, "s13 s20");
    b = '0; s = '0; b[95] = 1; s[42] = 1;              chk(1'b1, "b95 s42");
    b = '0; s = '0; s[60] = 1; s[79] = 1;              chk(1'b1, "s60 s79");
    b = '0; s = '0; b[12] = 1; b[95] = 1; s[94] = 1;   chk(1'b1, "b12 b95 s94");
    b = '0; s = '0; b[12] = 1; b[95] = 1; s[94] = 1; s[8] = 1; chk(1'b0, "shared b12");
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++) begin b[i*32 +: 32] = $urandom; s[i*32 +: 32] = $urandom; end
      chk(model(b, s), "random");
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
