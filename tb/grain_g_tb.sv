// grain_g_tb: checks the NFSR feedback g (with s0).  A walking one toggles g
// only at the linear taps; each product term toggles g when all of its bits
// are set and nothing else is; random windows are compared with the sum of
// the terms listed as tables here.
module grain_g_tb;
  logic [96:0] b;
  logic        s0, g;
  int checks = 0, failures = 0;

  grain_g dut (.b, .s0, .g);

  int lin[5] = '{0, 26, 56, 91, 96};
  int terms[10][4] = '{'{3, 67, -1, -1}, '{11, 13, -1, -1}, '{17, 18, -1, -1},
                       '{27, 59, -1, -1}, '{40, 48, -1, -1}, '{61, 65, -1, -1},
                       '{68, 84, -1, -1}, '{88, 92, 93, 95}, '{70, 78, 82, -1},
                       '{22, 24, 25, -1}};

  function automatic bit model(logic [96:0] v, logic x);
    bit r = x;
    for (int i = 0; i < 5; i++) r ^= v[lin[i]];
    for (int t = 0; t < 10; t++) begin
      bit p = 1;
      for (int j = 0; j < 4; j++) if (terms[t][j] >= 0) p &= v[terms[t][j]];
      r ^= p;
    end
    return r;
  endfunction

  task automatic chk(input bit exp, input string what);
    #1;
    checks++;
    if (g !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    s0 = 1'b1; b = '0; chk(1'b1, "s0");
    s0 = 1'b0;
    for (int k = 0; k < 97; k++) begin
      bit e;
      e = 0;
      b = '0; b[k] = 1'b1;
      for (int i = 0; i < 5; i++) if (lin[i] == k) e = 1;
      chk(e, $sformatf("walking one %0d", k));
    end
    for (int t = 0; t < 10; t++) begin
      b = '0;
      for (int j = 0; j < 4; j++) if (terms[t][j] >= 0) b[terms[t][j]] = 1'b1;
      chk(model(b, 1'b0), $sformatf("product term %0d", t));
    end
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++) b[i*32 +: 32] = $urandom;
      s0 = 1'($urandom);
      chk(model(b, s0), "random");
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
