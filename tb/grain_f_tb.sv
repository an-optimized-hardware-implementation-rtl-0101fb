// grain_f_tb: checks the LFSR feedback f.  A walking one must toggle f
// exactly at the taps 0, 7, 38, 70, 81, 96; random windows are compared
// with the parity of the tap bits.
module grain_f_tb;
  logic [96:0] s;
  logic        f;
  int checks = 0, failures = 0;

  grain_f dut (.s, .f);

  function automatic bit is_tap(int k);
    return k == 0 || k == 7 || k == 38 || k == 70 || k == 81 || k == 96;
  endfunction

  initial begin
    for (int k = 0; k < 97; k++) begin
      s = '0; s[k] = 1'b1; #1;
      checks++; if (f !== is_tap(k)) begin failures++; $display("FAIL tap %0d", k); end
    end
    for (int n = 0; n < 500; n++) begin
      bit e;
      for (int i = 0; i < 4; i++) s[i*32 +: 32] = $urandom;
      #1;
      e = 0;
      for (int k = 0; k < 97; k++) if (is_tap(k)) e ^= s[k];
      checks++; if (f !== e) begin failures++; $display("FAIL random %h", s); end
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
