// grain_crypt_tb: checks keystream extraction (even y bits), the per-bit
// ce XOR and the zero outputs outside normal operation, N = 64, 4 and 1.
module grain_crypt_tb;
  int checks = 0, failures = 0;
  logic [63:0] y;
  logic        normal;
  logic [31:0] m, ce, z, t;
  logic [1:0]  z4, t4;
  logic        z1, t1;

  grain_crypt          dut  (.y, .normal, .m, .ce, .z, .t);
  grain_crypt #(.N(4)) dut4 (.y(y[3:0]), .normal, .m(m[1:0]), .ce(ce[1:0]), .z(z4), .t(t4));
  grain_crypt #(.N(1)) dut1 (.y(y[0]), .normal, .m(m[0]), .ce(ce[0]), .z(z1), .t(t1));

  initial begin
    logic [31:0] ez, et;
    for (int n = 0; n < 500; n++) begin
      y = {$urandom, $urandom}; m = $urandom; ce = $urandom; normal = (n % 4 != 0);
      #1;
      for (int i = 0; i < 32; i++) begin
        ez[i] = normal ? y[2*i] : 1'b0;
        et[i] = normal ? (ce[i] ? m[i] ^ y[2*i] : m[i]) : 1'b0;
      end
      checks++;
      if (z !== ez || t !== et || z4 !== ez[1:0] || t4 !== et[1:0] ||
          z1 !== ez[0] || t1 !== et[0]) begin
        failures++; $display("FAIL vector %0d", n);
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
