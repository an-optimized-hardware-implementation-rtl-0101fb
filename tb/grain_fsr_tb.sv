// grain_fsr_tb: checks the N-bit-per-clock shift register: reset to zero,
// then q_next = {din, q[127:N]} each clock, against a model register, for
// N = 64 (default) and N = 2.
module grain_fsr_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0]  din;
  logic [127:0] q64, q2, m64, m2;

  grain_fsr            dut64 (.clk, .rst_n, .din(din),      .q(q64));
  grain_fsr #(.N(2))   dut2  (.clk, .rst_n, .din(din[1:0]), .q(q2));

  initial begin
    din = '0;
    #12;
    checks++; if (q64 !== '0 || q2 !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    m64 = '0; m2 = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      din = {$urandom, $urandom};
      @(posedge clk);
      m64 = {din, m64[127:64]};
      m2  = {din[1:0], m2[127:2]};
      #1;
      checks++;
      if (q64 !== m64 || q2 !== m2) begin failures++; $display("FAIL step %0d", n); end
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
