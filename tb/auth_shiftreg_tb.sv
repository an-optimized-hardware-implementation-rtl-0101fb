// auth_shiftreg_tb: checks the 64-bit authentication shift register: hold
// with en low, N-bit shift in full mode, N/2-bit shift in half mode, for
// N = 64 (default) and N = 8, against a bit-by-bit model.
module auth_shiftreg_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en, half;
  logic [63:0] din, r64, r8, m64, m8;

  auth_shiftreg          dut64 (.clk, .rst_n, .en, .half, .din(din),      .r(r64));
  auth_shiftreg #(.N(8)) dut8  (.clk, .rst_n, .en, .half, .din(din[7:0]), .r(r8));

  function automatic logic [63:0] shift_in(logic [63:0] r, logic [63:0] d, int cnt);
    for (int i = 0; i < cnt; i++) r = {d[i], r[63:1]};
    return r;
  endfunction

  initial begin
    en = 0; half = 0; din = '0;
    #12 rst_n = 1;
    m64 = '0; m8 = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0); half = 1'($urandom); din = {$urandom, $urandom};
      @(posedge clk);
      if (en) begin
        m64 = shift_in(m64, din, half ? 32 : 64);
        m8  = shift_in(m8, din, half ? 4 : 8);
      end
      #1;
      checks++;
      if (r64 !== m64 || r8 !== m8) begin failures++; $display("FAIL step %0d en=%b half=%b", n, en, half); end
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
