// auth_accumulator_tb: checks the parallel accumulator update against the
// bit-serial rule "if m_i: a ^= r; then r takes the next MAC bit", applied
// P times per clock, plus clear, hold, loading (msg = 1 copies r) and the
// tag mux (zero unless tag_en).  N = 64 (default) and N = 2.
module auth_accumulator_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, en, tag_en;
  logic [31:0] msg, mac;
  logic [63:0] r, acc64, tag64, acc2, tag2, m64, m2;

  auth_accumulator          dut64 (.clk, .rst_n, .clr, .en, .msg(msg), .r, .mac(mac),
                                   .tag_en, .acc(acc64), .tag(tag64));
  auth_accumulator #(.N(2)) dut2  (.clk, .rst_n, .clr, .en, .msg(msg[0]), .r, .mac(mac[0]),
                                   .tag_en, .acc(acc2), .tag(tag2));

  function automatic logic [63:0] serial(logic [63:0] a, logic [63:0] rr, logic [31:0] m,
                                         logic [31:0] mc, int p);
    for (int i = 0; i < p; i++) begin
      if (m[i]) a ^= rr;
      rr = {mc[i], rr[63:1]};
    end
    return a;
  endfunction

  initial begin
    clr = 0; en = 0; tag_en = 0; msg = '0; mac = '0; r = '0;
    #12 rst_n = 1;
    m64 = '0; m2 = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      clr = (n % 97 == 50);
      en = ($urandom_range(0, 4) != 0);
      tag_en = 1'($urandom);
      r = {$urandom, $urandom}; mac = $urandom;
      msg = (n % 50 == 0) ? 32'd1 : $urandom;
      #1;
      checks++;
      if (tag64 !== (tag_en ? m64 : 64'd0) || tag2 !== (tag_en ? m2 : 64'd0)) begin
        failures++; $display("FAIL tag mux step %0d", n);
      end
      @(posedge clk);
      if (clr) begin m64 = '0; m2 = '0; end
      else if (en) begin
        m64 = serial(m64, r, msg, mac, 32);
        m2  = serial(m2, r, msg, mac, 1);
      end
      #1;
      checks++;
      if (acc64 !== m64 || acc2 !== m2) begin failures++; $display("FAIL acc step %0d", n); end
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
