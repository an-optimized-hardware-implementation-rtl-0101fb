// grain_clkdiv_tb: checks the power-of-two divider: counter bit j toggles
// every 2^j enabled clocks, tick is high exactly on the wrapping clock,
// clr restarts at zero.  K = 1 (default) and K = 3.
module grain_clkdiv_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, en, tick1, tick3;
  logic [0:0] c1;
  logic [2:0] c3;
  int m;

  grain_clkdiv          d1 (.clk, .rst_n, .clr, .en, .cnt(c1), .tick(tick1));
  grain_clkdiv #(.K(3)) d3 (.clk, .rst_n, .clr, .en, .cnt(c3), .tick(tick3));

  initial begin
    clr = 0; en = 0; m = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      clr = (n == 77); en = ($urandom_range(0, 4) != 0);
      #1;
      checks++;
      if (c1 !== 1'(m) || c3 !== 3'(m) || tick1 !== (en && m % 2 == 1) || tick3 !== (en && m % 8 == 7)) begin
        failures++; $display("FAIL step %0d", n);
      end
      @(posedge clk);
      if (clr) m = 0; else if (en) m++;
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
