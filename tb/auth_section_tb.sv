// auth_section_tb: runs auth_section_check on the default isolated N = 64
// authentication section and on an N = 4 section without isolation.
module auth_section_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  logic d0, d1;

  auth_section_check                        u0 (.clk, .checks(c0), .failures(f0), .done(d0));
  auth_section_check #(.N(4), .ISO(1'b0))   u1 (.clk, .checks(c1), .failures(f1), .done(d1));

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
