// grain_ctrl_shift_tb: checks the phase sequence of the shift-register
// controller at (N, K) = (64, 1) (default), (8, 2), (2, 6), where 2^K N
// reaches its limit of 128, and (1, 2), the bit-serial version.
// After start, clock c (counted from the next clock) must be loading for
// c < 128/N, initialisation up to 384/N, accumulator loading up to 512/N
// and normal after; acc_copy must be high only at c = 448/N.  Before the
// first start every control is low; a second start in mid-run restarts.
module grain_ctrl_shift_tb;
  import grain_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic  start;
  ctrl_t c[4];
  grain_ctrl_shift                u0 (.clk, .rst_n, .start, .ctrl(c[0]));
  grain_ctrl_shift #(.N(8), .K(2)) u1 (.clk, .rst_n, .start, .ctrl(c[1]));
  grain_ctrl_shift #(.N(2), .K(6)) u2 (.clk, .rst_n, .start, .ctrl(c[2]));
  grain_ctrl_shift #(.N(1), .K(2)) u3 (.clk, .rst_n, .start, .ctrl(c[3]));
  int nn[4] = '{64, 8, 2, 1};

  function automatic ctrl_t expect_ctrl(int n, int cyc);
    ctrl_t e;
    e = '0;
    if (cyc < 0) return e;
    e.load     = cyc < 128 / n;
    e.init     = cyc >= 128 / n && cyc < 384 / n;
    e.accload  = cyc >= 384 / n && cyc < 512 / n;
    e.normal   = cyc >= 512 / n;
    e.acc_copy = cyc == 448 / n;
    return e;
  endfunction

  function automatic state_e exp_state(int n, int cyc);
    ctrl_t e = expect_ctrl(n, cyc);
    if (e.load) return ST_LOAD;
    if (e.init) return ST_INIT;
    if (e.accload) return ST_ACCLOAD;
    if (e.normal) return ST_NORMAL;
    return ST_RESET;
  endfunction

  int cyc;
  initial begin
    start = 0;
    cyc = -1;
    #12 rst_n = 1;
    for (int n = 0; n < 1400; n++) begin
      @(negedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (c[i] !== expect_ctrl(nn[i], cyc)) begin
          failures++; $display("FAIL N=%0d c=%0d got %b", nn[i], cyc, c[i]);
        end
      end

      start = (n == 5 || n == 400);
      @(posedge clk);
      #1 start = 0;
      if (n == 5 || n == 400) cyc = 0; else if (cyc >= 0) cyc++;
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
