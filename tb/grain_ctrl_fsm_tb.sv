// grain_ctrl_fsm_tb: checks the phase sequence of the state-machine
// controller at N = 64 (default), 4, 2 and 1 (bit-serial); the state output
// must name the same phase.
// After start, clock c (counted from the next clock) must be loading for
// c < 128/N, initialisation up to 384/N, accumulator loading up to 512/N
// and normal after; acc_copy must be high only at c = 448/N.  Before the
// first start every control is low; a second start in mid-run restarts.
module grain_ctrl_fsm_tb;
  import grain_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic  start;
  ctrl_t c[4];
  grain_ctrl_fsm          u0 (.clk, .rst_n, .start, .ctrl(c[0]), .state(st0));
  grain_ctrl_fsm #(.N(4)) u1 (.clk, .rst_n, .start, .ctrl(c[1]), .state(st1));
  grain_ctrl_fsm #(.N(2)) u2 (.clk, .rst_n, .start, .ctrl(c[2]), .state(st2));
  grain_ctrl_fsm #(.N(1)) u3 (.clk, .rst_n, .start, .ctrl(c[3]), .state(st3));
  grain_pkg::state_e st0, st1, st2, st3;
  int nn[4] = '{64, 4, 2, 1};

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
      checks++;
      if (st0 != exp_state(64, cyc) || st2 != exp_state(2, cyc) || st3 != exp_state(1, cyc)) begin failures++; $display("FAIL state c=%0d", cyc); end
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
