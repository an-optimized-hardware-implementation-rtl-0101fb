// grain_ctrl_shift: the modified ("shift register") controller.
//
// After start, a one is shifted into a thermometer register every 2^K
// clocks (the tick of a K-bit clock divider).  Bit j of the register is one
// once (j+1)*2^K clocks have passed, so single register bits mark the
// state boundaries and the control logic needs only one to three bits per
// mux control.  With L = 512/(2^K N) register bits:
//   i_init  = 128/(2^K N)   LFSR/NFSR loading ends, initialisation starts
//   i_accum = 384/(2^K N)   accumulator / shift register loading starts
//   i_norm  = 512/(2^K N)   normal state starts (= L, the last bit)
// Cycle c counted from the first loading cycle lies in
//   loading  c <  128/N, init 128/N <= c < 384/N,
//   accload 384/N <= c < 512/N, normal from 512/N on.
// The accumulator copy (message bit forced to one) happens at c = 448/N,
// decoded from the register bits and the divider count; this decode is this
// design's own, as the controller description names only the three
// state-boundary bits.  2^K N may not exceed 128.  start (any time) clears
// the register and divider and begins loading on the next clock; outputs are
// all low before the first start (reset state).
module grain_ctrl_shift
  import grain_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned K = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output ctrl_t ctrl
);
  localparam int unsigned STEP   = (1 << K) * N;        // cipher clocks per shift
  localparam int unsigned L      = TOTAL_CLKS / STEP;   // register length
  localparam int unsigned I_INIT = KEY_BITS / STEP;
  localparam int unsigned I_ACC  = (KEY_BITS + INIT_CLKS) / STEP;
  localparam int unsigned C_COPY = (KEY_BITS + INIT_CLKS + AUTH_BITS) / N;
  localparam int unsigned T_COPY = C_COPY >> K;         // ticks done at copy
  localparam int unsigned P_COPY = C_COPY % (1 << K);   // divider phase at copy

  initial assert (STEP <= 128 && N >= 1 && N <= 64)
    else $error("grain_ctrl_shift: need 1 <= N <= 64 and 2^K*N <= 128");

  logic         running;
  logic [L-1:0] sr;
  logic [K-1:0] div_cnt;
  logic         tick;
  logic         at_copy_tick;

  grain_clkdiv #(.K(K)) u_div (
    .clk, .rst_n,
    .clr  (start),
    .en   (running & ~sr[L-1]),
    .cnt  (div_cnt),
    .tick (tick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      sr      <= '0;
    end else if (start) begin
      running <= 1'b1;
      sr      <= '0;
    end else if (tick) begin
      sr      <= {sr[L-2:0], 1'b1};
    end
  end

  // Exactly T_COPY ticks have happened.
  if (T_COPY == 0) begin : g_t0
    assign at_copy_tick = ~sr[0];
  end else begin : g_tn
    assign at_copy_tick = sr[T_COPY-1] & ~sr[T_COPY];
  end

  always_comb begin
    ctrl.load     = running & ~sr[I_INIT-1];
    ctrl.init     = sr[I_INIT-1] & ~sr[I_ACC-1];
    ctrl.accload  = sr[I_ACC-1] & ~sr[L-1];
    ctrl.normal   = sr[L-1];
    ctrl.acc_copy = running & at_copy_tick && (div_cnt == K'(P_COPY));
  end
endmodule
