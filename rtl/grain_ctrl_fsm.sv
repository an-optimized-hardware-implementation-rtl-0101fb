// grain_ctrl_fsm: the standard controller, a five-state machine with a
// cycle counter.
//
// States: reset -> (start) -> loading (128/N clocks) -> initialisation
// (256/N clocks) -> accumloading (128/N clocks) -> normal.  In accumloading
// the counter value 64/N (the first clock after 64 y bits have entered the
// shift register) raises acc_copy, which forces the message bit to one so
// the shift register is copied into the (zero) accumulator.  normal lasts
// until the next start; start in any state restarts loading on the next
// clock.  Outputs are decoded from the state register (Moore).  State names
// and durations follow the architecture; the encoding, the restart rule and
// the counter width are this design's choices.
module grain_ctrl_fsm
  import grain_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output ctrl_t  ctrl,
  output state_e state
);
  localparam int unsigned LOAD_CYC = KEY_BITS / N;
  localparam int unsigned INIT_CYC = INIT_CLKS / N;
  localparam int unsigned ACC_CYC  = ACC_CLKS / N;
  localparam int unsigned COPY_CYC = AUTH_BITS / N;
  localparam int unsigned CW       = $clog2(INIT_CYC + 1);

  initial assert (N >= 1 && N <= 64 && (N & (N - 1)) == 0)
    else $error("grain_ctrl_fsm: N must be a power of two in 1..64");

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_RESET;
      cnt   <= '0;
    end else if (start) begin
      state <= ST_LOAD;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_LOAD: if (cnt == CW'(LOAD_CYC - 1)) begin
          state <= ST_INIT;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        ST_INIT: if (cnt == CW'(INIT_CYC - 1)) begin
          state <= ST_ACCLOAD;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        ST_ACCLOAD: if (cnt == CW'(ACC_CYC - 1)) begin
          state <= ST_NORMAL;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        ST_NORMAL, ST_RESET: cnt <= '0;
        default: state <= ST_RESET;
      endcase
    end
  end

  always_comb begin
    ctrl.load     = (state == ST_LOAD);
    ctrl.init     = (state == ST_INIT);
    ctrl.accload  = (state == ST_ACCLOAD);
    ctrl.normal   = (state == ST_NORMAL);
    ctrl.acc_copy = (state == ST_ACCLOAD) && (cnt == CW'(COPY_CYC));
  end
endmodule
