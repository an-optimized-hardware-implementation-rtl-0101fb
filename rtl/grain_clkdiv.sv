// grain_clkdiv: power-of-two clock divider built from a K-bit counter.
//
// Counter bit j toggles every 2^j clocks, so cnt[K-1] is the input clock
// divided by 2^K.  Instead of using that bit as a second clock, this design
// also gives a one-cycle tick when the counter wraps (cnt == 2^K - 1 with
// en high); the controller uses the tick as a clock enable so the whole
// cipher stays in one clock domain.  clr restarts the count at zero.
// Counter divider as described for the modified controller; the tick output
// and the synchronous clear are this design's own.
module grain_clkdiv #(
  parameter int unsigned K = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [K-1:0] cnt,
  output logic         tick
);
  initial assert (K >= 1) else $error("grain_clkdiv: K must be positive");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (en)  cnt <= cnt + 1'b1;
  end

  assign tick = en & (&cnt);
endmodule
