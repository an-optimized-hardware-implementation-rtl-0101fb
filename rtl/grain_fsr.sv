// grain_fsr: 128-bit feedback shift register (used for both the LFSR and
// the NFSR) that shifts N bits per clock.
//
// Bit 0 is the oldest bit (s_i / b_i), bit 127 the newest.  Each clock the
// register drops bits [N-1:0] and appends din[N-1:0] on top, din[0] being
// the earliest of the N new bits: q_next = {din, q[127:N]}.  The register
// therefore moves N steps of the bit-serial cipher per clock, which is how
// the unrolled architecture gets N bits per cycle.  The feedback logic
// sits outside (grain_unrolled).  Asynchronous active-low reset to zero
// (reset value is this design's choice; the key/IV load overwrites it).
module grain_fsr #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] din,
  output logic [127:0] q
);
  initial assert (N >= 1 && N <= 64) else $error("grain_fsr: N out of range");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else q <= {din, q[127:N]};
  end
endmodule
