// grain_unrolled: N chained copies of the f, g and y functions, producing
// the next N LFSR bits, N NFSR bits and N pre-output bits in one clock.
//
// Copy k works on the window starting k steps ahead of the current state.
// For k + j < 128 a window bit is a register bit; beyond that it is the bit
// produced by copy k + j - 128 in the same clock.  Up to N = 32 no window
// reaches past the register (highest tap 96, 96 + 31 < 128); for N > 32
// copies are chained to earlier copies, as in the 64-way unrolled version.
//
// Each copy also holds the per-bit input muxes of the architecture:
//   load    : LFSR <- padded IV bit, NFSR <- key bit
//   init    : f + y -> LFSR,  g + y -> NFSR   (y fed back, 256 clocks)
//   accload : f + key bit -> LFSR, g -> NFSR  (key added a second time)
//   normal  : f -> LFSR, g -> NFSR
//   none    : zeros shifted in (controller in reset state)
// The chained window bit of copy k is the muxed value, so chaining is
// correct in every phase.  Combinational; registers live in grain_fsr.
//
// Lint note: Verilator may report UNOPTFLAT on the new-bit vectors once the
// whole top level is flattened.  There is no combinational loop: a chained
// copy only reads bits of copies with a lower index, and the split into
// *_lo / *_hi vectors keeps the reads and writes apart inside this module.
// The warning only costs simulation speed and is left standing.
module grain_unrolled
  import grain_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [127:0] s,        // LFSR state, bit 0 = s_i
  input  logic [127:0] b,        // NFSR state, bit 0 = b_i
  input  logic         run,      // any state but reset
  input  logic         load,
  input  logic         init,
  input  logic         accload,
  input  logic [N-1:0] key_i,    // key bits k_{jN} .. k_{jN+N-1}
  input  logic [N-1:0] ivpad_i,  // padded IV bits for the LFSR
  // New bits of copies 0..min(N,32)-1 and of copies 32..N-1 (the upper
  // vectors are one dummy zero bit wide when N <= 32).
  output logic [((N < 32) ? N : 32)-1:0] s_lo,
  output logic [((N < 32) ? N : 32)-1:0] b_lo,
  output logic [((N < 32) ? N : 32)-1:0] y_lo,
  output logic [((N > 32) ? N - 32 : 1)-1:0] s_hi,
  output logic [((N > 32) ? N - 32 : 1)-1:0] b_hi,
  output logic [((N > 32) ? N - 32 : 1)-1:0] y_hi
);
  initial assert (N >= 1 && N <= 64) else $error("grain_unrolled: N out of range");

  // Copies 0..31 read only register bits; copies 32..63 read register bits
  // and bits made by copies 0..31 (k + j - 128 <= k - 32 < 32).  Keeping the
  // two groups in separate vectors keeps the net free of apparent loops.

  for (genvar k = 0; k < N; k++) begin : g_copy
    logic [WIN-1:0] sw, bw;
    logic           fk, gk, yk;
    logic           s_nb, b_nb;

    for (genvar j = 0; j < WIN; j++) begin : g_win
      if (k + j < 128) begin : g_reg
        assign sw[j] = s[k+j];
        assign bw[j] = b[k+j];
      end else begin : g_chain
        assign sw[j] = s_lo[k+j-128];
        assign bw[j] = b_lo[k+j-128];
      end
    end

    grain_f u_f (.s(sw), .f(fk));
    grain_g u_g (.b(bw), .s0(sw[0]), .g(gk));
    grain_y u_y (.b(bw), .s(sw), .y(yk));

    always_comb begin
      if (!run) begin
        s_nb = 1'b0;
        b_nb = 1'b0;
      end else if (load) begin
        s_nb = ivpad_i[k];
        b_nb = key_i[k];
      end else begin
        s_nb = fk ^ (init & yk) ^ (accload & key_i[k]);
        b_nb = gk ^ (init & yk);
      end
    end

    if (k < 32) begin : g_lo
      assign s_lo[k] = s_nb;
      assign b_lo[k] = b_nb;
      assign y_lo[k] = yk;
    end else begin : g_hi
      assign s_hi[k-32] = s_nb;
      assign b_hi[k-32] = b_nb;
      assign y_hi[k-32] = yk;
    end
  end

  if (N <= 32) begin : g_no_hi
    assign s_hi = '0;
    assign b_hi = '0;
    assign y_hi = '0;
  end
endmodule
