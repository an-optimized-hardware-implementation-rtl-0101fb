// grain_galois_fsr: the LFSR and NFSR in Galois form, for N <= 16.
//
// In the Fibonacci form every term of f and g is computed for the bit that
// enters position 127.  In the Galois form a term is moved d steps down the
// register: it is added to the bit passing position 127 - d, with all its
// indices lowered by d, so it reads the same state bits d clocks later.  The
// value that leaves the transformed part (below the lowest tap) is then the
// same as in the Fibonacci form, but each XOR tree is split into small
// pieces.  The tap offset d of each term depends on N (offsets are multiples
// of N, so a bit passes at most one tap per clock):
//   LFSR, N <= 4 : s0 s7 at 127, s38 at 123, s70 at 119, s81 at 115,
//                  s96 at 111
//   LFSR, N = 8  : s0 s7 s38 at 127, s70 at 119, s81 at 111, s96 at 103
//   LFSR, N = 16 : s0 s7 s38 s70 at 127, s81 s96 at 111
//   NFSR, N <= 2, 4, 8, 16: see the tables in the code.  For N <= 2 the b91
//   term is placed at 117 (this design's choice; the other offsets are the
//   2-way assignment, which N = 1 uses as well).
// Within one clock the N bit-steps are composed: a register bit moves N
// places and picks up the terms of the taps it passes, each evaluated at the
// bit-step where it passes.  Term, f/g and y inputs always lie below the
// lowest tap, where the register is a plain shift register, so bit-step i
// reads register bit x + i.
//
// Loading shifts in key and padded IV with the taps switched off.  Each
// loaded bit j then gets the terms of the taps below j added on entry (the
// initial-state adjustment), computed from already loaded bits; this makes
// the loaded register the Galois image of the Fibonacci state.  load_pos is
// the index of the first bit loaded in this clock (the loading counter
// times N).  Initialisation adds y to both new bits, accumulator loading adds
// the key bit to the LFSR's new bit, as in the Fibonacci form.  While run is
// low, zeros are shifted in and the taps are off.  Outputs: the N pre-output
// bits y of this clock (identical to the Fibonacci form).  Asynchronous
// active-low reset.  Requires N in {1, 2, 4, 8, 16}.
//
// With YTRANS = 1 (N = 1 only) the y added during initialisation is itself
// split into taps (grain_y_transform): its three parts are added to a bit as
// it passes positions 127, 126 and 125.  Two flags remember whether the bits
// now at 127 and 126 entered during initialisation, so the parts still due
// are added in the first clocks of accumulator loading as well.  The y
// output is unchanged and still the full function.
module grain_galois_fsr #(
  parameter int unsigned N      = 16,
  parameter bit          YTRANS = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic         load,
  input  logic         init,
  input  logic         accload,
  input  logic [6:0]   load_pos,
  input  logic [N-1:0] key_i,
  input  logic [N-1:0] ivpad_i,
  output logic [N-1:0] y
);
  initial assert (N == 1 || N == 2 || N == 4 || N == 8 || N == 16)
    else $error("grain_galois_fsr: N must be 1, 2, 4, 8 or 16");
  initial assert (!YTRANS || N == 1)
    else $error("grain_galois_fsr: YTRANS needs N = 1");

  // g terms (Fibonacci indices), up to four factors each.
  localparam int unsigned NG = 15;
  localparam int GI [NG][4] = '{
    '{0, 0, 0, 0}, '{26, 0, 0, 0}, '{56, 0, 0, 0}, '{91, 0, 0, 0}, '{96, 0, 0, 0},
    '{3, 67, 0, 0}, '{11, 13, 0, 0}, '{17, 18, 0, 0}, '{27, 59, 0, 0},
    '{40, 48, 0, 0}, '{61, 65, 0, 0}, '{68, 84, 0, 0}, '{88, 92, 93, 95},
    '{70, 78, 82, 0}, '{22, 24, 25, 0}};
  localparam int GC [NG] = '{1, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 4, 3, 3};
  // Tap offsets d (term added at position 127 - d) per N.
  localparam int GD2  [NG] = '{0, 14, 26, 10, 24, 2, 6, 8, 12, 22, 4, 28, 30, 20, 16};
  localparam int GD4  [NG] = '{0, 4, 4, 28, 24, 0, 8, 8, 4, 28, 24, 28, 20, 12, 16};
  localparam int GD8  [NG] = '{0, 16, 16, 16, 24, 0, 8, 8, 16, 8, 24, 8, 0, 24, 16};
  localparam int GD16 [NG] = '{0, 16, 0, 16, 16, 0, 0, 16, 16, 0, 16, 16, 16, 0, 16};
  // f terms and their offsets.
  localparam int unsigned NF = 6;
  localparam int FI   [NF] = '{0, 7, 38, 70, 81, 96};
  localparam int FD4  [NF] = '{0, 0, 4, 8, 12, 16};
  localparam int FD8  [NF] = '{0, 0, 0, 8, 16, 24};
  localparam int FD16 [NF] = '{0, 0, 0, 0, 16, 16};

  function automatic int gd(int t);
    if (N <= 2)      return GD2[t];
    else if (N == 4) return GD4[t];
    else if (N == 8) return GD8[t];
    else             return GD16[t];
  endfunction

  function automatic int fd(int t);
    if (N <= 4)      return FD4[t];
    else if (N == 8) return FD8[t];
    else             return FD16[t];
  endfunction

  // g term t on register r with every index moved by sh.
  function automatic logic gterm(logic [127:0] r, int t, int sh);
    logic v;
    v = 1'b1;
    for (int m = 0; m < 4; m++)
      if (m < GC[t]) v &= r[GI[t][m] + sh];
    return v;
  endfunction

  logic [127:0] s, b, s_nx, b_nx;
  logic [N-1:0] s_new, b_new;
  logic         taps;
  logic [N-1:0] yfb;            // y as added to the new bits
  logic         yt126, yt125;   // y parts due at 126 and 125
  logic [1:0]   init_q;         // bit at 127 / 126 entered in initialisation

  assign taps = run & ~load;

  for (genvar i = 0; i < N; i++) begin : g_step
    grain_y u_y (.b(b[i +: 97]), .s(s[i +: 97]), .y(y[i]));
  end

  if (YTRANS) begin : g_yt
    logic y127;
    grain_y_transform u_yt (
      .b(b[95:0]), .s(s[94:0]), .y127, .y126(yt126), .y125(yt125)
    );
    assign yfb = y127;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) init_q <= '0;
      else        init_q <= {init_q[0], run & init};
    end
  end else begin : g_nyt
    assign yfb    = y;
    assign yt126  = 1'b0;
    assign yt125  = 1'b0;
    assign init_q = '0;
  end

  always_comb begin
    // New bits entering position 127 at bit-step i.
    for (int i = 0; i < N; i++) begin
      logic fs, gs, fa, ga;
      int   j;
      fs = 1'b0; gs = s[i]; fa = 1'b0; ga = 1'b0;
      j  = int'(load_pos) + i;
      for (int t = 0; t < NF; t++) begin
        if (fd(t) == 0) fs ^= s[FI[t] + i];
        else if (127 - fd(t) < j) fa ^= s[FI[t] + i];
      end
      for (int t = 0; t < NG; t++) begin
        if (gd(t) == 0) gs ^= gterm(b, t, i);
        else if (127 - gd(t) < j) ga ^= gterm(b, t, i);
      end
      if (!run) begin
        s_new[i] = 1'b0;
        b_new[i] = 1'b0;
      end else if (load) begin
        s_new[i] = ivpad_i[i] ^ fa;
        b_new[i] = key_i[i] ^ ga;
      end else begin
        s_new[i] = fs ^ (init & yfb[i]) ^ (accload & key_i[i]);
        b_new[i] = gs ^ (init & yfb[i]);
      end
    end

    // Shift by N.
    for (int q = 0; q < 128; q++) begin
      if (q + N <= 127) begin
        s_nx[q] = s[q + N];
        b_nx[q] = b[q + N];
      end else begin
        s_nx[q] = s_new[q + N - 128];
        b_nx[q] = b_new[q + N - 128];
      end
    end

    // Add the term of each tap p = 127 - d to the bit that enters p at
    // bit-step i; that bit ends the clock at p - (N - 1 - i).
    if (taps) begin
      for (int t = 0; t < NF; t++)
        for (int i = 0; i < N; i++)
          if (fd(t) != 0)
            s_nx[128 - fd(t) - N + i] ^= s[FI[t] - fd(t) + i];
      for (int t = 0; t < NG; t++)
        for (int i = 0; i < N; i++)
          if (gd(t) != 0)
            b_nx[128 - gd(t) - N + i] ^= gterm(b, t, i - gd(t));
      // Remaining y parts of bits that entered during initialisation.
      s_nx[126] ^= init_q[0] & yt126;
      b_nx[126] ^= init_q[0] & yt126;
      s_nx[125] ^= init_q[1] & yt125;
      b_nx[125] ^= init_q[1] & yt125;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
      b <= '0;
    end else begin
      s <= s_nx;
      b <= b_nx;
    end
  end
endmodule
