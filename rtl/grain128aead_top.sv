// grain128aead_top: N-way unrolled Grain-128AEAD authenticated encryption.
//
// The cipher state is a 128-bit NFSR and a 128-bit LFSR; N chained copies of
// the feedback functions f, g and the pre-output function y advance it N
// bit-steps per clock (N = 64 by default, chaining copies 32..63 to copies
// 0..31).  One run, counted in clocks c from the clock after start:
//   loading       c <  128/N : key_i -> NFSR, iv_i (padded with 31 ones and
//                              a zero to 128 bits) -> LFSR, N bits a clock
//   initialisation   256/N   : y fed back into both registers
//   accload          128/N   : all y bits fill the 64-bit authentication
//                              shift register; after the first 64 it is
//                              copied to the accumulator; key_i must be
//                              presented again (y_flag_o high), chunk j in
//                              the j-th clock, and is added into the LFSR
//   normal      c >= 512/N   : N/2 keystream bits (even y) and N/2 MAC bits
//                              (odd y) per clock
// In normal operation msg_i carries N/2 message bits per clock, from the
// first normal clock on without gaps (msg_take_o high); ce_i[i]
// encrypts/decrypts bit i (low: associated data, passed through and
// authenticated), cm_i = 1 selects decryption (the result data_o is the
// plaintext that is authenticated), cm_i = 0 encryption (msg_i is).  The
// stream must end with the padding one bit, zeros after it, and last_i on
// its final word; the 64-bit tag appears on tag_o with tag_valid_o two
// clocks later with ISOLATE = 1 (one clock without isolation) and is zero
// before.  Key chunk j is key bits jN .. jN+N-1 (key_i[0] = k_{jN}); IV
// likewise.
//
// N = 1 is the bit-serial version: y alternates between keystream and MAC
// bits, so one message bit is taken every second normal clock (msg_take_o
// marks them, starting with the first normal clock) and the authentication
// section runs at half rate on a one-bit divider phase.  A register holds
// the keystream-clock y bit, the plaintext to authenticate (the delayed
// decrypted data when decrypting) and last_i until the MAC clock.  The tag
// then comes one clock later than for N >= 2.
//
// Parameters: N (unrolling, 1..64, power of two), SHIFT_CTRL (1: the
// shift-register controller with a 2^K clock divider, 0: the state machine
// with a counter), K (divider exponent, 2^K * N <= 128), ISOLATE (register
// stage in front of the authentication section), GALOIS (Galois-form
// registers), YTRANS (with GALOIS and N = 1: the initialisation y split into
// register taps, see grain_y_transform).  The defaults form the
// fastest configuration of the architecture: 64-way unrolling, shift-register
// controller, isolated authentication.  GALOIS = 1 (N <= 16 only) replaces
// the unrolled Fibonacci registers by grain_galois_fsr, the Galois form with
// shorter feedback paths; the function is unchanged.  Of the transformed
// and pipelined y of the N <= 16 versions only the bit-serial transform is
// part of this RTL; the pipelined y is not.  The per-bit ce_i, last_i /
// tag_valid_o, msg_take_o, the internal IV padding and the asynchronous
// reset are this design's choices.
module grain128aead_top
  import grain_pkg::*;
#(
  parameter int unsigned N          = 64,
  parameter bit          SHIFT_CTRL = 1'b1,
  parameter int unsigned K          = 1,
  parameter bit          ISOLATE    = (N > 2),
  parameter bit          GALOIS     = 1'b0,
  parameter bit          YTRANS     = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_i,
  input  logic [N-1:0]   key_i,
  input  logic [N-1:0]   iv_i,
  input  logic [((N > 1) ? N / 2 : 1)-1:0] msg_i,
  input  logic [((N > 1) ? N / 2 : 1)-1:0] ce_i,
  input  logic           cm_i,
  input  logic           last_i,
  output logic           load_o,
  output logic           y_flag_o,
  output logic           normal_o,
  output logic           msg_take_o,
  output logic [((N > 1) ? N / 2 : 1)-1:0] ks_o,
  output logic [((N > 1) ? N / 2 : 1)-1:0] data_o,
  output logic [63:0]    tag_o,
  output logic           tag_valid_o
);
  localparam int unsigned NLO = (N < 32) ? N : 32;
  localparam int unsigned NHI = (N > 32) ? N - 32 : 1;
  localparam int unsigned LC  = KEY_BITS / N;             // loading clocks
  localparam int unsigned LCW = (LC > 1) ? $clog2(LC) : 1;

  initial assert (N >= 1 && N <= 64 && (N & (N - 1)) == 0)
    else $error("grain128aead_top: N must be a power of two in 1..64");

  initial assert (!GALOIS || N <= 16)
    else $error("grain128aead_top: the Galois form needs N <= 16");
  initial assert (!YTRANS || (GALOIS && N == 1))
    else $error("grain128aead_top: YTRANS needs GALOIS and N = 1");

  ctrl_t          ctrl;
  logic [N-1:0]   y;
  logic [N-1:0]   ivpad;
  logic [LCW-1:0] load_cnt;
  logic           run;
  logic           take;   // clock on which msg_i is consumed

  // ---------------- controller ----------------
  if (SHIFT_CTRL) begin : g_shift_ctrl
    grain_ctrl_shift #(.N(N), .K(K)) u_ctrl (
      .clk, .rst_n, .start(start_i), .ctrl(ctrl)
    );
  end else begin : g_fsm_ctrl
    state_e state;
    grain_ctrl_fsm #(.N(N)) u_ctrl (
      .clk, .rst_n, .start(start_i), .ctrl(ctrl), .state(state)
    );
  end

  assign run = ctrl.load | ctrl.init | ctrl.accload | ctrl.normal;

  // ---------------- IV padding ----------------
  // LFSR bit positions 96..126 are loaded with one, 127 with zero.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         load_cnt <= '0;
    else if (ctrl.load) load_cnt <= load_cnt + 1'b1;
    else                load_cnt <= '0;
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      int unsigned pos;
      pos = int'(load_cnt) * N + k;
      if (pos < IV_BITS) ivpad[k] = iv_i[k];
      else               ivpad[k] = (pos != REG_BITS - 1);
    end
  end

  // ---------------- cipher core ----------------
  if (GALOIS) begin : g_galois
    grain_galois_fsr #(.N(N), .YTRANS(YTRANS)) u_gfsr (
      .clk, .rst_n, .run,
      .load     (ctrl.load),
      .init     (ctrl.init),
      .accload  (ctrl.accload),
      .load_pos (7'(int'(load_cnt) * N)),
      .key_i    (key_i),
      .ivpad_i  (ivpad),
      .y        (y)
    );
  end else begin : g_fibonacci
    logic [127:0]   s, b;
    logic [NLO-1:0] s_lo, b_lo, y_lo;
    logic [NHI-1:0] s_hi, b_hi, y_hi;
    logic [N-1:0]   s_in, b_in;

    grain_unrolled #(.N(N)) u_round (
      .s, .b, .run,
      .load    (ctrl.load),
      .init    (ctrl.init),
      .accload (ctrl.accload),
      .key_i   (key_i),
      .ivpad_i (ivpad),
      .s_lo, .b_lo, .y_lo, .s_hi, .b_hi, .y_hi
    );

    if (N > 32) begin : g_cat_hi
      assign s_in = {s_hi, s_lo};
      assign b_in = {b_hi, b_lo};
      assign y    = {y_hi, y_lo};
    end else begin : g_cat_lo
      assign s_in = s_lo;
      assign b_in = b_lo;
      assign y    = y_lo;
    end

    grain_fsr #(.N(N)) u_lfsr (.clk, .rst_n, .din(s_in), .q(s));
    grain_fsr #(.N(N)) u_nfsr (.clk, .rst_n, .din(b_in), .q(b));
  end

  // ---------------- encryption / decryption ----------------
  grain_crypt #(.N(N)) u_crypt (
    .y, .normal(take), .m(msg_i), .ce(ce_i), .z(ks_o), .t(data_o)
  );

  // ---------------- authentication ----------------
  if (N == 1) begin : g_serial
    // Bit-serial version: y alternates between keystream and MAC bits, so
    // the authentication section runs at half rate.  A one-bit divider
    // gives the phase: phase 0 clocks take a message bit (and, in
    // accumulator loading, the first y bit of a pair), phase 1 clocks carry
    // the MAC bit.  The phase-0 y bit, the plaintext selected by cm_i (the
    // decrypted data when decrypting) and last_i are held in a register
    // until the phase-1 clock, where the pair goes to a two-bit
    // authentication section.
    logic  phase, y_p, p_p, last_p, copy_p;
    ctrl_t actl;

    grain_clkdiv #(.K(1)) u_half (
      .clk, .rst_n,
      .clr  (~(ctrl.accload | ctrl.normal)),
      .en   (1'b1),
      .cnt  (phase),
      .tick ()
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y_p <= 1'b0; p_p <= 1'b0; last_p <= 1'b0; copy_p <= 1'b0;
      end else if (!phase) begin
        y_p    <= y[0];
        p_p    <= cm_i ? data_o[0] : msg_i[0];
        last_p <= last_i;
        copy_p <= ctrl.acc_copy;
      end
    end

    always_comb begin
      actl          = '0;
      actl.accload  = ctrl.accload & phase;
      actl.normal   = ctrl.normal & phase;
      actl.acc_copy = copy_p & phase;
    end

    assign take = ctrl.normal & ~phase;

    auth_section #(.N(2), .ISOLATE(ISOLATE)) u_auth (
      .clk, .rst_n,
      .clr       (start_i),
      .ctrl      (actl),
      .y         ({y[0], y_p}),
      .m         (p_p),
      .t         (p_p),
      .cm        (1'b0),
      .last      (last_p),
      .tag       (tag_o),
      .tag_valid (tag_valid_o)
    );
  end else begin : g_parallel
    assign take = ctrl.normal;

    auth_section #(.N(N), .ISOLATE(ISOLATE)) u_auth (
      .clk, .rst_n,
      .clr       (start_i),
      .ctrl      (ctrl),
      .y         (y),
      .m         (msg_i),
      .t         (data_o),
      .cm        (cm_i),
      .last      (last_i),
      .tag       (tag_o),
      .tag_valid (tag_valid_o)
    );
  end

  assign load_o   = ctrl.load;
  assign y_flag_o = ctrl.accload;
  assign normal_o = ctrl.normal;
  assign msg_take_o = take;
endmodule
