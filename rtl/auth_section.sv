// auth_section: the authentication part of the cipher, optionally isolated
// from the y function by one register stage.
//
// Inputs per clock are the N pre-output bits y (y[0] earliest), the P = N/2
// message bits m, the P encrypt/decrypt results t and the select cm
// (cm = 1: decryption, the plaintext is t; cm = 0: encryption, it is m).
// With ISOLATE = 1 the y word, the selected plaintext, the control bits and
// last are registered first, so the path from the cipher registers through
// y ends at this stage and the tag comes one clock later.
//   accload : every y bit is shifted into the 64-bit shift register
//             (N per clock); on acc_copy the message bit is forced to one,
//             copying the register into the cleared accumulator.
//   normal  : odd y bits (MAC bits) enter the register, N/2 per clock, and
//             the accumulator absorbs the plaintext bits.
// last marks the clock carrying the final message word (its padding bit
// included).  After that word is absorbed, accumulator and register stop
// and tag_valid rises with the tag on tag; until then tag is zero.
// clr (start of a new key/IV) empties the isolation stage, the accumulator
// and the tag state.  The isolation stage follows the architecture;
// registering the plaintext with y, the last/tag_valid handshake and the
// freeze after the last word are this design's choices.
module auth_section
  import grain_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter bit          ISOLATE = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  ctrl_t          ctrl,
  input  logic [N-1:0]   y,
  input  logic [N/2-1:0] m,
  input  logic [N/2-1:0] t,
  input  logic           cm,
  input  logic           last,
  output logic [63:0]    tag,
  output logic           tag_valid
);
  localparam int unsigned P = N / 2;

  logic [N-1:0] y_d;
  logic [P-1:0] p_d, mac, ptxt;
  logic         accload_d, normal_d, copy_d, last_d;
  logic         done;
  logic         sr_en, acc_en;
  logic [N-1:0] sr_din;
  logic [63:0]  r, acc;
  logic [P-1:0] msg;

  assign ptxt = cm ? t : m;

  if (ISOLATE) begin : g_iso
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y_d <= '0; p_d <= '0; accload_d <= 1'b0; normal_d <= 1'b0;
        copy_d <= 1'b0; last_d <= 1'b0;
      end else if (clr) begin
        y_d <= '0; p_d <= '0; accload_d <= 1'b0; normal_d <= 1'b0;
        copy_d <= 1'b0; last_d <= 1'b0;
      end else begin
        y_d       <= y;
        p_d       <= ptxt;
        accload_d <= ctrl.accload;
        normal_d  <= ctrl.normal;
        copy_d    <= ctrl.acc_copy;
        last_d    <= last;
      end
    end
  end else begin : g_direct
    assign y_d       = y;
    assign p_d       = ptxt;
    assign accload_d = ctrl.accload;
    assign normal_d  = ctrl.normal;
    assign copy_d    = ctrl.acc_copy;
    assign last_d    = last;
  end

  // Odd y bits are MAC bits.
  always_comb begin
    for (int i = 0; i < P; i++) mac[i] = y_d[2*i+1];
    sr_din = accload_d ? y_d : N'(mac);
    msg    = copy_d ? P'(1) : p_d;
  end

  assign sr_en  = accload_d | (normal_d & ~done);
  assign acc_en = copy_d | (normal_d & ~done);

  auth_shiftreg #(.N(N)) u_sr (
    .clk, .rst_n,
    .en   (sr_en),
    .half (normal_d),
    .din  (sr_din),
    .r    (r)
  );

  auth_accumulator #(.N(N)) u_acc (
    .clk, .rst_n,
    .clr    (clr),
    .en     (acc_en),
    .msg    (msg),
    .r      (r),
    .mac    (mac),
    .tag_en (done),
    .acc    (acc),
    .tag    (tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         done <= 1'b0;
    else if (clr)                       done <= 1'b0;
    else if (normal_d & last_d & ~done) done <= 1'b1;
  end

  assign tag_valid = done;
endmodule
