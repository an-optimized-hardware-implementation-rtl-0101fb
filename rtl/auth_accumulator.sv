// auth_accumulator: 64-bit accumulator with its update logic and tag mux.
//
// With P = N/2 message bits per clock the update is
//   a_next[j] = a[j] + sum_{k<P} msg[k] * e[k+j],   e = {mac, r}
// where r is the shift register and mac holds the P MAC bits that enter
// the shift register in the same clock (the "future" register values the
// first accumulator bits need).  P = 1 gives the bit-serial rule
// a_{i+1} = a_i + m_i r_i.  Loading uses the same logic: with a zero
// accumulator and msg = 1 (bit 0 only), a_next = r.
// clr zeroes the accumulator (start of a new key/IV); en enables the
// update.  tag is the accumulator when tag_en is high and zero otherwise,
// so the MAC does not leak while it is being computed.
module auth_accumulator #(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           en,
  input  logic [N/2-1:0] msg,
  input  logic [63:0]    r,
  input  logic [N/2-1:0] mac,
  input  logic           tag_en,
  output logic [63:0]    acc,
  output logic [63:0]    tag
);
  localparam int unsigned P = N / 2;

  initial assert (N >= 2 && N <= 64 && N % 2 == 0)
    else $error("auth_accumulator: N must be even, 2..64");

  logic [P+63:0] e;
  logic [63:0]   upd;

  assign e = {mac, r};

  always_comb begin
    upd = '0;
    for (int k = 0; k < P; k++)
      if (msg[k]) upd ^= e[k +: 64];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc ^ upd;
  end

  assign tag = tag_en ? acc : '0;
endmodule
