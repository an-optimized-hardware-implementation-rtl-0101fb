// auth_shiftreg: 64-bit authentication shift register with n or n/2 shift.
//
// r[0] is the oldest bit (r_i), r[63] the newest.  While the accumulator
// and register are being loaded every y bit enters, so the register shifts
// N bits per clock; in normal operation only the odd (MAC) y bits enter, so
// it shifts N/2 bits.  half selects the N/2 shift (the "Sel" mux of the
// n / n/2 selection hardware).  din[0] is the earliest new bit; in half mode
// only din[N/2-1:0] is used.  en low holds the register.  Asynchronous
// active-low reset to zero (this design's choice).  Requires 2 <= N <= 64.
module auth_shiftreg #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         half,
  input  logic [N-1:0] din,
  output logic [63:0]  r
);
  localparam int unsigned P = N / 2;

  initial assert (N >= 2 && N <= 64 && N % 2 == 0)
    else $error("auth_shiftreg: N must be even, 2..64");

  logic [63:0] r_full, r_half;

  if (N == 64) begin : g_n64
    assign r_full = din;
  end else begin : g_nlt64
    assign r_full = {din, r[63:N]};
  end
  assign r_half = {din[P-1:0], r[63:P]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   r <= '0;
    else if (en)  r <= half ? r_half : r_full;
  end
endmodule
