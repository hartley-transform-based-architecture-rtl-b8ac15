// ht_cell -- one channel k of the recursive short-time Hartley transform.
//
// With a rectangular window of N samples, i = -N/2+1 .. N/2, the Hartley
// coefficient of channel k follows from the previous sample's coefficients
// of channels k and N-k:
//
//   HT(n;k) = (-1)^k F(n) + c(k) HT(n-1;k) + s(k) HT(n-1;N-k)
//
// with c(k) = cos(2*pi*k/N), s(k) = sin(2*pi*k/N) and F(n) from frame_diff.
// The recursion and its two multipliers follow the architecture; it implies
// the kernel cos(2*pi*i*k/N) - sin(2*pi*i*k/N). This design's own choices:
// c(k), s(k) are Q15 constants in 17 bits (so +/-1 are exact), each product
// is rounded to nearest, and the W-bit HT register wraps on overflow, so the
// input must be scaled to keep |HT| < 1 (about |f| < 1/(N*sqrt 2)). With
// quantised coefficients the recursion is only marginally stable: rounding
// errors of channels other than k = 0, N/4, N/2, 3N/4 accumulate slowly.
//
// Interface: f_diff = F(n); ht_mirror_q = HT(n-1;N-k), the register of the
// mirror channel (its own register for k = 0 and k = N/2). ht_d = HT(n;k) is
// combinational; ht_q is the HT register, loaded with ht_d when en is high
// and cleared by the synchronous active-low reset.
module ht_cell
  import smht_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned K = 0,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W:0]   f_diff,
  input  logic signed [W-1:0] ht_mirror_q,
  output logic signed [W-1:0] ht_d,
  output logic signed [W-1:0] ht_q
);

  localparam int PW = W + COEF_W;     // product width
  localparam int SW = W + 3;          // sum width: three terms of W+1 bits
  localparam logic signed [COEF_W-1:0] C = COEF_W'(cos_q15(int'(K), int'(N)));
  localparam logic signed [COEF_W-1:0] S = COEF_W'(sin_q15(int'(K), int'(N)));
  localparam logic signed [PW-1:0]     HALF_LSB = PW'(1) <<< (QF - 1);

  logic signed [PW-1:0] prod_c, prod_s;
  logic signed [SW-1:0] term_f, term_c, term_s, sum;

  always_comb begin
    prod_c = PW'(ht_q) * PW'(C);
    prod_s = PW'(ht_mirror_q) * PW'(S);
    term_c = SW'((prod_c + HALF_LSB) >>> QF);
    term_s = SW'((prod_s + HALF_LSB) >>> QF);
    term_f = (K % 2 == 1) ? -SW'(f_diff) : SW'(f_diff);
    sum    = term_f + term_c + term_s;
    ht_d   = sum[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  ht_q <= '0;
    else if (en) ht_q <= ht_d;
  end

endmodule
