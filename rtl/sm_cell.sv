// sm_cell -- S-method half-sum SM+(n;k) of one channel.
//
//   SM+(n;k) = HT(n;k)^2 + 2 * sum_{i=1..LD} HT(n;k+i) HT(n;k-i)
//
// The rectangular frequency window P(i) = 1, |i| <= LD, is used. Because the
// Hartley transform is real, one such chain per channel replaces the two
// (real and imaginary) chains an STFT-based S-method needs; the other half,
// SM-(n;k), is SM+(n;N-k) of the mirror channel and is added in tf_analyzer.
// The cell has LD+1 Q15 multipliers (q15_mult) and LD adders, as in the
// architecture. The factor 2 is a one-bit left shift. The sum is carried in
// SW bits (Q15 with guard bits) so it cannot overflow; the guard bits are this
// design's choice.
//
// Interface: ht_c = HT(n;k); ht_p[i-1] = HT(n;k+i) and ht_m[i-1] = HT(n;k-i),
// channel indices taken modulo N by the caller. smp = SM+(n;k), SW-bit Q15.
// Timing: combinational.
module sm_cell
  import smht_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned LD = 2,
  parameter int unsigned SW = sm_width(W, LD)
) (
  input  logic signed [W-1:0]  ht_c,
  input  logic signed [W-1:0]  ht_p [LD],
  input  logic signed [W-1:0]  ht_m [LD],
  output logic signed [SW-1:0] smp
);

  logic signed [W-1:0] sq;
  logic signed [W-1:0] xprod [LD];

  q15_mult #(.W(W)) u_sq (.a(ht_c), .b(ht_c), .p(sq));

  for (genvar i = 0; i < int'(LD); i++) begin : g_cross
    q15_mult #(.W(W)) u_mul (.a(ht_p[i]), .b(ht_m[i]), .p(xprod[i]));
  end

  always_comb begin
    logic signed [SW-1:0] acc;
    acc = '0;
    for (int i = 0; i < int'(LD); i++) acc = acc + SW'(xprod[i]);
    smp = SW'(sq) + (acc <<< 1);
  end

endmodule
