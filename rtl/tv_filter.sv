// tv_filter -- time-varying filter driven by the S-method.
//
// Each channel k compares its S-method value with the spectral floor R,
//
//   c_k = 1 if SM(n;k) >= R, else 0,
//
// and passes HT(n;k) on only when c_k = 1. The gated coefficients are summed
// by a binary tree of log2(N) adder levels that adds adjacent channels, then
// adjacent sums, and so on (the butterfly-like order of the architecture).
// The sum of all N Hartley coefficients of a window is N times its centre
// sample, so the tree keeps full width (W + log2 N bits) and the result is
// divided by N with an arithmetic right shift: with every c_k = 1 the output
// is the centre sample f(n). That scaling, the signed compare and the output
// register are this design's choices.
//
// Interface: ht[k] = HT(n;k), sm[k] = SM(n;k) and the strobe in_valid come
// from tf_analyzer; r_floor is R in the SM format. ck is combinational.
// y and y_valid are registered: one clock after in_valid, y holds
// (sum over c_k=1 of HT(n;k)) / N, truncated to W bits.
module tv_filter
  import smht_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned W  = 16,
  parameter int unsigned SW = sm_width(W, 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  ht [N],
  input  logic signed [SW-1:0] sm [N],
  input  logic signed [SW-1:0] r_floor,
  output logic [N-1:0]         ck,
  output logic signed [W-1:0]  y,
  output logic                 y_valid
);

  localparam int unsigned LG = $clog2(N);
  localparam int unsigned TW = W + LG;

  for (genvar l = 0; l <= int'(LG); l++) begin : g_lvl
    logic signed [TW-1:0] s [N >> l];
    if (l == 0) begin : g_leaf
      for (genvar k = 0; k < int'(N); k++) begin : g_k
        assign ck[k]  = (sm[k] >= r_floor);
        assign s[k]   = ck[k] ? TW'(ht[k]) : '0;
      end
    end else begin : g_add
      for (genvar j = 0; j < int'(N >> l); j++) begin : g_j
        assign s[j] = g_lvl[l-1].s[2*j] + g_lvl[l-1].s[2*j+1];
      end
    end
  end

  logic signed [TW-1:0] total;
  assign total = g_lvl[LG].s[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) y <= W'(total >>> LG);
    end
  end

  initial begin
    assert ((N & (N - 1)) == 0 && N >= 2)
      else $error("tv_filter: N must be a power of two");
  end

endmodule
