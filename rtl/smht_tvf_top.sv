// smht_tvf_top -- real-time time-frequency analysis and time-varying
// filtering built on the short-time Hartley transform.
//
// One sample per strobe enters tf_analyzer, which delivers for all N channels
// the Hartley coefficients HT(n;k) and the S-method SM(n;k) one clock later.
// tv_filter keeps the channels whose S-method reaches the spectral floor R
// and sums their Hartley coefficients into the filtered sample one clock
// after that. The split into analyzer and filter, both fed by the same
// Hartley stage, follows the architecture; widths beyond 16-bit Q15, N = 64
// and the strobe/latency convention are this design's choices.
//
// Interface: in_valid/x_in carry the input f(n+N/2) (Q15, scaled so that
// |HT| < 1); r_floor is R in the SM format (SW bits, Q15). sm_valid pulses
// one clock after in_valid with ht_out/sm_out for window centre n; ck_out
// are the filter's channel selections for those values; y_valid pulses one
// clock after sm_valid with y_out = filtered f(n).
module smht_tvf_top
  import smht_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned W  = 16,
  parameter int unsigned LD = 2,
  parameter int unsigned SW = sm_width(W, LD)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [SW-1:0] r_floor,
  output logic signed [W-1:0]  ht_out [N],
  output logic signed [SW-1:0] sm_out [N],
  output logic                 sm_valid,
  output logic [N-1:0]         ck_out,
  output logic signed [W-1:0]  y_out,
  output logic                 y_valid,
  output logic                 wrapped
);

  tf_analyzer #(.N(N), .W(W), .LD(LD), .SW(SW)) u_tfa (
    .clk, .rst_n, .in_valid, .x_in,
    .ht_q(ht_out), .sm_q(sm_out), .out_valid(sm_valid), .wrapped
  );

  tv_filter #(.N(N), .W(W), .SW(SW)) u_tvf (
    .clk, .rst_n, .in_valid(sm_valid), .ht(ht_out), .sm(sm_out),
    .r_floor, .ck(ck_out), .y(y_out), .y_valid
  );

endmodule
