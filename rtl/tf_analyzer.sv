// tf_analyzer -- N-channel time-frequency analyzer (S-method via the
// recursive short-time Hartley transform).
//
// Each input sample updates all N channels in parallel. frame_diff forms
// F(n); channel k's ht_cell computes HT(n;k) from its own register and that
// of channel N-k; the sm_cell of channel k combines HT(n;k-LD .. k+LD)
// (indices modulo N) into SM+(n;k); and the S-method is the average
//
//   SM(n;k) = [SM+(n;k) + SM+(n;N-k)] / 2
//
// formed by one adder and a one-bit arithmetic right shift. Because the
// transform is real, the second half-sum is simply taken from the mirror
// channel. HT(n;k) and SM(n;k) are registered together, so the longest path
// runs from the HT registers of the previous sample through two multipliers
// and LD+3 adders into the SM register, as in the architecture.
//
// Interface: in_valid marks one sample f(n+N/2) on x_in; no back-pressure.
// One clock later out_valid is high for one cycle and ht_q[k] = HT(n;k),
// sm_q[k] = SM(n;k) (held until the next sample). The window centre n is
// therefore N/2 samples behind the newest input. N must be a power of two
// and at least 2*LD+1; it is this design's choice, the architecture leaves
// it open. wrapped reports that the delay line has filled.
module tf_analyzer
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
  output logic signed [W-1:0]  ht_q [N],
  output logic signed [SW-1:0] sm_q [N],
  output logic                 out_valid,
  output logic                 wrapped
);

  logic signed [W:0]    f_diff;
  logic signed [W-1:0]  ht_d [N];
  logic signed [SW-1:0] smp  [N];

  frame_diff #(.N(N), .W(W)) u_diff (
    .clk, .rst_n, .in_valid, .x_in, .f_diff, .wrapped
  );

  for (genvar k = 0; k < int'(N); k++) begin : g_ch
    localparam int unsigned MIR = (N - k) % N;
    logic signed [W-1:0] ht_p [LD];
    logic signed [W-1:0] ht_m [LD];

    ht_cell #(.N(N), .K(k), .W(W)) u_ht (
      .clk, .rst_n, .en(in_valid), .f_diff,
      .ht_mirror_q(ht_q[MIR]), .ht_d(ht_d[k]), .ht_q(ht_q[k])
    );

    for (genvar i = 1; i <= int'(LD); i++) begin : g_nb
      assign ht_p[i-1] = ht_d[(k + i) % N];
      assign ht_m[i-1] = ht_d[(k + N - i) % N];
    end

    sm_cell #(.W(W), .LD(LD), .SW(SW)) u_sm (
      .ht_c(ht_d[k]), .ht_p, .ht_m, .smp(smp[k])
    );

    logic signed [SW:0] pair;
    assign pair = (SW+1)'(smp[k]) + (SW+1)'(smp[MIR]);

    always_ff @(posedge clk) begin
      if (!rst_n)        sm_q[k] <= '0;
      else if (in_valid) sm_q[k] <= pair[SW:1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  initial begin
    assert (N >= 2 * LD + 1 && (N & (N - 1)) == 0)
      else $error("tf_analyzer: N must be a power of two and at least 2*LD+1");
  end

endmodule
