// smht_tvf_top_full_tb -- end-to-end test of smht_tvf_top with every parameter at its default (N = 64).
// A noisy linear-FM chirp is streamed in with random idle cycles. Checks:
//  * sm_valid one clock after in_valid and y_valid one clock after sm_valid;
//  * c_k = (SM(n;k) >= R) for every channel, from the analyzer's outputs;
//  * y = floor(sum over c_k=1 of HT(n;k) / N), bit exact;
//  * all-pass phase (R at its minimum): y equals the window-centre input
//    sample f(n), N/2 samples behind the newest one, within rounding;
//  * filtering phase: the filtered output is closer to the clean chirp than
//    the noisy input is (mean squared error).
// Mechanisms counted, each must occur: delay line wrap, idle input cycles,
// channels passed (c_k=1), channels stopped (c_k=0), all-pass and filtering
// modes.
module smht_tvf_top_full_tb;
  import smht_pkg::*;
  localparam int unsigned N  = 64;
  localparam int unsigned W  = 16;
  localparam int unsigned LD = 2;
  localparam int unsigned SW = sm_width(W, LD);
  localparam int NI = N;
  localparam real PI = 3.14159265358979323846;
  localparam int NSAMP = 1200;
  localparam int PASS_ALL = NSAMP / 3;      // samples in the all-pass phase
  localparam real AMP = 250.0;
  localparam int NOISE = 225;
  localparam logic signed [SW-1:0] R_FILT = SW'(300);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0]  x_in = '0;
  logic signed [SW-1:0] r_floor;
  logic signed [W-1:0]  ht_out [N];
  logic signed [SW-1:0] sm_out [N];
  logic                 sm_valid, y_valid, wrapped;
  logic [N-1:0]         ck_out;
  logic signed [W-1:0]  y_out;

  int hist [$];          // noisy samples as applied
  real clean [$];        // clean chirp samples
  int n_wrap = 0, n_idle = 0, n_pass = 0, n_stop = 0, n_allpass = 0, n_filt = 0;
  real mse_in = 0.0, mse_out = 0.0;

  smht_tvf_top dut (.*);

  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, m, ctr;
    real ph, c;
    longint sum, expy;
    logic [N-1:0] eck;
    logic was_valid;
    r_floor = {1'b1, {(SW-1){1'b0}}};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    t = 0;
    while (t < NSAMP) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      if (!in_valid) n_idle++;
      r_floor = (t < PASS_ALL) ? {1'b1, {(SW-1){1'b0}}} : R_FILT;
      if (in_valid) begin
        // instantaneous frequency sweeps 0.05 .. 0.30 cycles per sample
        ph = 2.0 * PI * (0.05 * t + 0.125 * t * t / NSAMP);
        c  = AMP * $cos(ph);
        clean.push_back(c);
        x_in = W'($rtoi(c) + int'($urandom % (2 * NOISE + 1)) - NOISE);
        hist.push_back(int'(x_in));
        t++;
      end
      was_valid = in_valid;
      @(posedge clk); #1;
      checks++;
      if (sm_valid !== was_valid) begin
        failures++;
        $display("FAIL sm_valid latency at t=%0d", t);
      end
      if (!sm_valid) continue;
      if (wrapped && hist.size() == NI + 1) n_wrap++;
      // channel selections and expected filter output from the analyzer outputs
      sum = 0;
      for (int k = 0; k < NI; k++) begin
        eck[k] = (sm_out[k] >= r_floor);
        if (eck[k]) begin sum += longint'(ht_out[k]); n_pass++; end else n_stop++;
      end
      expy = sum >>> $clog2(N);
      checks++;
      if (ck_out !== eck) begin
        failures++;
        if (failures < 10) $display("FAIL ck t=%0d dut=%h exp=%h", t, ck_out, eck);
      end
      @(negedge clk);
      in_valid = 0;           // next cycle idle so that y can be checked alone
      n_idle++;
      @(posedge clk); #1;
      checks++;
      if (y_valid !== 1'b1 || longint'(y_out) != expy) begin
        failures++;
        if (failures < 10) $display("FAIL y t=%0d dut=%0d exp=%0d valid=%b", t, y_out, expy, y_valid);
      end
      m = hist.size() - 1;
      ctr = m - NI / 2;
      if (ctr >= NI) begin
        if (r_floor == {1'b1, {(SW-1){1'b0}}}) begin
          n_allpass++;
          checks++;
          if (rabs(real'(y_out) - hist[ctr]) > 4.0) begin
            failures++;
            if (failures < 10) $display("FAIL allpass t=%0d y=%0d f=%0d", t, y_out, hist[ctr]);
          end
        end else if (ctr >= PASS_ALL + NI) begin
          n_filt++;
          mse_in  += (hist[ctr] - clean[ctr]) ** 2;
          mse_out += (real'(y_out) - clean[ctr]) ** 2;
        end
      end
    end
    if (n_filt > 0) begin
      mse_in /= n_filt;
      mse_out /= n_filt;
    end
    $display("filtering: input MSE %f, output MSE %f over %0d samples", mse_in, mse_out, n_filt);
    checks++;
    if (!(mse_out < mse_in)) failures++;
    $display("mechanisms: wrap=%0d idle=%0d pass=%0d stop=%0d allpass=%0d filt=%0d",
             n_wrap, n_idle, n_pass, n_stop, n_allpass, n_filt);
    checks += 6;
    if (n_wrap == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_pass == 0) failures++;
    if (n_stop == 0) failures++;
    if (n_allpass == 0) failures++;
    if (n_filt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
