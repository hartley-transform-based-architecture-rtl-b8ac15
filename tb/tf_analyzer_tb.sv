// tf_analyzer_tb -- self-checking test of the N-channel analyzer.
// Random samples with idle cycles. After each sample it checks
//  * out_valid one clock after in_valid (latency 1, one sample per clock);
//  * every HT(n;k) against the direct windowed Hartley sum (floating point,
//    small tolerance for fixed-point rounding);
//  * every SM(n;k) bit-exactly against the S-method formula evaluated on the
//    analyzer's own HT values: SM = floor((SM+(k) + SM+(N-k))/2), indices
//    modulo N, Q15 products floor(a*b/2^15);
//  * every SM(n;k) against the S-method of the floating-point HT values.
module tf_analyzer_tb;
  import smht_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned W  = 16;
  localparam int unsigned LD = 2;
  localparam int unsigned SW = sm_width(W, LD);
  localparam int NI = N;
  localparam int LDI = LD;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL_HT = 24.0;
  localparam real TOL_SM = 48.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0]  x_in = '0;
  logic signed [W-1:0]  ht_q [N];
  logic signed [SW-1:0] sm_q [N];
  logic out_valid, wrapped;
  int hist [$];
  real ref_ht [N];

  tf_analyzer #(.N(N), .W(W), .LD(LD)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint qmul(longint a, longint b);
    return (a * b) >>> 15;
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic compute_ref();
    int m;
    real a;
    m = hist.size() - 1;
    for (int k = 0; k < NI; k++) begin
      ref_ht[k] = 0.0;
      for (int j = m - NI + 1; j <= m; j++) begin
        a = 2.0 * PI * (j - m + NI / 2) * k / NI;
        if (j >= 0) ref_ht[k] += hist[j] * ($cos(a) - $sin(a));
      end
    end
  endtask

  function automatic longint smp_int(int k);
    longint s;
    s = qmul(ht_q[k], ht_q[k]);
    for (int i = 1; i <= LDI; i++) s += 2 * qmul(ht_q[(k + i) % NI], ht_q[(k + NI - i) % NI]);
    return s;
  endfunction

  function automatic real smp_real(int k);
    real s;
    s = ref_ht[k] * ref_ht[k];
    for (int i = 1; i <= LDI; i++) s += 2.0 * ref_ht[(k + i) % NI] * ref_ht[(k + NI - i) % NI];
    return s / 32768.0;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    real er;
    int mir;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      // a tone in channel 3 plus noise, scaled so that |HT| stays below 1
      x_in = W'($rtoi(900.0 * $cos(2.0 * PI * 3.0 * t / NI)) + int'($urandom % 401) - 200);
      if (in_valid) hist.push_back(int'(x_in));
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("FAIL t=%0d out_valid=%b", t, out_valid);
      end
      if (in_valid) begin
        compute_ref();
        for (int k = 0; k < NI; k++) begin
          mir = (NI - k) % NI;
          checks++;
          if (rabs(real'(ht_q[k]) - ref_ht[k]) > TOL_HT) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d HT k=%0d dut=%0d ref=%f", t, k, ht_q[k], ref_ht[k]);
          end
          e = (smp_int(k) + smp_int(mir)) >>> 1;
          checks++;
          if (longint'(sm_q[k]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d SM k=%0d dut=%0d exp=%0d", t, k, sm_q[k], e);
          end
          er = (smp_real(k) + smp_real(mir)) / 2.0;
          checks++;
          if (rabs(real'(sm_q[k]) - er) > TOL_SM) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d SMreal k=%0d dut=%0d ref=%f", t, k, sm_q[k], er);
          end
        end
        checks++;
        if (wrapped != (hist.size() >= NI)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
