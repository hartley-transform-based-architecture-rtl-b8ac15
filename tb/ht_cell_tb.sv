// ht_cell_tb -- self-checking test of the recursive Hartley channel.
// Four cells are wired as the analyzer wires them: channels 1 and N-1 feed
// each other, channels 0 and N/2 are their own mirrors. F(n) is formed here
// from a sample history. Two references are used: a one-step integer model
// of the recursion (bit exact), and the direct windowed Hartley sum
//   HT(n;k) = sum_{i=-N/2+1..N/2} f(n+i) (cos(2 pi i k/N) - sin(2 pi i k/N))
// in floating point, with a small tolerance for fixed-point rounding.
module ht_cell_tb;
  localparam int unsigned N = 16;
  localparam int unsigned W = 16;
  localparam int NC = 4;
  localparam int KS [NC] = '{0, 1, N - 1, N / 2};
  localparam int MS [NC] = '{0, 2, 1, 3};   // index of each cell's mirror
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 24;
  localparam int NI = N;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W:0]   f_diff = '0;
  logic signed [W-1:0] ht_d [NC];
  logic signed [W-1:0] ht_q [NC];
  int hist [$];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    ht_cell #(.N(N), .K(KS[c]), .W(W)) dut (
      .clk, .rst_n, .en, .f_diff, .ht_mirror_q(ht_q[MS[c]]),
      .ht_d(ht_d[c]), .ht_q(ht_q[c])
    );
  end

  always #5 clk = ~clk;

  function automatic int wrap16(longint v);
    logic signed [W-1:0] t;
    t = W'(v);
    return int'(t);
  endfunction

  function automatic int coef(bit is_sin, int k);
    real a;
    a = 2.0 * PI * k / NI;
    return int'((is_sin ? $sin(a) : $cos(a)) * 32768.0);
  endfunction

  function automatic real direct_ht(int k);
    real acc, a;
    int m;
    acc = 0.0;
    m = hist.size() - 1;                 // newest sample index
    for (int j = m - NI + 1; j <= m; j++) begin
      a = 2.0 * PI * (j - m + NI / 2) * k / NI;
      if (j >= 0) acc += hist[j] * ($cos(a) - $sin(a));
    end
    return acc;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, old, expv;
    longint pc, ps;
    real r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      x  = int'($urandom % 2001) - 1000;
      old = (hist.size() >= N) ? hist[hist.size() - N] : 0;
      f_diff = (W+1)'(x - old);
      #1;
      if (en) begin
        for (int c = 0; c < NC; c++) begin
          pc = longint'(ht_q[c]) * coef(0, KS[c]) + 16384;
          ps = longint'(ht_q[MS[c]]) * coef(1, KS[c]) + 16384;
          expv = wrap16(((KS[c] % 2) ? -(x - old) : (x - old)) + (pc >>> 15) + (ps >>> 15));
          checks++;
          if (int'(ht_d[c]) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL step t=%0d k=%0d ht_d=%0d exp=%0d", t, KS[c], ht_d[c], expv);
          end
        end
        hist.push_back(x);
        @(posedge clk); #1;
        for (int c = 0; c < NC; c++) begin
          r = direct_ht(KS[c]);
          checks++;
          if ((real'(ht_q[c]) - r) > TOL || (r - real'(ht_q[c])) > TOL) begin
            failures++;
            if (failures < 10) $display("FAIL direct t=%0d k=%0d ht_q=%0d ref=%f", t, KS[c], ht_q[c], r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
