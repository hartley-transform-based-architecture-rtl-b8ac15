// sm_cell_tb -- self-checking test of the S-method half-sum.
// Random Q15 Hartley values (full range and narrow range); the expected value
// HT^2 + 2*sum HT(k+i)HT(k-i) is computed with 64-bit integers, each product
// truncated to Q15 as floor(a*b/2^15).
module sm_cell_tb;
  import smht_pkg::*;
  localparam int unsigned W  = 16;
  localparam int unsigned LD = 2;
  localparam int unsigned SW = sm_width(W, LD);
  int checks = 0, failures = 0;
  logic signed [W-1:0]  ht_c;
  logic signed [W-1:0]  ht_p [LD];
  logic signed [W-1:0]  ht_m [LD];
  logic signed [SW-1:0] smp;

  sm_cell #(.W(W), .LD(LD)) dut (.*);

  function automatic longint qmul(longint a, longint b);
    return (a * b) >>> 15;
  endfunction

  function automatic logic signed [W-1:0] rnd(bit narrow);
    logic signed [W-1:0] v;
    v = W'($urandom);
    return narrow ? (v >>> 6) : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    for (int t = 0; t < 4000; t++) begin
      ht_c = rnd(t[0]);
      // avoid (-1)*(-1), the one product that wraps in Q15
      if (ht_c == -16'sd32768) ht_c = -16'sd32767;
      for (int i = 0; i < int'(LD); i++) begin
        ht_p[i] = rnd(t[0]);
        ht_m[i] = rnd(t[0]);
        if (ht_p[i] == -16'sd32768) ht_p[i] = 16'sd5;
      end
      #1;
      expv = qmul(ht_c, ht_c);
      for (int i = 0; i < int'(LD); i++) expv += 2 * qmul(ht_p[i], ht_m[i]);
      checks++;
      if (longint'(smp) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d smp=%0d exp=%0d", t, smp, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
