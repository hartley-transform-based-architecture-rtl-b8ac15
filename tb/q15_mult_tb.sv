// q15_mult_tb -- self-checking test of the Q15 multiplier.
// Corner operands and random pairs; the expected product is floor(a*b/2^15)
// computed with 64-bit integer arithmetic, wrapped to W bits.
module q15_mult_tb;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;
  logic signed [W-1:0] a, b, p;

  q15_mult #(.W(W)) dut (.a, .b, .p);

  task automatic check_one(input logic signed [W-1:0] ta, input logic signed [W-1:0] tb_);
    longint prod, expv;
    a = ta; b = tb_;
    #1;
    prod = longint'(ta) * longint'(tb_);
    expv = prod >>> 15;
    checks++;
    if (p !== W'(expv)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d exp=%0d", ta, tb_, p, W'(expv));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'sd16384, 16'sd16384);   // 0.5*0.5 = 0.25
    check_one(16'sd32767, 16'sd32767);
    check_one(-16'sd32768, 16'sd32767);
    check_one(-16'sd16384, 16'sd16384);
    check_one(16'sd1, -16'sd1);          // floor gives -1
    check_one(16'sd0, 16'sd12345);
    for (int i = 0; i < 5000; i++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
