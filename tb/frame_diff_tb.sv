// frame_diff_tb -- self-checking test of the input delay line.
// Random samples with random idle cycles; a queue holds the sample history
// and gives the expected F = newest - (sample N positions back, or 0).
module frame_diff_tb;
  localparam int unsigned N = 8;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x_in = '0;
  logic signed [W:0] f_diff;
  logic wrapped;
  int hist [$];

  frame_diff #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv, old;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x_in     = W'($urandom);
      #1;
      if (in_valid) begin
        old  = (hist.size() >= N) ? hist[hist.size() - N] : 0;
        expv = int'(x_in) - old;
        checks++;
        if (int'(f_diff) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d f_diff=%0d exp=%0d", t, f_diff, expv);
        end
        checks++;
        if (wrapped != (hist.size() >= N)) failures++;
        hist.push_back(int'(x_in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
