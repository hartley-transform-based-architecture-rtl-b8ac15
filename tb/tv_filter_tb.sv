// tv_filter_tb -- self-checking test of the time-varying filter.
// Random Hartley and S-method values and random floors R (including one
// below and one above every S-method value). Expected: c_k = (SM >= R) and,
// one clock later, y = floor(sum_{c_k=1} HT(n;k) / N).
module tv_filter_tb;
  import smht_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned W  = 16;
  localparam int unsigned SW = sm_width(W, 2);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0]  ht [N];
  logic signed [SW-1:0] sm [N];
  logic signed [SW-1:0] r_floor;
  logic [N-1:0]         ck;
  logic signed [W-1:0]  y;
  logic                 y_valid;
  int n_pass = 0, n_stop = 0;

  tv_filter #(.N(N), .W(W), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    logic [N-1:0] eck;
    for (int k = 0; k < int'(N); k++) begin ht[k] = '0; sm[k] = '0; end
    r_floor = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int k = 0; k < int'(N); k++) begin
        ht[k] = W'($urandom);
        sm[k] = SW'($urandom);
      end
      case (t % 10)
        0:       r_floor = {1'b1, {(SW-1){1'b0}}};   // most negative: pass all
        1:       r_floor = {1'b0, {(SW-1){1'b1}}};   // most positive: stop nearly all
        default: r_floor = SW'($urandom);
      endcase
      #1;
      sum = 0;
      for (int k = 0; k < int'(N); k++) begin
        eck[k] = (sm[k] >= r_floor);
        if (eck[k]) begin sum += ht[k]; n_pass++; end else n_stop++;
      end
      checks++;
      if (ck !== eck) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d ck=%b exp=%b", t, ck, eck);
      end
      @(posedge clk); #1;
      checks++;
      if (y_valid !== in_valid) failures++;
      if (in_valid) begin
        checks++;
        if (longint'(y) != (sum >>> $clog2(N))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y=%0d exp=%0d", t, y, sum >>> $clog2(N));
        end
      end
    end
    checks++;
    if (n_pass == 0 || n_stop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
