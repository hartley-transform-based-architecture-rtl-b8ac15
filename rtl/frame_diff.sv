// frame_diff -- input delay line and window-edge difference F(n).
//
// The recursive Hartley channels need F(n) = f(n+N/2) - f(n-N/2): the sample
// entering the length-N window minus the one leaving it. The newest sample
// x_in is f(n+N/2); the sample leaving the window arrived N samples earlier.
// A circular buffer of N words with a single pointer is read and written at
// the same address on each sample: the word read is the sample N positions
// back, and the new sample overwrites it. Until the buffer has been filled
// once, the leaving sample is taken as zero (the signal is zero before the
// first sample), so the memory itself needs no reset. The formula is the
// architecture's; the circular-buffer realisation is this design's choice.
//
// Interface: in_valid marks a new sample on x_in. f_diff (W+1 bits, so the
// difference cannot overflow) is combinational and meaningful while in_valid
// is high. wrapped goes high once N samples have been stored.
// Timing: the buffer and pointer advance on the clock edge ending an
// in_valid cycle.
module frame_diff #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  output logic signed [W:0]   f_diff,
  output logic                wrapped
);

  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

  logic signed [W-1:0] mem [N];
  logic [AW-1:0]       ptr;
  logic signed [W-1:0] leaving;

  always_comb begin
    leaving = wrapped ? mem[ptr] : '0;
    f_diff  = (W+1)'(x_in) - (W+1)'(leaving);
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= x_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr     <= '0;
      wrapped <= 1'b0;
    end else if (in_valid) begin
      if (ptr == AW'(N - 1)) begin
        ptr     <= '0;
        wrapped <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
