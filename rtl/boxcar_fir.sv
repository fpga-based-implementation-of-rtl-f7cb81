// boxcar_fir: square-window FIR low-pass filter stage.
//
// y[n] = (x[n] + x[n-1] + ... + x[n-LEN+1]) >>> SHIFT, computed as a running
// sum: each clock the newest input is added and the input LEN clocks old,
// read from a circular buffer, is subtracted. Integer-only filtering is what
// the description calls for; four such stages in series form the channel
// low-pass filter. With LEN = 40 at 100 MHz the window has its response
// nulls on every multiple of 2.5 MHz, i.e. on every other hop channel and
// on the double-frequency mixing product, after down-conversion (the length
// is this design's choice). The output is one bit wider than the input
// (gain LEN / 2^SHIFT = 1.25 by default). One clock of latency.
module boxcar_fir #(
  parameter int IN_W  = 16,
  parameter int LEN   = 40,
  parameter int SHIFT = 5,
  localparam int OUT_W = IN_W + 1,
  localparam int SUM_W = IN_W + $clog2(LEN) + 1,
  localparam int AW    = $clog2(LEN)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  logic signed [IN_W-1:0]  dly [LEN];
  logic [AW-1:0]           ptr;
  logic signed [SUM_W-1:0] sum, sum_next;

  always_comb sum_next = sum + SUM_W'(x) - SUM_W'(dly[ptr]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < LEN; n++) dly[n] <= '0;
      ptr <= '0;
      sum <= '0;
      y   <= '0;
    end else if (en) begin
      dly[ptr] <= x;
      ptr      <= (ptr == AW'(LEN-1)) ? '0 : ptr + 1'b1;
      sum      <= sum_next;
      y        <= OUT_W'(sum_next >>> SHIFT);
    end
  end
endmodule
