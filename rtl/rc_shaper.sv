// rc_shaper: raised-cosine waveshaping of one chip stream (I or Q).
//
// Square chips would spread the transmit spectrum into wide sidebands, so
// each chip boundary is smoothed. Over the CHIP_CLKS clocks of a chip the
// output moves from the previous chip's level to the new one along half a
// cosine: y(t) = prev + (cur - prev) * (1 - cos(pi*(t+1)/CHIP_CLKS)) / 2.
// With levels +/-AMP that reduces to AMP*cur when the two chips agree and to
// AMP*prev*cos(pi*(t+1)/CHIP_CLKS) when they differ, so only one cosine
// table of CHIP_CLKS entries is needed: C[t] = round(AMP*cos(pi*(t+1)/80)).
// The level reaches the new chip value on the last clock of the chip.
//
// The description only names raised-cosine shaping; the full-chip cosine
// transition is this design's choice. One clock of latency (registered).
module rc_shaper
  import hss_pkg::*;
#(
  parameter int W   = 16,
  parameter int AMP = 16383
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,     // 0 forces the output to zero
  input  logic                prev,   // previous chip (1 = +1)
  input  logic                cur,    // current chip
  input  logic [6:0]          t,      // clock within the chip, 0..CHIP_CLKS-1
  output logic signed [W-1:0] y
);
  typedef logic signed [W-1:0] tab_t [CHIP_CLKS];

  function automatic tab_t mk_cos();
    tab_t c;
    real v;
    for (int n = 0; n < CHIP_CLKS; n++) begin
      v = real'(AMP) * $cos(3.14159265358979 * (n + 1) / CHIP_CLKS);
      c[n] = W'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return c;
  endfunction

  localparam tab_t COS_TAB = mk_cos();

  logic signed [W-1:0] c;
  always_comb c = COS_TAB[(t < 7'(CHIP_CLKS)) ? t : 7'(CHIP_CLKS-1)];

  always_ff @(posedge clk) begin
    if (rst || !en)        y <= '0;
    else if (prev == cur)  y <= cur ? W'(AMP) : -W'(AMP);
    else                   y <= prev ? c : -c;
  end
endmodule
