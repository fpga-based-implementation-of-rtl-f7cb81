// tx_upconverter: places the shaped I/Q pair on the carrier of the current
// hop channel and forms the D/A word.
//
// dac = (i * cos(w_ch t) - q * sin(w_ch t)) >> (LO_W - 1), taken from the
// oscillator bank shared with the receiver. A channel switch takes effect
// on the clock it arrives, so the carrier hops exactly at the hop boundary.
// With |i|, |q| <= 2^14 and 16-bit oscillators the result fits the 16-bit
// D/A. The arithmetic is this design's; the description names the oscillator
// bank and the D/A. One clock of latency (registered).
module tx_upconverter
  import hss_pkg::*;
#(
  parameter int W    = 16,   // shaped I/Q width
  parameter int LO_W = 16,
  parameter int DAC_W = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  ch_t                    ch,
  input  logic signed [W-1:0]    i_s,
  input  logic signed [W-1:0]    q_s,
  input  logic signed [LO_W-1:0] lo_cos [NUM_CH],
  input  logic signed [LO_W-1:0] lo_sin [NUM_CH],
  output logic signed [DAC_W-1:0] dac
);
  logic signed [W+LO_W:0] acc;
  logic signed [LO_W-1:0] c, s;

  always_comb begin
    c   = (ch < ch_t'(NUM_CH)) ? lo_cos[ch] : '0;
    s   = (ch < ch_t'(NUM_CH)) ? lo_sin[ch] : '0;
    acc = (W+LO_W+1)'(i_s * c) - (W+LO_W+1)'(q_s * s);
  end

  always_ff @(posedge clk) begin
    if (rst || !en) dac <= '0;
    else            dac <= DAC_W'(acc >>> (LO_W - 1));
  end
endmodule
