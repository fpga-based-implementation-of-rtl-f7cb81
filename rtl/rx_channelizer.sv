// rx_channelizer: brings one hop channel of the digitised band to baseband.
//
// The whole 12.5-35 MHz band arrives from the A/D as one real signal. For
// channel CH the sample is multiplied by the channel oscillator's cosine
// and negated sine (I and Q mixers), each product is low-pass filtered by
// four square-window FIR stages in series, and every DECIM-th filter output
// (2 samples per chip, taken on samp_stb) is kept. Both carrier phases are
// kept so that later correlation does not depend on the carrier phase.
//
// Mixer scaling (>> LO_W-2) and the 2-samples-per-chip rate are this
// design's choices. i/q change on the clock after samp_stb. Latency from
// the A/D to the filter output is six clocks.
module rx_channelizer
  import hss_pkg::*;
#(
  parameter int ADC_W = 14,
  parameter int LO_W  = 16,
  parameter int MIX_W = 16,
  parameter int LEN   = 40,
  localparam int OUT_W = MIX_W + 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc,
  input  logic signed [LO_W-1:0]  lo_cos,
  input  logic signed [LO_W-1:0]  lo_sin,
  input  logic                    samp_stb,
  output logic signed [OUT_W-1:0] i,
  output logic signed [OUT_W-1:0] q
);
  logic signed [ADC_W+LO_W-1:0] pi_full, pq_full;
  logic signed [MIX_W-1:0]      mi, mq;
  logic signed [MIX_W:0]        fi1, fq1;
  logic signed [MIX_W+1:0]      fi2, fq2;
  logic signed [MIX_W+2:0]      fi3, fq3;
  logic signed [MIX_W+3:0]      fi4, fq4;

  always_comb begin
    pi_full = adc * lo_cos;
    pq_full = -(adc * lo_sin);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mi <= '0; mq <= '0; i <= '0; q <= '0;
    end else begin
      mi <= MIX_W'(pi_full >>> (LO_W - 2));
      mq <= MIX_W'(pq_full >>> (LO_W - 2));
      if (samp_stb) begin
        i <= fi4;
        q <= fq4;
      end
    end
  end

  boxcar_fir #(.IN_W(MIX_W),   .LEN(LEN)) u_i1 (.clk, .rst, .en(1'b1), .x(mi),  .y(fi1));
  boxcar_fir #(.IN_W(MIX_W+1), .LEN(LEN)) u_i2 (.clk, .rst, .en(1'b1), .x(fi1), .y(fi2));
  boxcar_fir #(.IN_W(MIX_W+2), .LEN(LEN)) u_i3 (.clk, .rst, .en(1'b1), .x(fi2), .y(fi3));
  boxcar_fir #(.IN_W(MIX_W+3), .LEN(LEN)) u_i4 (.clk, .rst, .en(1'b1), .x(fi3), .y(fi4));
  boxcar_fir #(.IN_W(MIX_W),   .LEN(LEN)) u_q1 (.clk, .rst, .en(1'b1), .x(mq),  .y(fq1));
  boxcar_fir #(.IN_W(MIX_W+1), .LEN(LEN)) u_q2 (.clk, .rst, .en(1'b1), .x(fq1), .y(fq2));
  boxcar_fir #(.IN_W(MIX_W+2), .LEN(LEN)) u_q3 (.clk, .rst, .en(1'b1), .x(fq2), .y(fq3));
  boxcar_fir #(.IN_W(MIX_W+3), .LEN(LEN)) u_q4 (.clk, .rst, .en(1'b1), .x(fq3), .y(fq4));
endmodule
