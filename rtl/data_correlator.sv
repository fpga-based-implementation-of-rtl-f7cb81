// data_correlator: multiply-and-integrate correlator bank that reads one
// byte out of one hop.
//
// A hop carries the I code rotated by 2*a chips and the Q code rotated by
// 2*b chips, a and b being the two nibbles of the byte. The receiver keeps
// local copies of the code at all 16 candidate rotations of each code and,
// over the 126 samples of the hop, multiplies each sample by the matching
// +/-1 chip and integrates: samples at even positions (I-chip centres) feed
// the 16 I-code correlators, samples at odd positions (the Q chips are half
// a chip late) feed the 16 Q-code correlators, for both carrier phases.
// When the hop ends, each rotation scores |acc_I| + |acc_Q|, which does not
// depend on the carrier phase; the best I rotation gives the high nibble and
// the best Q rotation the low nibble (ties go to the lower rotation).
//
// clear (alone, or with the first stb) starts a hop; every stb adds the sample at position pos; done,
// given after the last sample, produces sym with valid one clock later.
// The description gives the correlator principle; the widths, the
// |.|+|.| score and the sample-parity split are this design's.
module data_correlator
  import hss_pkg::*;
#(
  parameter int SW = 20,
  localparam int AW = SW + 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 stb,
  input  logic [6:0]           pos,
  input  logic signed [SW-1:0] i,
  input  logic signed [SW-1:0] q,
  input  logic                 done,
  output logic                 valid,
  output logic [7:0]           sym
);
  typedef logic signed [AW-1:0] acc_t [NUM_POS];

  acc_t ii, iq, qi, qq;            // code (I/Q) x carrier phase (i/q)
  logic [NUM_POS-1:0] ref_i, ref_q;
  logic [5:0] k;
  logic [AW:0] score, best_i_s, best_q_s;
  logic [3:0]  best_i, best_q;

  assign k = pos[6:1];

  for (genvar s = 0; s < NUM_POS; s++) begin : g_ref
    ds_code_rom u_ri (.sel_q(1'b0), .idx(k), .nib(4'(s)), .chip(ref_i[s]));
    ds_code_rom u_rq (.sel_q(1'b1), .idx(k), .nib(4'(s)), .chip(ref_q[s]));
  end

  function automatic logic [AW:0] absum(input logic signed [AW-1:0] a,
                                        input logic signed [AW-1:0] b);
    return (AW+1)'(a[AW-1] ? -a : a) + (AW+1)'(b[AW-1] ? -b : b);
  endfunction

  always_comb begin
    best_i = '0; best_i_s = '0;
    best_q = '0; best_q_s = '0;
    for (int s = 0; s < NUM_POS; s++) begin
      score = absum(ii[s], iq[s]);
      if (score > best_i_s) begin best_i_s = score; best_i = 4'(s); end
      score = absum(qi[s], qq[s]);
      if (score > best_q_s) begin best_q_s = score; best_q = 4'(s); end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || (clear && !stb)) begin
      for (int s = 0; s < NUM_POS; s++) begin
        ii[s] <= '0; iq[s] <= '0; qi[s] <= '0; qq[s] <= '0;
      end
    end else if (stb) begin
      // clear together with stb starts the integration at this sample
      for (int s = 0; s < NUM_POS; s++) begin
        if (!pos[0]) begin
          ii[s] <= (clear ? '0 : ii[s]) + (ref_i[s] ? AW'(i) : -AW'(i));
          iq[s] <= (clear ? '0 : iq[s]) + (ref_i[s] ? AW'(q) : -AW'(q));
          if (clear) begin qi[s] <= '0; qq[s] <= '0; end
        end else begin
          qi[s] <= (clear ? '0 : qi[s]) + (ref_q[s] ? AW'(i) : -AW'(i));
          qq[s] <= (clear ? '0 : qq[s]) + (ref_q[s] ? AW'(q) : -AW'(q));
          if (clear) begin ii[s] <= '0; iq[s] <= '0; end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      sym   <= '0;
    end else begin
      valid <= done;
      if (done) sym <= {best_i, best_q};
    end
  end
endmodule
