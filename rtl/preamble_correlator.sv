// preamble_correlator: sliding correlator that looks for the preamble on one
// hop channel.
//
// The preamble hops carry the I code at zero code phase. The last 126
// baseband samples (one hop at 2 samples per chip) of both carrier phases
// are held in a shift register; every new sample, the 63 samples that line
// up with I-chip centres (window positions 0, 2, ..., 124, oldest first)
// are multiplied by the +/-1 code and summed, for the I and the Q branch.
// metric = |C_I| + |C_Q| is then large whenever a whole preamble hop sits in
// the window, whatever the carrier phase. A running sum of |i| + |q| over the
// same 126 samples measures the overall signal strength, against which the
// detector sets its threshold.
//
// The description gives I/Q correlation with the preamble code and a
// strength-based threshold; the window layout and the |.|+|.| magnitude are
// this design's. metric (combinational from the window) and energy are valid
// while valid is high, on the clock after each stb, and describe the window ending with the sample taken at stb.
module preamble_correlator
  import hss_pkg::*;
#(
  parameter int SW = 20,
  localparam int CW = SW + 6,      // correlation sum width
  localparam int MW = SW + 7,      // metric width
  localparam int EW = SW + 8       // energy width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 stb,
  input  logic signed [SW-1:0] i,
  input  logic signed [SW-1:0] q,
  output logic                 valid,
  output logic [MW-1:0]        metric,
  output logic [EW-1:0]        energy
);
  logic signed [SW-1:0] wi [SLOT_SAMPLES];
  logic signed [SW-1:0] wq [SLOT_SAMPLES];
  logic signed [CW-1:0] ci, cq;
  logic [SW:0]          a_new, a_old;

  function automatic logic [SW:0] mag2(input logic signed [SW-1:0] a,
                                       input logic signed [SW-1:0] b);
    logic [SW-1:0] ma, mb;
    ma = a[SW-1] ? SW'(-a) : SW'(a);
    mb = b[SW-1] ? SW'(-b) : SW'(b);
    return (SW+1)'(ma) + (SW+1)'(mb);
  endfunction

  always_comb begin
    ci = '0;
    cq = '0;
    for (int n = 0; n < CODE_LEN; n++) begin
      if (CODE_I[n]) begin
        ci = ci + CW'(wi[SPC*n]);
        cq = cq + CW'(wq[SPC*n]);
      end else begin
        ci = ci - CW'(wi[SPC*n]);
        cq = cq - CW'(wq[SPC*n]);
      end
    end
    metric = MW'(ci[CW-1] ? -ci : ci) + MW'(cq[CW-1] ? -cq : cq);
    a_new = mag2(i, q);
    a_old = mag2(wi[0], wq[0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < SLOT_SAMPLES; n++) begin
        wi[n] <= '0;
        wq[n] <= '0;
      end
      energy <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= stb;
      if (stb) begin
        for (int n = 0; n < SLOT_SAMPLES-1; n++) begin
          wi[n] <= wi[n+1];
          wq[n] <= wq[n+1];
        end
        wi[SLOT_SAMPLES-1] <= i;
        wq[SLOT_SAMPLES-1] <= q;
        energy <= energy + EW'(a_new) - EW'(a_old);
      end
    end
  end
endmodule
