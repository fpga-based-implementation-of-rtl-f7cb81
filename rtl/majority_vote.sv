// majority_vote: 2-of-3 decision over the three copies of a byte.
//
// Each byte travels on three hops on well separated channels. Taking every
// bit as the majority of its three copies recovers the byte even when one
// hop is completely jammed. disagree flags that the copies were not all
// equal, i.e. that the vote corrected something. Purely combinational;
// the bitwise form is this design's reading of the 2-of-3 scheme.
module majority_vote #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         disagree
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    disagree = (a != b) || (b != c);
  end
endmodule
