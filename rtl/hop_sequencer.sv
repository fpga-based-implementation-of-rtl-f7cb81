// hop_sequencer: frequency-hop pattern of the transceiver.
//
// Every byte is sent three times, in a triplet of hops. The three channels
// of a triplet must be far apart so that one jammer cannot hit two of them,
// and the top two of the ten channels are left unused, so hops go over
// channels 0..NUM_USED-1. The pattern (own choice, with the required
// "trend") is ch = (trip + STRIDE*rep) mod NUM_USED, where trip counts
// triplets and rep = 0,1,2 is the copy: with 8 channels and stride 3 the
// copies are at least two channels (5 MHz) apart, and the first eight hops
// of a packet visit eight different channels. With hopping disabled
// every hop uses channel 0 (12.5 MHz).
//
// The inverse port tells the receiver, from the channel on which it first
// found the preamble, which hop of the preamble that was: the first of the
// first eight hops that uses that channel (hop 0 when hopping is off).
//
// Purely combinational.
module hop_sequencer
  import hss_pkg::*;
#(
  parameter int NUM_USED = NUM_USED_CH,
  parameter int STRIDE   = 3
) (
  input  logic       hop_en,
  input  logic [2:0] trip,       // triplet counter (mod 8)
  input  logic [1:0] rep,        // copy within the triplet, 0..2
  output ch_t        ch,         // channel for this hop
  input  ch_t        det_ch,     // channel on which the preamble was found
  output logic [2:0] det_trip,   // its hop, as triplet and copy
  output logic [1:0] det_rep,
  output logic       det_ok      // det_ch is a channel the pattern uses
);
  function automatic ch_t hop_ch(input int tr, input int r);
    return ch_t'((tr + STRIDE * r) % NUM_USED);
  endfunction

  always_comb begin
    ch = hop_en ? hop_ch(int'(trip), int'(rep)) : '0;
    det_trip = '0;
    det_rep  = '0;
    det_ok   = !hop_en && det_ch == '0;
    if (hop_en) begin
      for (int s = NUM_USED - 1; s >= 0; s--) begin
        if (hop_ch(s / REPEAT, s % REPEAT) == det_ch) begin
          det_trip = 3'(s / REPEAT);
          det_rep  = 2'(s % REPEAT);
          det_ok   = 1'b1;
        end
      end
    end
  end
endmodule
