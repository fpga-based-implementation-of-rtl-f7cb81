// tx_controller: packet framing and hop timing of the transmitter.
//
// A packet is PREAMBLE_SLOTS hops of blank data (four zero bytes, each sent
// three times) that give the receiver its DS timing reference, followed by
// PKT_BYTES data bytes from the transmit buffer, each sent on three
// consecutive hops (a triplet) so the receiver can vote 2-of-3. A hop lasts
// one DS sequence, 63 chips of 80 clocks = 5040 clocks at 100 MHz, which
// gives 19,841 hops/s, 6,613 bytes/s and 52,910 bit/s.
//
// A start pulse while idle begins a packet. The controller counts the clock
// within a chip (t), the chip (k), the copy (rep) and the triplet (trip);
// the hop channel comes from hop_sequencer. One clock before a data triplet
// begins, the next byte is popped from the first-word-fall-through buffer
// (a zero byte is sent if it is empty). Outputs are registered.
// Fixed packet length and the start pulse are this design's choice.
module tx_controller
  import hss_pkg::*;
#(
  parameter int PKT_BYTES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       hop_en,
  // transmit buffer, first-word-fall-through
  input  logic       buf_empty,
  input  logic [7:0] buf_rdata,
  output logic       buf_rd,
  // to the modulator and up-converter
  output logic       busy,
  output logic [7:0] sym,
  output logic [5:0] k,
  output logic [6:0] t,
  output ch_t        ch,
  output logic       hop_start     // first clock of every hop
);
  localparam int TOTAL_TRIPS = PREAMBLE_BYTES + PKT_BYTES;
  localparam int TW = $clog2(TOTAL_TRIPS + 1);

  logic [TW-1:0] trip;
  logic [1:0]    rep;
  logic [7:0]    data_q;
  logic          last_clk, last_hop, next_is_data_trip;
  logic [2:0]    det_trip_unused;
  logic [1:0]    det_rep_unused;
  logic          det_ok_unused;

  hop_sequencer u_hop (
    .hop_en, .trip(trip[2:0]), .rep, .ch,
    .det_ch('0), .det_trip(det_trip_unused), .det_rep(det_rep_unused),
    .det_ok(det_ok_unused)
  );

  always_comb begin
    last_clk = (t == 7'(CHIP_CLKS-1)) && (k == 6'(CODE_LEN-1));
    last_hop = last_clk && rep == 2'(REPEAT-1);
    next_is_data_trip = (!busy && start && PREAMBLE_BYTES == 0)
                     || (busy && last_hop && trip + 1'b1 >= TW'(PREAMBLE_BYTES)
                              && trip + 1'b1 < TW'(TOTAL_TRIPS));
    buf_rd = next_is_data_trip && !buf_empty;
    sym    = (trip < TW'(PREAMBLE_BYTES)) ? 8'h00 : data_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; trip <= '0; rep <= '0; k <= '0; t <= '0;
      data_q <= '0; hop_start <= 1'b0;
    end else begin
      hop_start <= 1'b0;
      if (next_is_data_trip) data_q <= buf_empty ? 8'h00 : buf_rdata;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; trip <= '0; rep <= '0; k <= '0; t <= '0;
          hop_start <= 1'b1;
        end
      end else if (t != 7'(CHIP_CLKS-1)) begin
        t <= t + 1'b1;
      end else begin
        t <= '0;
        if (k != 6'(CODE_LEN-1)) k <= k + 1'b1;
        else begin
          k <= '0;
          if (rep != 2'(REPEAT-1)) begin
            rep <= rep + 1'b1;
            hop_start <= 1'b1;
          end else begin
            rep <= '0;
            if (trip == TW'(TOTAL_TRIPS-1)) begin
              busy <= 1'b0;
              trip <= '0;
            end else begin
              trip <= trip + 1'b1;
              hop_start <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
