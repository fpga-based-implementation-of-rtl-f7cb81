// rx_controller: receive timing sequence, from preamble sync to voted bytes.
//
// In SEARCH the preamble detector is enabled on all used channels. Its sync
// pulse gives the channel and the age of the correlation peak that ended a
// preamble hop; hop_sequencer turns the channel into the hop number (the
// first preamble hop on that channel), so the controller knows both the hop
// boundary and where it is in the hop pattern. It then tracks hops of 126
// samples: it selects the channel of each hop (listening on one channel
// instead of all) and streams the samples of every whole hop into the data
// correlator with their position. The remaining preamble hops must read back
// as blank (0x00): a code-phase-shifted data hop can look like a preamble to
// the sliding correlator, so two non-blank preamble hops in a row prove the
// sync false and send the controller back to SEARCH (a single one may be a
// jammed channel; consecutive hops never share a channel). Every
// three data results are voted 2-of-3 and the byte is written to the
// receive buffer. After PKT_BYTES bytes the packet is done and the search
// resumes.
//
// Own choices: fixed packet length, the hop-number recovery from the
// channel, the blank-preamble check, and returning to SEARCH if the channel
// maps to no preamble hop.
// Inputs: valid marks the clock on which new channel samples are present.
module rx_controller
  import hss_pkg::*;
#(
  parameter int PKT_BYTES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       hop_en,
  input  logic       valid,
  // preamble detector
  output logic       det_enable,
  input  logic       sync,
  input  ch_t        sync_ch,
  input  logic [7:0] sync_age,   // < 2 hops
  // data path
  output ch_t        sel_ch,
  output logic       corr_clear,
  output logic       corr_stb,
  output logic [6:0] corr_pos,
  output logic       corr_done,
  input  logic       corr_valid,
  input  logic [7:0] corr_sym,
  // receive buffer
  output logic       buf_wr,
  output logic [7:0] buf_wdata,
  // status
  output logic       synced,
  output logic       pkt_done,
  output logic       vote_fix,
  output logic       sync_reject
);
  typedef enum logic [1:0] {SEARCH, TRACK, DRAIN} state_t;
  localparam int TOTAL_TRIPS = PREAMBLE_BYTES + PKT_BYTES;
  localparam int TW = $clog2(TOTAL_TRIPS + 1);
  localparam int BW = $clog2(PKT_BYTES + 1);

  state_t        state;
  logic [TW-1:0] trip;
  logic [1:0]    rep;
  logic [6:0]    pos;
  logic [BW-1:0] nbytes;
  logic [1:0]    ncopy;
  logic [7:0]    copy0, copy1;
  logic [2:0]    det_trip;
  logic [1:0]    det_rep;
  logic          det_ok, data_hop, hop_end, last_hop;
  logic          hop_full, done_data, pre_err;
  int unsigned   det_hop;
  logic [7:0]    voted;
  logic          disagree;

  hop_sequencer u_hop (
    .hop_en, .trip(trip[2:0]), .rep, .ch(sel_ch),
    .det_ch(sync_ch), .det_trip, .det_rep, .det_ok
  );

  majority_vote #(.W(8)) u_vote (
    .a(copy0), .b(copy1), .c(corr_sym), .y(voted), .disagree
  );

  always_comb begin
    det_enable = state == SEARCH;
    det_hop    = REPEAT * int'(det_trip) + int'(det_rep);
    data_hop   = trip >= TW'(PREAMBLE_BYTES);
    hop_end    = pos == 7'(SLOT_SAMPLES-1);
    last_hop   = trip == TW'(TOTAL_TRIPS-1) && rep == 2'(REPEAT-1);
    corr_stb   = state == TRACK && valid && (hop_full || pos == '0);
    corr_clear = corr_stb && pos == '0;
    corr_pos   = pos;
    synced     = state != SEARCH;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SEARCH;
      trip <= '0; rep <= '0; pos <= '0;
      nbytes <= '0; ncopy <= '0; copy0 <= '0; copy1 <= '0;
      hop_full <= 1'b0; done_data <= 1'b0; pre_err <= 1'b0;
      corr_done <= 1'b0; buf_wr <= 1'b0; buf_wdata <= '0;
      pkt_done <= 1'b0; vote_fix <= 1'b0; sync_reject <= 1'b0;
    end else begin
      corr_done   <= corr_stb && hop_end;
      if (corr_stb && hop_end) done_data <= data_hop;
      if (corr_stb && pos == '0) hop_full <= 1'b1;
      buf_wr      <= 1'b0;
      pkt_done    <= 1'b0;
      vote_fix    <= 1'b0;
      sync_reject <= 1'b0;

      case (state)
        SEARCH: if (sync) begin
          if (det_ok) begin
            state  <= TRACK;
            nbytes   <= '0;
            ncopy    <= '0;
            hop_full <= 1'b0;
            pre_err  <= 1'b0;
            // the peak closed hop det_hop; the samples since belong to the
            // hop after it (or, past one hop, to the one after that)
            if (sync_age >= 8'(SLOT_SAMPLES)) begin
              pos  <= 7'(sync_age - 8'(SLOT_SAMPLES));
              trip <= TW'((det_hop + 2) / REPEAT);
              rep  <= 2'((det_hop + 2) % REPEAT);
            end else begin
              pos  <= 7'(sync_age);
              trip <= TW'((det_hop + 1) / REPEAT);
              rep  <= 2'((det_hop + 1) % REPEAT);
            end
          end else begin
            sync_reject <= 1'b1;
          end
        end
        TRACK: if (valid) begin
          if (!hop_end) begin
            pos <= pos + 1'b1;
          end else begin
            pos <= '0;
            if (last_hop) state <= DRAIN;
            else if (rep == 2'(REPEAT-1)) begin
              rep  <= '0;
              trip <= trip + 1'b1;
            end else begin
              rep <= rep + 1'b1;
            end
          end
        end
        default: ;
      endcase

      if (corr_valid && !done_data && state != SEARCH) begin
        pre_err <= corr_sym != 8'h00;
        if (corr_sym != 8'h00 && pre_err) begin
          state       <= SEARCH;
          sync_reject <= 1'b1;
        end
      end

      if (corr_valid && done_data && state != SEARCH) begin
        case (ncopy)
          2'd0: begin copy0 <= corr_sym; ncopy <= 2'd1; end
          2'd1: begin copy1 <= corr_sym; ncopy <= 2'd2; end
          default: begin
            ncopy     <= 2'd0;
            buf_wr    <= 1'b1;
            buf_wdata <= voted;
            vote_fix  <= disagree;
            nbytes    <= nbytes + 1'b1;
            if (nbytes == BW'(PKT_BYTES-1)) begin
              pkt_done <= 1'b1;
              state    <= SEARCH;
              trip     <= '0;
              rep      <= '0;
            end
          end
        endcase
      end
    end
  end
endmodule
