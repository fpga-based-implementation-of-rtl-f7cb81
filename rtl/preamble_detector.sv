// preamble_detector: decides that a packet has started and when its hops begin.
//
// While enabled, it watches the preamble correlators of all channels in
// ch_mask at every sample. A channel hits when its metric exceeds a fraction
// of its own signal strength, metric * 16 > THR * energy, and its energy is
// above MIN_E, so the threshold follows the overall signal level (no AGC is
// used ahead of it). A window that holds only the first few samples of a
// hop also passes that test, so a hit only opens a peak search of PEAK_WIN
// further samples (one hop by default) over all masked channels: the largest
// metric seen marks the end of a whole preamble hop, where the code lines up
// with every chip. When the search closes, the peak must pass the threshold
// test again with the energy of its own window; then sync pulses for one
// clock with the channel of the peak and its age, the number of samples
// taken since the peak (0 means the peak was the latest sample). A peak that
// fails is dropped (reject pulses) and the search starts over.
//
// The description gives the strength-based threshold; the ratio form, the
// peak search and its window are this design's. sync comes on the clock
// after the valid that closes the search.
module preamble_detector
  import hss_pkg::*;
#(
  parameter int MW       = 27,
  parameter int EW       = 28,
  parameter int THR      = 3,
  parameter int MIN_E    = 4096,
  parameter int PEAK_WIN = SLOT_SAMPLES
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic [NUM_CH-1:0]    ch_mask,
  input  logic                 valid,
  input  logic [MW-1:0]        metric [NUM_CH],
  input  logic [EW-1:0]        energy [NUM_CH],
  output logic                 sync,
  output ch_t                  sync_ch,
  output logic [7:0]           sync_age,
  output logic                 reject,
  output logic                 searching      // a peak search is open
);
  logic [NUM_CH-1:0] hit;
  logic [MW-1:0]     best_m, cand_m;
  logic [EW-1:0]     best_e, cand_e;
  ch_t               cand_ch;
  logic              cand_ok;
  logic [7:0]        left;

  always_comb begin
    cand_m  = '0;
    cand_ch = '0;
    cand_e  = '0;
    cand_ok = 1'b0;
    for (int c = 0; c < NUM_CH; c++) begin
      hit[c] = ch_mask[c] && energy[c] > EW'(MIN_E)
            && ({metric[c], 4'b0} > (MW+4)'(THR * energy[c]));
      if (ch_mask[c] && (!cand_ok || metric[c] > cand_m)) begin
        cand_m  = metric[c];
        cand_ch = ch_t'(c);
        cand_e  = energy[c];
        cand_ok = 1'b1;
      end
    end
  end

  // final test of the peak, with the newest sample taken into account
  logic [MW-1:0] fin_m;
  logic [EW-1:0] fin_e;
  logic          peak_ok;
  always_comb begin
    fin_m   = (cand_m > best_m) ? cand_m : best_m;
    fin_e   = (cand_m > best_m) ? cand_e : best_e;
    peak_ok = fin_e > EW'(MIN_E) && ({fin_m, 4'b0} > (MW+4)'(THR * fin_e));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      searching <= 1'b0;
      best_m    <= '0;
      sync      <= 1'b0;
      reject    <= 1'b0;
      best_e    <= '0;
      sync_ch   <= '0;
      sync_age  <= '0;
      left      <= '0;
    end else begin
      sync   <= 1'b0;
      reject <= 1'b0;
      if (!enable) begin
        searching <= 1'b0;
      end else if (valid) begin
        if (!searching) begin
          if (|hit) begin
            searching <= 1'b1;
            best_m    <= cand_m;
            best_e    <= cand_e;
            sync_ch   <= cand_ch;
            sync_age  <= '0;
            left      <= 8'(PEAK_WIN);
          end
        end else begin
          if (cand_m > best_m) begin
            best_m   <= cand_m;
            best_e   <= cand_e;
            sync_ch  <= cand_ch;
            sync_age <= '0;
          end else begin
            sync_age <= sync_age + 1'b1;
          end
          left <= left - 1'b1;
          if (left == 8'd1) begin
            searching <= 1'b0;
            if (peak_ok) sync   <= 1'b1;
            else         reject <= 1'b1;
          end
        end
      end
    end
  end
endmodule
