// hss_transceiver: single-FPGA hybrid direct-sequence / fast-frequency-
// hopping (DS/FFH) spread-spectrum transceiver, software-defined-radio style.
//
// The whole 12.5-35 MHz intermediate-frequency band is handled digitally at
// 100 MHz. Ten look-up-table oscillators, one per hop channel, are shared by
// both directions.
//
// Transmit: bytes from the host wait in a buffer. A packet is four blank
// preamble bytes and PKT_BYTES data bytes. Each byte is code-phase-shift
// keyed onto one 63-chip DS sequence (high nibble rotates the I code, low
// nibble the Q code, offset QPSK), raised-cosine shaped and sent three times
// on three widely separated hop channels. The carrier hops after every
// sequence, i.e. several times per byte.
//
// Receive: the A/D band is mixed down on all ten channels, low-pass
// filtered by four square-window FIRs and decimated to 2 samples per chip.
// Sliding correlators on every channel look for the preamble; once found, the
// receiver follows the hop pattern on one channel at a time, reads each hop
// with a bank of code-rotation correlators, votes the three copies 2-of-3
// and stores the byte for the host.
//
// Interfaces: host side, the two buffers and a start pulse; converter side,
// dac (16 bit) and adc (14 bit), one sample per clock. hop_en = 0 keeps both
// directions on channel 0 (12.5 MHz), the no-hopping test mode. TX latency
// from the hop boundary to dac is three clocks. Everything runs on clk with
// synchronous active-high reset.
module hss_transceiver
  import hss_pkg::*;
#(
  parameter int PKT_BYTES   = 32,
  parameter int TXBUF_DEPTH = 256,
  parameter int RXBUF_DEPTH = 256,
  parameter int THR         = 3,
  parameter int MIN_E       = 4096,
  parameter int PEAK_WIN    = SLOT_SAMPLES,
  localparam int ADC_W = 14,
  localparam int DAC_W = 16,
  localparam int LO_W  = 16,
  localparam int SW    = 20
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    hop_en,
  // host: transmit
  input  logic                    tx_wr,
  input  logic [7:0]              tx_wdata,
  output logic                    tx_full,
  input  logic                    tx_start,
  output logic                    tx_busy,
  output logic                    tx_hop,        // first clock of each hop
  // host: receive
  input  logic                    rx_rd,
  output logic [7:0]              rx_rdata,
  output logic                    rx_empty,
  output logic                    rx_full,
  // converters
  output logic signed [DAC_W-1:0] dac,
  input  logic signed [ADC_W-1:0] adc,
  // receiver status pulses and levels
  output logic                    rx_synced,
  output logic                    rx_pkt_done,
  output logic                    rx_vote_fix,
  output logic                    rx_sync_reject,  // peak or channel rejected
  output logic                    rx_peak_search
);
  // ---------------- local oscillator bank ----------------
  logic signed [LO_W-1:0] lo_cos [NUM_CH];
  logic signed [LO_W-1:0] lo_sin [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_lo
    local_osc #(.CH(c), .W(LO_W)) u_lo (.clk, .rst, .lo_cos(lo_cos[c]), .lo_sin(lo_sin[c]));
  end

  // ---------------- transmitter ----------------
  logic       txb_empty, txb_rd;
  logic [7:0] txb_rdata, tx_sym;
  logic [5:0] tx_k;
  logic [6:0] tx_t, i_t, q_t;
  ch_t        tx_ch, tx_ch_d1, tx_ch_d2;
  logic       mod_en, shp_en;
  logic       i_cur, i_prev, q_cur, q_prev;
  logic signed [15:0] i_s, q_s;
  logic [$clog2(TXBUF_DEPTH):0] txb_count;

  byte_fifo #(.DEPTH(TXBUF_DEPTH)) u_txbuf (
    .clk, .rst, .wr(tx_wr), .wdata(tx_wdata), .rd(txb_rd), .rdata(txb_rdata),
    .full(tx_full), .empty(txb_empty), .count(txb_count)
  );

  tx_controller #(.PKT_BYTES(PKT_BYTES)) u_txctl (
    .clk, .rst, .start(tx_start), .hop_en,
    .buf_empty(txb_empty), .buf_rdata(txb_rdata), .buf_rd(txb_rd),
    .busy(tx_busy), .sym(tx_sym), .k(tx_k), .t(tx_t), .ch(tx_ch),
    .hop_start(tx_hop)
  );

  cpsk_modulator u_mod (
    .clk, .rst, .en(tx_busy), .sym(tx_sym), .k(tx_k), .t(tx_t),
    .en_o(mod_en), .i_cur, .i_prev, .i_t, .q_cur, .q_prev, .q_t
  );

  rc_shaper u_shp_i (.clk, .rst, .en(mod_en), .prev(i_prev), .cur(i_cur), .t(i_t), .y(i_s));
  rc_shaper u_shp_q (.clk, .rst, .en(mod_en), .prev(q_prev), .cur(q_cur), .t(q_t), .y(q_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_ch_d1 <= '0; tx_ch_d2 <= '0; shp_en <= 1'b0;
    end else begin
      tx_ch_d1 <= tx_ch;
      tx_ch_d2 <= tx_ch_d1;
      shp_en   <= mod_en;
    end
  end

  tx_upconverter u_up (
    .clk, .rst, .en(shp_en), .ch(tx_ch_d2), .i_s, .q_s, .lo_cos, .lo_sin, .dac
  );

  // ---------------- receiver front end ----------------
  logic [5:0] dcnt;
  logic       samp_stb, samp_valid;
  logic signed [SW-1:0] ch_i [NUM_CH];
  logic signed [SW-1:0] ch_q [NUM_CH];

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt <= '0; samp_stb <= 1'b0; samp_valid <= 1'b0;
    end else begin
      dcnt       <= (dcnt == 6'(DECIM-1)) ? '0 : dcnt + 1'b1;
      samp_stb   <= dcnt == 6'(DECIM-1);
      samp_valid <= samp_stb;
    end
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : g_rx
    rx_channelizer #(.ADC_W(ADC_W), .LO_W(LO_W)) u_chan (
      .clk, .rst, .adc, .lo_cos(lo_cos[c]), .lo_sin(lo_sin[c]),
      .samp_stb, .i(ch_i[c]), .q(ch_q[c])
    );
  end

  // ---------------- preamble detection ----------------
  logic [SW+6:0] metric [NUM_CH];
  logic [SW+7:0] energy [NUM_CH];
  logic [NUM_CH-1:0] pc_valid, ch_mask;
  logic       sync, det_enable;
  ch_t        sync_ch;
  logic [7:0] sync_age;
  logic       det_reject;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_pc
    preamble_correlator #(.SW(SW)) u_pc (
      .clk, .rst, .stb(samp_valid), .i(ch_i[c]), .q(ch_q[c]),
      .valid(pc_valid[c]), .metric(metric[c]), .energy(energy[c])
    );
  end

  always_comb ch_mask = hop_en ? NUM_CH'((1 << NUM_USED_CH) - 1) : NUM_CH'(1);

  preamble_detector #(.MW(SW+7), .EW(SW+8), .THR(THR), .MIN_E(MIN_E),
                      .PEAK_WIN(PEAK_WIN)) u_det (
    .clk, .rst, .enable(det_enable), .ch_mask, .valid(pc_valid[0]),
    .metric, .energy, .sync, .sync_ch, .sync_age, .reject(det_reject), .searching(rx_peak_search)
  );

  // ---------------- data detection ----------------
  ch_t        sel_ch;
  logic       ctl_reject;
  assign rx_sync_reject = ctl_reject | det_reject;
  logic       corr_clear, corr_stb, corr_done, corr_valid;
  logic [6:0] corr_pos;
  logic [7:0] corr_sym, rxb_wdata;
  logic       rxb_wr;
  logic signed [SW-1:0] sel_i, sel_q;
  logic [$clog2(RXBUF_DEPTH):0] rxb_count;

  always_comb begin
    sel_i = (sel_ch < ch_t'(NUM_CH)) ? ch_i[sel_ch] : '0;
    sel_q = (sel_ch < ch_t'(NUM_CH)) ? ch_q[sel_ch] : '0;
  end

  rx_controller #(.PKT_BYTES(PKT_BYTES)) u_rxctl (
    .clk, .rst, .hop_en, .valid(samp_valid),
    .det_enable, .sync, .sync_ch, .sync_age,
    .sel_ch, .corr_clear, .corr_stb, .corr_pos, .corr_done,
    .corr_valid, .corr_sym,
    .buf_wr(rxb_wr), .buf_wdata(rxb_wdata),
    .synced(rx_synced), .pkt_done(rx_pkt_done), .vote_fix(rx_vote_fix),
    .sync_reject(ctl_reject)
  );

  data_correlator #(.SW(SW)) u_dc (
    .clk, .rst, .clear(corr_clear), .stb(corr_stb), .pos(corr_pos),
    .i(sel_i), .q(sel_q), .done(corr_done), .valid(corr_valid), .sym(corr_sym)
  );

  byte_fifo #(.DEPTH(RXBUF_DEPTH)) u_rxbuf (
    .clk, .rst, .wr(rxb_wr), .wdata(rxb_wdata), .rd(rx_rd), .rdata(rx_rdata),
    .full(rx_full), .empty(rx_empty), .count(rxb_count)
  );
endmodule
