// tb_hss_full: end-to-end loopback test of the DS/FFH transceiver with every
// parameter at its default (32-byte packets), otherwise as tb_hss_transceiver.
//
// The D/A output is fed back to the A/D through a channel model: a delay of
// CH_DELAY clocks (not a multiple of the sample period, so the receiver has
// to find the hop timing itself), a 1/8 gain, small pseudo-random noise, and,
// when jamming is on, a blocked hop channel: during every hop sent on JAM_CH
// the signal is removed and replaced by a strong carrier on that channel.
// Packet 1 hops with channel JAM_CH blocked: the preamble must be found, and
// the 2-of-3 vote must repair every byte whose copy was blocked. Packet 2
// runs with hopping disabled (all hops on 12.5 MHz, no jamming).
// Checks: received bytes equal the sent bytes, hop period of 5040 clocks,
// packet length in clocks, and that sync, peak search, vote correction,
// both hop modes, the rejection of a false sync (the receiver searches again
// while the tail of packet 1 is still arriving) and the buffer path all
// happened.
module tb_hss_full;
  import hss_pkg::*;

  localparam int PKT      = 32;   // the default packet length of the design
  localparam int CH_DELAY = 777;
  localparam int JAM_CH   = 3;
  localparam int HOP_CLKS = 5040;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic hop_en = 1'b1;
  logic tx_wr = 1'b0, tx_start = 1'b0, rx_rd = 1'b0;
  logic [7:0] tx_wdata = '0, rx_rdata;
  logic tx_full, tx_busy, tx_hop, rx_empty, rx_full;
  logic signed [15:0] dac;
  logic signed [13:0] adc;
  logic rx_synced, rx_pkt_done, rx_vote_fix, rx_sync_reject, rx_peak_search;

  always #5 clk = ~clk;

  hss_transceiver dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- channel model ----------------
  logic signed [15:0] dline [CH_DELAY];
  logic [3:0]         chline [CH_DELAY];
  logic               jam_on = 1'b0;
  int                 wp = 0;
  int                 jam_ph = 0;
  int                 jammed_hops = 0;
  logic [3:0]         tx_ch_now;
  real                jam_v;

  assign tx_ch_now = dut.tx_ch_d2;

  initial for (int n = 0; n < CH_DELAY; n++) begin dline[n] = '0; chline[n] = '0; end

  always_ff @(posedge clk) begin
    int sig, noise;
    logic [3:0] ch_out;
    sig    = int'(dline[wp]) >>> 3;
    ch_out = chline[wp];
    dline[wp]  <= dac;
    chline[wp] <= tx_ch_now;
    wp <= (wp == CH_DELAY-1) ? 0 : wp + 1;
    noise = int'($urandom_range(0, 64)) - 32;
    jam_ph <= (jam_ph + 5 + JAM_CH) % 40;
    if (jam_on && ch_out == 4'(JAM_CH) && sig != 0) begin
      jam_v = 3000.0 * $cos(2.0 * 3.14159265358979 * jam_ph / 40.0);
      sig = $rtoi(jam_v);
    end
    adc <= 14'(sig + noise);
  end

  // ---------------- event counters ----------------
  int n_reject = 0, n_sync = 0, n_fix = 0, n_search = 0, n_done = 0, n_hops = 0, n_bad_period = 0;
  longint last_hop_t = -1;
  longint cyc = 0;
  logic   prev_search = 1'b0;
  logic   prev_busy = 1'b0;
  longint busy_rise = 0, busy_len = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
    prev_search <= rx_peak_search;
    prev_busy   <= tx_busy;
    if (tx_busy && !prev_busy) busy_rise <= cyc;
    if (!tx_busy && prev_busy) busy_len <= cyc - busy_rise;
    if (rx_peak_search && !prev_search) n_search++;
    if (dut.sync && dut.det_enable) n_sync++;
    if (rx_vote_fix) n_fix++;
    if (rx_pkt_done) n_done++;
    if (!tx_busy) last_hop_t <= -1;
    if (rx_sync_reject) n_reject++;
    if (tx_hop) begin
      if (last_hop_t >= 0 && cyc - last_hop_t != HOP_CLKS && tx_busy) n_bad_period++;
      last_hop_t <= cyc;
      n_hops++;
    end
    end
  end

  // ---------------- stimulus ----------------
  logic [7:0] sent [PKT];

  task automatic send_and_check(input int pkt_no);
    int got;
    for (int n = 0; n < PKT; n++) begin
      sent[n] = 8'($urandom);
      @(negedge clk); tx_wr = 1'b1; tx_wdata = sent[n];
    end
    @(negedge clk); tx_wr = 1'b0; tx_start = 1'b1;
    @(negedge clk); tx_start = 1'b0;
    wait (tx_busy == 1'b1);
    wait (tx_busy == 1'b0);
    repeat (2) @(negedge clk);
    check(busy_len == longint'(HOP_CLKS) * (PREAMBLE_SLOTS + 3 * PKT),
          $sformatf("packet %0d lasted %0d clocks", pkt_no, busy_len));
    wait (rx_pkt_done == 1'b1);
    @(negedge clk);
    got = 0;
    while (!rx_empty) begin
      if (got < PKT) check(rx_rdata == sent[got],
                           $sformatf("pkt %0d byte %0d got %02h sent %02h",
                                     pkt_no, got, rx_rdata, sent[got]));
      got++;
      rx_rd = 1'b1; @(negedge clk); rx_rd = 1'b0; @(negedge clk);
    end
    check(got == PKT, $sformatf("pkt %0d received %0d bytes", pkt_no, got));
  endtask

  initial begin
    repeat (20) @(negedge clk);
    rst = 1'b0;
    repeat (2000) @(negedge clk);
    // packet 1: hopping, one channel blocked
    hop_en = 1'b1; jam_on = 1'b1;
    send_and_check(1);
    check(n_fix > 0, "vote never had to correct a blocked copy");
    // packet 2: hopping disabled
    jam_on = 1'b0;
    repeat (20000) @(negedge clk);
    hop_en = 1'b0;
    repeat (2000) @(negedge clk);
    send_and_check(2);
    check(n_sync >= 2, $sformatf("preamble sync happened %0d times", n_sync));
    check(n_search >= 2, "peak search never opened");
    check(n_done == 2, $sformatf("%0d packets completed", n_done));
    check(n_hops == 2 * (PREAMBLE_SLOTS + 3 * PKT), $sformatf("%0d hops", n_hops));
    check(n_reject >= 1, "no false sync was ever rejected");
    check(n_bad_period == 0, "hop period differs from 5040 clocks");
    $display("events: sync=%0d peak_search=%0d reject=%0d vote_fix=%0d pkts=%0d hops=%0d",
             n_sync, n_search, n_reject, n_fix, n_done, n_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * HOP_CLKS * (PREAMBLE_SLOTS + 3 * PKT) + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
