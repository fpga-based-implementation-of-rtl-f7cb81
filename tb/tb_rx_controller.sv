// tb_rx_controller: drives the controller with a sample strobe every 40
// clocks, a sync pulse and a correlator model that returns a planned byte
// for every whole hop. Packet 1 (sync on channel 0, age 5): the first hop
// after sync is partial and must not be correlated; the channel of every
// hop must follow the hop pattern from hop 1; positions and clear must be
// right; the receive buffer must get the 2-of-3 vote of each triplet, where
// one copy is corrupted in some triplets; pkt_done after 3 bytes.
// Packet 2: a false sync whose preamble hops read back non-blank twice in
// a row must be rejected and return the controller to the search.
module tb_rx_controller;
  import hss_pkg::*;
  localparam int PKT = 3;
  logic clk = 1'b0, rst = 1'b1, hop_en = 1'b1, valid = 1'b0;
  logic det_enable, sync = 1'b0;
  ch_t sync_ch = '0, sel_ch;
  logic [7:0] sync_age = '0;
  logic corr_clear, corr_stb, corr_done, corr_valid = 1'b0;
  logic [6:0] corr_pos;
  logic [7:0] corr_sym = '0, buf_wdata;
  logic buf_wr, synced, pkt_done, vote_fix, sync_reject;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rx_controller #(.PKT_BYTES(PKT)) dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [7:0] plan [64];
  int done_hop = 0;
  int n_wr = 0, n_fix = 0, n_done = 0, n_rej = 0;
  logic [7:0] got [$];

  always @(posedge clk) begin
    corr_valid <= corr_done;
    corr_sym   <= plan[done_hop];
    if (!rst) begin
    if (buf_wr) got.push_back(buf_wdata);
    if (vote_fix) n_fix++;
    if (pkt_done) n_done++;
    if (sync_reject) n_rej++;
    end
  end

  // run samples from hop `h`, position `p`, for `nhops` hops
  task automatic run(input int h0, input int p0, input int last_hop, input logic expect_track);
    int h, p;
    logic full;
    h = h0; p = p0; full = (p0 == 0);
    while (h <= last_hop) begin
      repeat (39) @(negedge clk);
      valid = 1'b1;
      #1;
      if (expect_track) begin
        chk(sel_ch == ch_t'((h / 3 + 3 * (h % 3)) % 8), $sformatf("hop %0d channel %0d", h, sel_ch));
        chk(corr_stb == (full || p == 0), $sformatf("hop %0d pos %0d stb %0d", h, p, corr_stb));
        chk(corr_pos == 7'(p) && corr_clear == (p == 0), "position / clear");
      end
      if (p == 125) done_hop = h;
      @(negedge clk);
      valid = 1'b0;
      p++;
      if (p == 126) begin p = 0; h++; full = 1'b1; end
    end
  endtask

  initial begin
    logic [7:0] data [PKT];
    for (int n = 0; n < 64; n++) plan[n] = 8'h00;
    for (int b = 0; b < PKT; b++) begin
      data[b] = 8'($urandom);
      for (int r = 0; r < 3; r++) plan[PREAMBLE_SLOTS + 3 * b + r] = data[b];
      plan[PREAMBLE_SLOTS + 3 * b + b] = ~data[b];   // one copy corrupted
    end
    plan[4] = 8'h55;                                  // one jammed preamble hop
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    chk(det_enable && !synced, "not searching after reset");
    // packet 1
    sync_ch = 0; sync_age = 8'd5;
    @(negedge clk); sync = 1'b1; @(negedge clk); sync = 1'b0;
    chk(synced && !det_enable, "sync not taken");
    run(1, 5, PREAMBLE_SLOTS + 3 * PKT - 1, 1'b1);
    repeat (10) @(negedge clk);
    chk(got.size() == PKT, $sformatf("%0d bytes written", got.size()));
    for (int b = 0; b < PKT && b < got.size(); b++)
      chk(got[b] == data[b], $sformatf("byte %0d %02h exp %02h", b, got[b], data[b]));
    chk(n_fix == PKT && n_done == 1 && det_enable, "vote_fix / pkt_done / back to search");
    // packet 2: false sync, preamble hops read non-blank
    for (int n = 0; n < 64; n++) plan[n] = 8'($urandom_range(1, 255));
    sync_ch = 1; sync_age = 8'd0;                    // channel 1 = hop 3
    @(negedge clk); sync = 1'b1; @(negedge clk); sync = 1'b0;
    run(4, 0, 5, 1'b1);
    repeat (10) @(negedge clk);
    chk(n_rej == 1 && det_enable && !synced, "false sync not rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
