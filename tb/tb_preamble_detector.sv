// tb_preamble_detector: drives metric/energy sequences for all channels.
// Case 1: a peak on channel 4 ten samples after the first hit, with a
// smaller peak on channel 2: sync must name channel 4 with the right age,
// one clock after the search closes PEAK_WIN samples after the first hit.
// Case 2: a hit whose best peak fails the final ratio test: reject, no sync.
// Case 3: hits on a masked-off channel and below MIN_E: nothing happens.
module tb_preamble_detector;
  import hss_pkg::*;
  localparam int PW = 20;
  logic clk = 1'b0, rst = 1'b1, enable = 1'b1, valid = 1'b0;
  logic [NUM_CH-1:0] ch_mask = '1;
  logic [26:0] metric [NUM_CH];
  logic [27:0] energy [NUM_CH];
  logic sync, reject, searching;
  ch_t sync_ch;
  logic [7:0] sync_age;
  int checks = 0, failures = 0, n_sync = 0, n_rej = 0;
  int last_ch = -1, last_age = -1;
  longint samp = 0, sync_samp = -1;
  always #5 clk = ~clk;

  preamble_detector #(.PEAK_WIN(PW)) dut (.*);

  always @(posedge clk) if (!rst) begin
    if (sync) begin n_sync++; last_ch = sync_ch; last_age = sync_age; sync_samp = samp; end
    if (reject) n_rej++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one sample: every channel gets energy e and metric base, except the
  // listed channel, which gets metric m
  task automatic sample(input int ch, input longint m, input longint e, input longint base);
    @(negedge clk);
    for (int c = 0; c < NUM_CH; c++) begin
      energy[c] = 28'(e);
      metric[c] = 27'((c == ch) ? m : base);
    end
    valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
    samp++;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NUM_CH; c++) begin metric[c] = '0; energy[c] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // case 1
    for (int n = 0; n < 5; n++) sample(0, 100, 100000, 100);
    sample(2, 30000, 100000, 100);                // first hit (ratio 0.3 > 3/16)
    for (int n = 1; n < 10; n++) sample(2, 20000 + n, 100000, 100);
    sample(4, 60000, 100000, 100);                // the peak, 10 samples after
    for (int n = 11; n <= PW; n++) sample(4, 1000, 100000, 100);
    chk(n_sync == 1 && last_ch == 4 && last_age == PW - 10,
        $sformatf("sync %0d ch %0d age %0d", n_sync, last_ch, last_age));
    chk(sync_samp == samp, "sync not right after the closing sample");
    // case 2: first hit passes, but the peak window's energy grew
    n_sync = 0;
    sample(1, 30000, 100000, 0);
    for (int n = 1; n <= PW; n++) sample(1, 35000, 400000, 0);
    chk(n_sync == 0 && n_rej == 1, $sformatf("case 2 sync %0d reject %0d", n_sync, n_rej));
    // case 3
    ch_mask = 10'b0011111111;
    for (int n = 0; n < 30; n++) sample(9, 60000, 100000, 0);
    for (int n = 0; n < 30; n++) sample(1, 3000, 1000, 0);
    chk(n_sync == 0 && n_rej == 1 && !searching, "masked channel or weak signal detected");
    // disabled: nothing
    enable = 1'b0;
    for (int n = 0; n < 30; n++) sample(1, 60000, 100000, 0);
    chk(n_sync == 0 && !searching, "detected while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
