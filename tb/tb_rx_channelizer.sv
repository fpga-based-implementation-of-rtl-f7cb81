// tb_rx_channelizer: compares the channelizer bit for bit with a model
// written here (mixer, >> 14, four running 40-sample sums each >> 5, kept on
// samp_stb) for random A/D input, then checks selectivity with the channel-0
// (12.5 MHz) oscillator: a tone on the channel gives a large baseband level,
// a tone on the next channel (15 MHz) is rejected by more than 40 dB.
module tb_rx_channelizer;
  logic clk = 1'b0, rst = 1'b1, samp_stb = 1'b0;
  logic signed [13:0] adc = '0;
  logic signed [15:0] lo_cos = '0, lo_sin = '0;
  logic signed [19:0] i, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rx_channelizer dut (.*);

  // ---- reference model, updated at every rising edge ----
  longint mi = 0, mq = 0, oi = 0, oq = 0;
  longint si [4], sq [4];
  longint hi [4][$], hq [4][$];
  initial for (int s = 0; s < 4; s++) begin
    si[s] = 0; sq[s] = 0;
    for (int n = 0; n < 40; n++) begin hi[s].push_back(0); hq[s].push_back(0); end
  end
  function automatic longint box(ref longint h [$], input longint x);
    longint s;
    h.push_back(x);
    void'(h.pop_front());
    s = 0;
    foreach (h[n]) s += h[n];
    return s >>> 5;
  endfunction
  always @(posedge clk) if (!rst) begin
    if (samp_stb) begin oi = si[3]; oq = sq[3]; end
    for (int s = 3; s >= 1; s--) begin
      si[s] = box(hi[s], si[s-1]);
      sq[s] = box(hq[s], sq[s-1]);
    end
    si[0] = box(hi[0], mi);
    sq[0] = box(hq[0], mq);
    mi = (longint'(adc) * lo_cos) >>> 14;
    mq = (-(longint'(adc) * lo_sin)) >>> 14;
  end

  int ph = 0;
  task automatic run(input int n, input int mode, input int tone_step);
    // mode 0: random adc and oscillator; 1: tone, channel-0 oscillator
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      samp_stb = (c % 40) == 39;
      if (mode == 0) begin
        adc = 14'($urandom); lo_cos = 16'($urandom); lo_sin = 16'($urandom);
        if (lo_cos == 16'sh8000) lo_cos = 0;
        if (lo_sin == 16'sh8000) lo_sin = 0;
      end else begin
        adc    = 14'($rtoi(6000.0 * $cos(2.0 * 3.14159265358979 * ((c * tone_step) % 40) / 40.0)));
        lo_cos = 16'($rtoi(32767.0 * $cos(2.0 * 3.14159265358979 * ((c * 5) % 40) / 40.0)));
        lo_sin = 16'($rtoi(32767.0 * $sin(2.0 * 3.14159265358979 * ((c * 5) % 40) / 40.0)));
      end
      if (c % 40 == 1 && c > 1) begin
        checks++;
        if (longint'(i) != oi || longint'(q) != oq) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d i=%0d/%0d q=%0d/%0d", c, i, oi, q, oq);
        end
      end
    end
  endtask

  initial begin
    longint on_ch, off_ch;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(4000, 0, 0);
    run(2000, 1, 5);
    on_ch = (i < 0 ? -i : i) + (q < 0 ? -q : q);
    run(2000, 1, 6);
    off_ch = (i < 0 ? -i : i) + (q < 0 ? -q : q);
    $display("on-channel level %0d, adjacent-channel level %0d", on_ch, off_ch);
    checks++;
    if (on_ch < 5000 || off_ch * 100 > on_ch) begin
      failures++;
      $display("FAIL selectivity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
