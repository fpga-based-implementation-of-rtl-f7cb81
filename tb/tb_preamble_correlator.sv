// tb_preamble_correlator: feeds random samples and, after each, compares
// metric and energy with values computed here from the sample history: the
// I code (regenerated from its recurrence) against every other sample of the
// last 126, |C_I| + |C_Q|, and the sum of |i| + |q| over the last 126. Then
// an ideal preamble hop (I code, rotated carrier) must give the largest
// metric exactly when it fills the window.
module tb_preamble_correlator;
  logic clk = 1'b0, rst = 1'b1, stb = 1'b0, valid;
  logic signed [19:0] i = '0, q = '0;
  logic [26:0] metric;
  logic [27:0] energy;
  int checks = 0, failures = 0;
  bit ci [69];
  longint hi [$], hq [$];
  always #5 clk = ~clk;

  preamble_correlator dut (.*);

  function automatic longint labs(input longint x);
    return x < 0 ? -x : x;
  endfunction

  task automatic push(input longint a, input longint b, output longint m, output longint e);
    longint c1, c2;
    @(negedge clk);
    i = 20'(a); q = 20'(b); stb = 1'b1;
    @(negedge clk);
    stb = 1'b0;
    hi.push_back(a); hq.push_back(b);
    void'(hi.pop_front()); void'(hq.pop_front());
    c1 = 0; c2 = 0; e = 0;
    for (int n = 0; n < 63; n++) begin
      c1 += ci[n] ? hi[2*n] : -hi[2*n];
      c2 += ci[n] ? hq[2*n] : -hq[2*n];
    end
    foreach (hi[n]) e += labs(hi[n]) + labs(hq[n]);
    m = labs(c1) + labs(c2);
    checks++;
    if (!valid || longint'(metric) != m || longint'(energy) != e) begin
      failures++;
      if (failures < 10) $display("FAIL metric %0d/%0d energy %0d/%0d", metric, m, energy, e);
    end
  endtask

  initial begin
    longint m, e, best;
    int best_at;
    for (int n = 0; n < 6; n++) ci[n] = (n == 0);
    for (int n = 0; n + 6 < 69; n++) ci[n+6] = ci[n+5] ^ ci[n];
    for (int n = 0; n < 126; n++) begin hi.push_back(0); hq.push_back(0); end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++)
      push(longint'($urandom_range(0, 2000)) - 1000, longint'($urandom_range(0, 2000)) - 1000, m, e);
    // ideal hop: the I chip on even samples, a Q-like chip on odd ones,
    // carrier rotated so that I gets 0.6 and Q 0.8 of the level
    best = 0; best_at = -1;
    for (int n = 0; n < 3 * 126; n++) begin
      int kk;
      longint a;
      kk = (n % 126) / 2;
      a = (n % 2 == 0) ? (ci[kk] ? 10000 : -10000) : (($urandom_range(0, 1) != 0) ? 10000 : -10000);
      push(a * 6 / 10, a * 8 / 10, m, e);
      if (n >= 126 && m > best) begin best = m; best_at = n % 126; end
    end
    checks++;
    if (best_at != 125) begin failures++; $display("FAIL peak at %0d", best_at); end
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
