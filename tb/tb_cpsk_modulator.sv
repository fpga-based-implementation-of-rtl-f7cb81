// tb_cpsk_modulator: walks through whole hops with random bytes and checks,
// one clock after each (k, t), the I chip pair against the I code rotated by
// 2*high nibble and the Q chip pair against the Q code rotated by 2*low
// nibble and delayed half a chip (40 clocks), cyclically within the hop.
// Codes are regenerated here from their recurrences.
module tb_cpsk_modulator;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [7:0] sym = '0;
  logic [5:0] k = '0;
  logic [6:0] t = '0, i_t, q_t;
  logic en_o, i_cur, i_prev, q_cur, q_prev;
  int checks = 0, failures = 0;
  bit ci [63], cq [63];
  always #5 clk = ~clk;

  cpsk_modulator dut (.*);

  function automatic bit chip(input bit q, input int n, input int nib);
    int p;
    p = ((n - 2 * nib) % 63 + 63) % 63;
    return q ? cq[p] : ci[p];
  endfunction

  initial begin
    bit ai [69], aq [69];
    for (int n = 0; n < 6; n++) begin ai[n] = (n == 0); aq[n] = (n == 0); end
    for (int n = 0; n + 6 < 69; n++) begin
      ai[n+6] = ai[n+5] ^ ai[n];
      aq[n+6] = aq[n+5] ^ aq[n+4] ^ aq[n+1] ^ aq[n];
    end
    for (int n = 0; n < 63; n++) begin ci[n] = ai[n]; cq[n] = aq[n]; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int h = 0; h < 6; h++) begin
      sym = 8'($urandom);
      en = 1'b1;
      for (int kk = 0; kk < 63; kk++)
        for (int tt = 0; tt < 80; tt += ((tt % 37) == 0 ? 1 : 3)) begin
          int qk, qt;
          k = 6'(kk); t = 7'(tt);
          @(negedge clk);
          qk = (tt >= 40) ? kk : kk - 1;
          qt = (tt >= 40) ? tt - 40 : tt + 40;
          checks++;
          if (!en_o || i_cur != chip(0, kk, sym[7:4]) || i_prev != chip(0, kk - 1, sym[7:4])
              || i_t != 7'(tt) || q_cur != chip(1, qk, sym[3:0])
              || q_prev != chip(1, qk - 1, sym[3:0]) || q_t != 7'(qt)) begin
            failures++;
            if (failures < 10) $display("FAIL sym=%02h k=%0d t=%0d", sym, kk, tt);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
