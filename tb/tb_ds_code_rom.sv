// tb_ds_code_rom: checks the code-phase ROM against codes regenerated here
// from their linear recurrences (I: a[n+6] = a[n+5] ^ a[n]; Q: a[n+6] =
// a[n+5] ^ a[n+4] ^ a[n+1] ^ a[n]; both start 1,0,0,0,0,0), for every chip
// index and every code-phase value, and checks that both codes are
// maximal-length: 32 ones and a periodic autocorrelation of -1 off peak.
module tb_ds_code_rom;
  logic       sel_q;
  logic [5:0] idx;
  logic [3:0] nib;
  logic       chip;
  int checks = 0, failures = 0;
  bit ci [126], cq [126];

  ds_code_rom dut (.*);

  initial begin
    for (int n = 0; n < 6; n++) begin ci[n] = (n == 0); cq[n] = (n == 0); end
    for (int n = 0; n + 6 < 126; n++) begin
      ci[n+6] = ci[n+5] ^ ci[n];
      cq[n+6] = cq[n+5] ^ cq[n+4] ^ cq[n+1] ^ cq[n];
    end
    for (int q = 0; q < 2; q++) begin
      int ones;
      ones = 0;
      for (int n = 0; n < 63; n++) ones += q ? int'(cq[n]) : int'(ci[n]);
      checks++; if (ones != 32) begin failures++; $display("FAIL ones %0d", ones); end
      for (int s = 1; s < 63; s++) begin
        int ac;
        ac = 0;
        for (int n = 0; n < 63; n++)
          ac += (q ? (cq[n] == cq[n+s]) : (ci[n] == ci[n+s])) ? 1 : -1;
        checks++; if (ac != -1) begin failures++; $display("FAIL autocorr q=%0d s=%0d %0d", q, s, ac); end
      end
      for (int v = 0; v < 16; v++)
        for (int k = 0; k < 63; k++) begin
          bit exp;
          sel_q = 1'(q); idx = 6'(k); nib = 4'(v);
          #1;
          exp = q ? cq[(k - 2*v + 63) % 63] : ci[(k - 2*v + 63) % 63];
          checks++;
          if (chip !== exp) begin
            failures++;
            $display("FAIL q=%0d k=%0d nib=%0d got %0d exp %0d", q, k, v, chip, exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
