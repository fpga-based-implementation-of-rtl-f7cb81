// tb_data_correlator: builds ideal hops here (I code rotated by 2a chips on
// even samples, Q code rotated by 2b chips on odd samples, both turned by a
// random carrier phase, plus noise) for random bytes {a, b} and checks that
// the correlator returns the byte, with valid one clock after done.
// Codes are regenerated from their recurrences.
module tb_data_correlator;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, stb = 1'b0, done = 1'b0, valid;
  logic [6:0] pos = '0;
  logic signed [19:0] i = '0, q = '0;
  logic [7:0] sym;
  int checks = 0, failures = 0;
  bit ci [69], cq [69];
  always #5 clk = ~clk;

  data_correlator dut (.*);

  initial begin
    for (int n = 0; n < 6; n++) begin ci[n] = (n == 0); cq[n] = (n == 0); end
    for (int n = 0; n + 6 < 69; n++) begin
      ci[n+6] = ci[n+5] ^ ci[n];
      cq[n+6] = cq[n+5] ^ cq[n+4] ^ cq[n+1] ^ cq[n];
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int h = 0; h < 40; h++) begin
      logic [7:0] b;
      real th;
      b  = 8'($urandom);
      th = 6.2831853 * $urandom_range(0, 999) / 1000.0;
      for (int n = 0; n < 126; n++) begin
        real vi, vq;
        int kk;
        kk = n / 2;
        vi = 0.0; vq = 0.0;
        if (n % 2 == 0) vi = ci[(kk - 2 * b[7:4] + 63) % 63] ? 5000.0 : -5000.0;
        else            vq = cq[(kk - 2 * b[3:0] + 63) % 63] ? 5000.0 : -5000.0;
        @(negedge clk);
        i = 20'($rtoi(vi * $cos(th) - vq * $sin(th)) + $urandom_range(0, 4000) - 2000);
        q = 20'($rtoi(vi * $sin(th) + vq * $cos(th)) + $urandom_range(0, 4000) - 2000);
        pos = 7'(n); stb = 1'b1; clear = (n == 0);
        @(negedge clk);
        stb = 1'b0; clear = 1'b0;
      end
      done = 1'b1;
      @(negedge clk);
      done = 1'b0;
      checks++;
      if (!valid || sym != b) begin
        failures++;
        $display("FAIL hop %0d sent %02h got %02h valid %0d", h, b, sym, valid);
      end
      repeat (3) @(negedge clk);
    end
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
