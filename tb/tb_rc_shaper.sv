// tb_rc_shaper: drives random chip pairs and chip phases and compares the
// output, one clock later, with prev + (cur - prev)(1 - cos(pi(t+1)/80))/2
// times the amplitude, computed here in real arithmetic (within 1 LSB);
// also checks that en = 0 gives zero.
module tb_rc_shaper;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, prev = 1'b0, cur = 1'b0;
  logic [6:0] t = '0;
  logic signed [15:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rc_shaper dut (.*);

  initial begin
    real exp, pv, cv;
    logic p0, c0, e0;
    logic [6:0] t0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      e0 = ($urandom_range(0, 9) != 0); p0 = 1'($urandom); c0 = 1'($urandom);
      t0 = 7'($urandom_range(0, 79));
      en = e0; prev = p0; cur = c0; t = t0;
      @(negedge clk);
      pv = p0 ? 1.0 : -1.0;
      cv = c0 ? 1.0 : -1.0;
      exp = e0 ? 16383.0 * (pv + (cv - pv) * (1.0 - $cos(3.14159265358979 * (t0 + 1) / 80.0)) / 2.0) : 0.0;
      checks++;
      if (real'(y) - exp > 1.0 || exp - real'(y) > 1.0) begin
        failures++;
        $display("FAIL p=%0d c=%0d t=%0d en=%0d got %0d exp %f", p0, c0, t0, e0, y, exp);
      end
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
