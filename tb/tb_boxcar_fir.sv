// tb_boxcar_fir: random input samples (with full-scale runs); the output
// must equal the sum of the last 40 inputs shifted right by 5, one clock
// after each input, and must hold when en is low.
module tb_boxcar_fir;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [16:0] y;
  int checks = 0, failures = 0;
  int hist [$];
  always #5 clk = ~clk;

  boxcar_fir dut (.*);

  initial begin
    for (int n = 0; n < 40; n++) hist.push_back(0);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      longint s;
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      if ((n / 200) % 3 == 1) x = 16'sh7fff;
      else if ((n / 200) % 3 == 2 && n % 2 == 0) x = 16'sh8000;
      else x = 16'($urandom);
      if (en) begin
        hist.push_back(int'(x));
        void'(hist.pop_front());
      end
      s = 0;
      foreach (hist[k]) s += hist[k];
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != (s >>> 5)) begin
        failures++;
        $display("FAIL n=%0d got %0d exp %0d", n, y, s >>> 5);
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
