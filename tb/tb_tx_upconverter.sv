// tb_tx_upconverter: random I/Q values, oscillator values and channels;
// the D/A word one clock later must equal (i*cos - q*sin) >> 15 of the
// selected channel, and zero when disabled.
module tb_tx_upconverter;
  import hss_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  ch_t ch = '0;
  logic signed [15:0] i_s = '0, q_s = '0, dac;
  logic signed [15:0] lo_cos [NUM_CH];
  logic signed [15:0] lo_sin [NUM_CH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tx_upconverter dut (.*);

  initial begin
    longint exp;
    for (int c = 0; c < NUM_CH; c++) begin lo_cos[c] = '0; lo_sin[c] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int c = 0; c < NUM_CH; c++) begin
        lo_cos[c] = 16'($urandom_range(0, 65534) - 32767);
        lo_sin[c] = 16'($urandom_range(0, 65534) - 32767);
      end
      ch  = ch_t'($urandom_range(0, NUM_CH - 1));
      i_s = 16'($urandom_range(0, 32766) - 16383);
      q_s = 16'($urandom_range(0, 32766) - 16383);
      en  = ($urandom_range(0, 9) != 0);
      exp = en ? ((longint'(i_s) * lo_cos[ch] - longint'(q_s) * lo_sin[ch]) >>> 15) : 0;
      @(negedge clk);
      checks++;
      if (longint'(dac) != exp) begin
        failures++;
        $display("FAIL ch=%0d got %0d exp %0d", ch, dac, exp);
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
