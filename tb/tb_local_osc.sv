// tb_local_osc: checks the oscillators of the lowest (12.5 MHz) and highest
// (35 MHz) channel against sin/cos of 2*pi*f*n/100 MHz computed here in
// real arithmetic (within 1 LSB), and that both repeat exactly.
module tb_local_osc;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [15:0] c0, s0, c9, s9;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  local_osc #(.CH(0)) u0 (.clk, .rst, .lo_cos(c0), .lo_sin(s0));
  local_osc #(.CH(9)) u9 (.clk, .rst, .lo_cos(c9), .lo_sin(s9));

  task automatic cmp(input logic signed [15:0] got, input real exp, input string what);
    checks++;
    if (real'(got) - exp > 1.0 || exp - real'(got) > 1.0) begin
      failures++;
      $display("FAIL %s got %0d exp %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(posedge clk);  // phase 0 is taken here, visible after this edge
    for (int n = 0; n < 400; n++) begin
      real a0, a9;
      @(negedge clk);
      a0 = 2.0 * 3.14159265358979 * 12.5e6 * n / 100.0e6;
      a9 = 2.0 * 3.14159265358979 * 35.0e6 * n / 100.0e6;
      cmp(s0, 32767.0 * $sin(a0), "sin ch0");
      cmp(c0, 32767.0 * $cos(a0), "cos ch0");
      cmp(s9, 32767.0 * $sin(a9), "sin ch9");
      cmp(c9, 32767.0 * $cos(a9), "cos ch9");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
