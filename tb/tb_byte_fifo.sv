// tb_byte_fifo: random writes and reads against a queue model, with the
// buffer driven into full and empty; checks data order, flags and count.
module tb_byte_fifo;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic wr = 1'b0, rd = 1'b0, full, empty;
  logic [7:0] wdata = '0, rdata;
  logic [4:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  byte unsigned model [$];
  always #5 clk = ~clk;

  byte_fifo #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = ((n / 300) % 2) ? 70 : 30;   // alternate filling and draining
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH)
          || count != 5'(model.size())) begin
        failures++;
        $display("FAIL flags size=%0d empty=%0d full=%0d count=%0d", model.size(), empty, full, count);
      end
      if (model.size() > 0) begin
        checks++;
        if (rdata != model[0]) begin failures++; $display("FAIL data %02h exp %02h", rdata, model[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      wr = ($urandom_range(0, 99) < bias);
      rd = ($urandom_range(0, 99) >= bias);
      wdata = 8'($urandom);
      if (rd && model.size() > 0) void'(model.pop_front());
      if (wr && model.size() < DEPTH + (rd && !empty ? 1 : 0) && !full) model.push_back(wdata);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty not reached"); end
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
