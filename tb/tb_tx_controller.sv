// tb_tx_controller: sends two short packets (3 data bytes each) from a
// buffer model and checks the hop sequence: 12 blank preamble hops, then
// every byte on three consecutive hops in buffer order, channels following
// the hop pattern (or 0 with hopping off), 80 clocks per chip, 63 chips per
// hop, 5040 clocks per hop, and that busy covers exactly the packet.
module tb_tx_controller;
  import hss_pkg::*;
  localparam int PKT = 3;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, hop_en = 1'b1;
  logic buf_empty, buf_rd, busy, hop_start;
  logic [7:0] buf_rdata, sym;
  logic [5:0] k;
  logic [6:0] t;
  ch_t ch;
  int checks = 0, failures = 0;
  byte unsigned q [$];
  always #5 clk = ~clk;

  assign buf_empty = q.size() == 0;
  assign buf_rdata = buf_empty ? 8'h00 : q[0];
  logic rd_q = 1'b0;
  always @(posedge clk) rd_q <= buf_rd && !buf_empty;
  always @(negedge clk) if (rd_q) void'(q.pop_front());

  tx_controller #(.PKT_BYTES(PKT)) dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic run_packet(input logic hop);
    byte unsigned data [PKT];
    int hop_no, clk_in_hop;
    for (int n = 0; n < PKT; n++) begin data[n] = 8'($urandom_range(1, 255)); q.push_back(data[n]); end
    hop_en = hop;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    hop_no = 0;
    clk_in_hop = 0;
    // busy and the first hop start came up at the edge just passed
    while (busy) begin
      int exp_trip, exp_rep;
      byte unsigned exp_sym;
      exp_trip = hop_no / 3;
      exp_rep  = hop_no % 3;
      exp_sym  = (hop_no < PREAMBLE_SLOTS) ? 8'h00 : data[(hop_no - PREAMBLE_SLOTS) / 3];
      chk(hop_start == (clk_in_hop == 0), $sformatf("hop_start at clock %0d of hop %0d", clk_in_hop, hop_no));
      chk(k == 6'(clk_in_hop / 80) && t == 7'(clk_in_hop % 80), "chip timing");
      chk(sym == exp_sym, $sformatf("hop %0d sym %02h exp %02h", hop_no, sym, exp_sym));
      chk(ch == (hop ? ch_t'((exp_trip + 3 * exp_rep) % 8) : ch_t'(0)), $sformatf("hop %0d channel %0d", hop_no, ch));
      @(negedge clk);
      clk_in_hop++;
      if (clk_in_hop == 5040) begin clk_in_hop = 0; hop_no++; end
    end
    chk(hop_no == PREAMBLE_SLOTS + 3 * PKT && clk_in_hop == 0,
        $sformatf("packet ended at hop %0d clock %0d", hop_no, clk_in_hop));
    chk(q.size() == 0, "buffer not drained");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    chk(!busy, "busy before start");
    run_packet(1'b1);
    run_packet(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
