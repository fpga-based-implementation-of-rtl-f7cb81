// tb_hop_sequencer: exhaustive check of the hop pattern rules: only channels
// 0..7, the three copies of a byte on channels at least two apart, the first
// eight hops on eight different channels, the inverse map returning the
// first hop on each channel, and channel 0 everywhere with hopping off.
module tb_hop_sequencer;
  import hss_pkg::*;
  logic hop_en;
  logic [2:0] trip, det_trip;
  logic [1:0] rep, det_rep;
  ch_t ch, det_ch;
  logic det_ok;
  int checks = 0, failures = 0;
  int hop_of [8];
  ch_t chs [3];

  hop_sequencer dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    det_ch = '0;
    for (int c = 0; c < 8; c++) hop_of[c] = -1;
    hop_en = 1'b1;
    for (int t = 0; t < 8; t++) begin
      for (int r = 0; r < 3; r++) begin
        trip = 3'(t); rep = 2'(r); #1;
        chs[r] = ch;
        chk(ch < 8, $sformatf("channel %0d used", ch));
        chk(ch == ch_t'((t + 3 * r) % 8), "pattern");
        if (3 * t + r < 8) begin
          chk(hop_of[ch] == -1, $sformatf("hop %0d repeats channel %0d", 3*t+r, ch));
          hop_of[ch] = 3 * t + r;
        end
      end
      for (int a = 0; a < 3; a++)
        for (int b = a + 1; b < 3; b++) begin
          int d;
          d = (chs[a] > chs[b]) ? chs[a] - chs[b] : chs[b] - chs[a];
          chk(d >= 2, $sformatf("triplet %0d copies %0d,%0d too close", t, chs[a], chs[b]));
        end
    end
    for (int c = 0; c < 10; c++) begin
      det_ch = ch_t'(c); #1;
      if (c < 8) chk(det_ok && 3 * det_trip + det_rep == hop_of[c],
                     $sformatf("inverse of channel %0d", c));
      else chk(!det_ok, "unused channel accepted");
    end
    hop_en = 1'b0;
    for (int t = 0; t < 8; t++) begin
      trip = 3'(t); rep = 2'(t % 3); #1;
      chk(ch == 0, "hopping off must stay on channel 0");
    end
    det_ch = 0; #1; chk(det_ok && det_trip == 0 && det_rep == 0, "hop-off inverse");
    det_ch = 3; #1; chk(!det_ok, "hop-off accepts channel 3");
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
