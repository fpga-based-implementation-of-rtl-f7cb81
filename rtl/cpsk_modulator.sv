// cpsk_modulator: code-phase-shift-keying (CPSK) offset-QPSK chip generator.
//
// One DS sequence (one hop, 63 chips) carries one byte. The high nibble
// delays the start of the I code by 2*nibble chips, the low nibble does the
// same for the Q code, so each nibble picks one of 16 of the 31 usable
// code positions. No carrier phase is needed to read this back, which is why
// the scheme survives the phase jumps at every hop. I and Q form an offset
// QPSK pair: the Q chips are half a chip (40 clocks) late, which keeps the
// envelope nearly constant. The offset wraps cyclically inside the hop, so
// every hop holds exactly one period of each rotated code.
//
// For the chip position (k, t) given by the transmit controller it outputs,
// one clock later, the current and previous chip of I and Q and the clock
// within each chip, ready for two rc_shaper instances. The mapping of the
// high nibble to I is this design's choice.
module cpsk_modulator
  import hss_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,        // a hop is being sent
  input  logic [7:0] sym,       // byte of this hop
  input  logic [5:0] k,         // I chip index, 0..62
  input  logic [6:0] t,         // clock within the I chip, 0..79
  output logic       en_o,
  output logic       i_cur, i_prev,
  output logic [6:0] i_t,
  output logic       q_cur, q_prev,
  output logic [6:0] q_t
);
  localparam int HALF = CHIP_CLKS / 2;

  logic [5:0] k_prev, kq, kq_prev;
  logic [6:0] tq;
  logic       ic, ip, qc, qp;

  function automatic logic [5:0] dec63(input logic [5:0] x);
    return (x == 0) ? 6'(CODE_LEN - 1) : x - 1'b1;
  endfunction

  always_comb begin
    k_prev = dec63(k);
    // Q chip index and phase: Q chip m spans I-time [80m+40, 80m+120)
    if (t >= 7'(HALF)) begin
      kq = k;
      tq = t - 7'(HALF);
    end else begin
      kq = dec63(k);
      tq = t + 7'(HALF);
    end
    kq_prev = dec63(kq);
  end

  ds_code_rom u_ic (.sel_q(1'b0), .idx(k),       .nib(sym[7:4]), .chip(ic));
  ds_code_rom u_ip (.sel_q(1'b0), .idx(k_prev),  .nib(sym[7:4]), .chip(ip));
  ds_code_rom u_qc (.sel_q(1'b1), .idx(kq),      .nib(sym[3:0]), .chip(qc));
  ds_code_rom u_qp (.sel_q(1'b1), .idx(kq_prev), .nib(sym[3:0]), .chip(qp));

  always_ff @(posedge clk) begin
    if (rst) begin
      en_o  <= 1'b0;
      i_cur <= 1'b0; i_prev <= 1'b0; i_t <= '0;
      q_cur <= 1'b0; q_prev <= 1'b0; q_t <= '0;
    end else begin
      en_o  <= en;
      i_cur <= ic; i_prev <= ip; i_t <= t;
      q_cur <= qc; q_prev <= qp; q_t <= tq;
    end
  end
endmodule
