// local_osc: look-up-table local oscillator for one frequency-hop channel.
//
// The ten hop channels sit at 12.5 + 2.5*CH MHz. With the 100 MHz system
// clock every one of them is an exact multiple of 2.5 MHz = 100 MHz / 40,
// so a 40-entry sine table indexed by a modulo-40 phase counter that steps
// by 5 + CH per clock produces the carrier with no phase drift. All
// oscillators reset together and so stay phase-locked to each other, as the
// single-FPGA design intends. The same oscillators serve the transmitter
// (up-conversion) and the receiver (down-conversion to baseband).
//
// Table: SIN[n] = round((2^(W-1)-1) * sin(2*pi*n/40)); cos uses index n+10.
// Outputs are registered; the phase advances every clock after reset.
module local_osc
  import hss_pkg::*;
#(
  parameter int CH = 0,         // channel number 0..9
  parameter int W  = 16         // output width
) (
  input  logic                clk,
  input  logic                rst,
  output logic signed [W-1:0] lo_cos,
  output logic signed [W-1:0] lo_sin
);
  typedef logic signed [W-1:0] tab_t [LO_PERIOD];

  function automatic tab_t mk_sin();
    tab_t t;
    real amp;
    amp = real'((1 << (W-1)) - 1);
    for (int n = 0; n < LO_PERIOD; n++)
      t[n] = W'($rtoi(amp * $sin(2.0 * 3.14159265358979 * n / LO_PERIOD)
                      + ((n < LO_PERIOD/2) ? 0.5 : -0.5)));
    return t;
  endfunction

  localparam tab_t SIN = mk_sin();
  localparam int STEP = CH_BASE_STEP + CH;

  logic [5:0] ph;
  logic [5:0] ph_next;
  logic [5:0] ph_cos;

  always_comb begin
    ph_next = ph + 6'(STEP);
    if (ph_next >= 6'(LO_PERIOD)) ph_next = ph_next - 6'(LO_PERIOD);
    ph_cos = ph + 6'(LO_PERIOD/4);
    if (ph_cos >= 6'(LO_PERIOD)) ph_cos = ph_cos - 6'(LO_PERIOD);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph     <= '0;
      lo_cos <= '0;
      lo_sin <= '0;
    end else begin
      ph     <= ph_next;
      lo_sin <= SIN[ph];
      lo_cos <= SIN[ph_cos];
    end
  end
endmodule
