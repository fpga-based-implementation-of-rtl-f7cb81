// hss_pkg: constants, types and table functions shared by the hybrid
// direct-sequence / fast-frequency-hopping (DS/FFH) transceiver.
//
// Signal plan (from the design description): one 100 MHz clock for FPGA,
// A/D and D/A; ten frequency-hop channels at 12.5 + 2.5*k MHz (k = 0..9);
// 1.25 Mchip/s, i.e. 80 clocks per chip; 63-chip maximal-length codes, one
// for I and one for Q; 16 code-phase positions (every other chip) per
// component, 4 bits each, so 8 bits per DS sequence; each byte sent on
// three hops and voted 2-of-3; four blank bytes of preamble.
//
// Own choices: the two LFSR polynomials, the 2 samples per chip used inside
// the receiver, and the table scalings.
package hss_pkg;

  localparam int CLK_HZ        = 100_000_000;
  localparam int CHIP_CLKS     = 80;          // 100 MHz / 1.25 MHz
  localparam int CODE_LEN      = 63;          // chips per DS sequence
  localparam int SLOT_CLKS     = CHIP_CLKS * CODE_LEN;  // 5040 clocks per hop
  localparam int NUM_CH        = 10;          // FH channels
  localparam int NUM_USED_CH   = 8;           // top two channels left unused
  localparam int CH_BASE_STEP  = 5;           // 12.5 MHz = 5/40 of 100 MHz
  localparam int LO_PERIOD     = 40;          // 2.5 MHz grid = 100 MHz / 40
  localparam int SPC           = 2;           // receiver samples per chip
  localparam int DECIM         = CHIP_CLKS / SPC;       // 40
  localparam int SLOT_SAMPLES  = CODE_LEN * SPC;        // 126
  localparam int NUM_POS       = 16;          // code positions used per component
  localparam int REPEAT        = 3;           // hops per byte
  localparam int PREAMBLE_BYTES = 4;
  localparam int PREAMBLE_SLOTS = PREAMBLE_BYTES * REPEAT;  // 12

  // LFSR polynomials (own choice, both primitive of degree 6):
  // I code x^6 + x + 1, Q code x^6 + x^5 + x^2 + x + 1.
  localparam logic [5:0] POLY_I = 6'b100001;   // taps of x^6 (bit5) and x^1 (bit0)
  localparam logic [5:0] POLY_Q = 6'b110011;

  typedef logic [CODE_LEN-1:0] code_t;
  typedef logic [3:0]          ch_t;

  // Chip n of the m-sequence of a Fibonacci LFSR started at state 000001:
  // out = s[0]; feedback = XOR of state bits selected by the polynomial.
  function automatic code_t mls_code(input logic [5:0] poly);
    logic [5:0] s;
    code_t c;
    s = 6'b000001;
    for (int n = 0; n < CODE_LEN; n++) begin
      c[n] = s[0];
      s = {^(s & poly), s[5:1]};
    end
    return c;
  endfunction

  localparam code_t CODE_I = mls_code(POLY_I);
  localparam code_t CODE_Q = mls_code(POLY_Q);

endpackage
