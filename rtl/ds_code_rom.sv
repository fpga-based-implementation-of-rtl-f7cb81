// ds_code_rom: code-phase lookup for the two 63-chip maximal-length codes.
//
// The direct-sequence codes are the I and Q m-sequences of hss_pkg,
// generated at elaboration by stepping a 6-bit LFSR 63 times. Data is sent
// by code-phase-shift keying: a 4-bit value n delays the start of the code
// by 2*n chips (only every other chip position is used, so that a
// correlation can never sit between two valid positions). The ROM returns
// chip idx of the code rotated by 2*nib chips: code[(idx - 2*nib) mod 63].
// The rotation is cyclic inside one 63-chip sequence (own choice: it keeps
// each hop a whole period of the code, so its periodic autocorrelation of
// 63 / -1 holds).
//
// Purely combinational. idx must be 0..62.
module ds_code_rom
  import hss_pkg::*;
(
  input  logic       sel_q,   // 0: I code, 1: Q code
  input  logic [5:0] idx,     // chip index inside the sequence, 0..62
  input  logic [3:0] nib,     // code-phase value, shift = 2*nib chips
  output logic       chip     // chip value, 1 is sent as +1, 0 as -1
);
  logic [6:0] diff;
  logic [5:0] pos;

  always_comb begin
    diff = {1'b0, idx} - {2'b00, nib, 1'b0};
    // idx < 63 and 2*nib <= 30, so one correction brings it into 0..62
    pos  = diff[6] ? 6'(diff + 7'(CODE_LEN)) : diff[5:0];
    chip = sel_q ? CODE_Q[pos] : CODE_I[pos];
  end
endmodule
