// lc3_cond_logic: micro-branch function of the LC3 micro-sequencer.
//
// The 3-bit COND field of the current control-store row is decoded into one line per
// branching code. Line k is ANDed with one condition input, and the result is ORed
// into one bit of the 6-bit JUMP field; the modified JUMP is the next state. With COND = 0 JUMP passes
// unchanged, so a state with no branch simply names its successor.
// Line 1 (memory ready R) alters J[1] and line 2 (BEN) alters J[2], as in the decoder
// drawing; lines 3, 4 and 5 (IR[11] -> J[0], PSR[15] -> J[3], INT -> J[4]) are this
// design's reading, chosen so that the documented successor pairs 33/49, 36/44, 37/45
// and 51/59 come out. Codes 0, 6 and 7 alter nothing, and no code alters J[5], which
// passes straight through.
// Purely combinational.
module lc3_cond_logic
  import lc3_pkg::*;
(
  input  cond_e  cond,   // COND field of the control-store row
  input  state_t j,      // JUMP field
  input  logic   int_i,  // interrupt pending
  input  logic   psr15,  // PSR[15], 1 = user mode
  input  logic   ben,    // branch enable
  input  logic   r,      // memory ready
  input  logic   ir11,   // IR[11]
  output state_t next    // next state when IRD = 0
);
  // One decoder line per COND code that alters a bit; codes 0, 6 and 7 need none.
  logic dec_r, dec_ben, dec_ir11, dec_psr15, dec_int;

  always_comb begin
    dec_r     = (cond == COND_R);
    dec_ben   = (cond == COND_BEN);
    dec_ir11  = (cond == COND_IR11);
    dec_psr15 = (cond == COND_PSR15);
    dec_int   = (cond == COND_INT);
  end

  always_comb begin
    next    = j;
    next[0] = j[0] | (dec_ir11  & ir11);
    next[1] = j[1] | (dec_r     & r);
    next[2] = j[2] | (dec_ben   & ben);
    next[3] = j[3] | (dec_psr15 & psr15);
    next[4] = j[4] | (dec_int   & int_i);
  end
endmodule
