// lc3_ustore: the LC3 control store, a 64-row read-only memory.
//
// It is addressed by the 6-bit current state (the uMAR) and returns that state's row:
// IRD, COND, JUMP (the 10-bit next-state part) and the 40-bit control word. The read is
// combinational, so a row's control signals are valid for the whole cycle the
// controller sits in that state. The 64 x 50 table is computed at elaboration from
// lc3_pkg::ucode(), which lists the micro-program state by state.
module lc3_ustore
  import lc3_pkg::*;
(
  input  state_t  addr,
  output uinstr_t row
);
  uinstr_t rom [2**STATE_W];

  // The row layout must match the widths the control store is specified with.
  if ($bits(ctrl_t) != CTRL_W || $bits(uinstr_t) != NEXT_W + CTRL_W) begin : g_width_check
    $error("control-store row is %0d bits, expected %0d", $bits(uinstr_t), NEXT_W + CTRL_W);
  end

  initial begin
    for (int s = 0; s < 2**STATE_W; s++) rom[s] = ucode(state_t'(s));
  end

  assign row = rom[addr];
endmodule
