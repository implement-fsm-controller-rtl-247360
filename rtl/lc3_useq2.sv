// lc3_useq2: LC3 micro-sequencer with two-way branching, the simpler alternative to the
// COND-decoder scheme of lc3_useq.
//
// Every control-store row holds both possible successors, Addr0 and Addr1, and five
// one-hot COND bits R, P, B, A, I. Each COND bit is ANDed with its input (memory ready,
// PSR[15], BEN, IR[11], INT); the OR of the five picks Addr1, else Addr0. Decode state
// 32 keeps the IRD path, {00, IR[15:12]}. The rows are derived from the same
// micro-program as lc3_useq (Addr0 = JUMP, Addr1 = JUMP with the branch bit set), so
// both sequencers walk the same state graph; the store is 64 x (18 + 40) bits instead
// of 64 x (10 + 40).
// Timing and reset as lc3_useq: one state per clock, synchronous reset to state 18.
module lc3_useq2
  import lc3_pkg::*;
#(
  parameter state_t RESET_STATE = 6'd18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [15:12] ir_op,
  input  logic         ir11,
  input  logic         int_i,
  input  logic         psr15,
  input  logic         ben,
  input  logic         r,
  output state_t       state,
  output ctrl_t        ctrl
);
  uinstr2_t rom [2**STATE_W];
  uinstr2_t row;
  logic     take1;
  state_t   next;

  initial begin
    for (int s = 0; s < 2**STATE_W; s++) rom[s] = ucode2(state_t'(s));
  end

  assign row   = rom[state];
  assign take1 = (row.c_r & r) | (row.c_p & psr15) | (row.c_b & ben) |
                 (row.c_a & ir11) | (row.c_i & int_i);
  assign next  = row.ird ? {2'b00, ir_op} : (take1 ? row.addr1 : row.addr0);
  assign ctrl  = row.ctrl;

  always_ff @(posedge clk) begin
    if (rst) state <= RESET_STATE;
    else     state <= next;
  end
endmodule
