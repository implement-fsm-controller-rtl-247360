// lc3_useq: LC3 micro-sequencer, the controller's finite-state machine.
//
// The current state lives in the 6-bit uMAR, which addresses the control store
// (lc3_ustore). The row read out drives the 40 control signals and decides the next
// state: when IRD = 1 (only in decode state 32) the uMAR is loaded with {00, IR[15:12]},
// so each instruction starts in the state numbered by its opcode; otherwise the JUMP
// field, modified by the COND logic with the inputs INT, PSR[15], BEN, R and IR[11], is
// loaded. The current state is also brought out so that small pieces of logic can
// decode it without widening the control store.
// Timing: one state per clock; the control word is combinational from the uMAR.
// Reset (synchronous, active high) puts the uMAR in fetch state 18; the reset state is
// this design's choice.
module lc3_useq
  import lc3_pkg::*;
#(
  parameter state_t RESET_STATE = 6'd18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [15:12] ir_op,    // IR[15:12]
  input  logic         ir11,     // IR[11]
  input  logic         int_i,    // interrupt pending
  input  logic         psr15,    // PSR[15]
  input  logic         ben,      // branch enable
  input  logic         r,        // memory ready
  output state_t       state,    // uMAR
  output ctrl_t        ctrl      // control signals of the current state
);
  uinstr_t row;
  state_t  jump_next;
  state_t  next;

  lc3_ustore u_store (.addr(state), .row(row));

  lc3_cond_logic u_cond (
    .cond (row.cond),
    .j    (row.j),
    .int_i(int_i),
    .psr15(psr15),
    .ben  (ben),
    .r    (r),
    .ir11 (ir11),
    .next (jump_next)
  );

  assign next = row.ird ? {2'b00, ir_op} : jump_next;
  assign ctrl = row.ctrl;

  always_ff @(posedge clk) begin
    if (rst) state <= RESET_STATE;
    else     state <= next;
  end
endmodule
