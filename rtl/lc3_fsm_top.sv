// lc3_fsm_top: the LC3 control unit with its privilege, interrupt and memory-protection
// additions, wired to the part of the datapath they act on.
//
// Contents:
//   * lc3_useq       micro-sequencer (uMAR, 64 x 50 control store, COND logic);
//   * lc3_useq2      the two-way-branching sequencer, run in lock step on the same inputs
//                    as a second implementation of the same state graph (own outputs);
//   * lc3_vector_reg Vector register with VecMUX and the state-15 bus override (TRAP);
//   * lc3_int_priority  turns a device request into INT only above PSR[10:8];
//   * lc3_mem_protect   MPR and the access-violation flag AV;
//   * lc3_regfile, lc3_alu, lc3_psr  register file with DRMUX/SR1MUX, ALU, PSR with the
//                    condition codes and BEN;
//   * IR and MAR registers, both loaded from the system bus (LD_IR, LD_MAR);
//   * rom_table and rom_fsm, the two generic ROM examples, side by side with their own
//     ports.
// The system bus is a multiplexer standing for the tri-state gates: GateALU, GateMARMUX
// with MARMUX = 0 (ZEXT(IR[7:0])), GatePSR and GateVector are driven from inside; any
// other source (PC, PC-1, MDR, address adder, SP logic) is not part of this design and
// is supplied on bus_ext, which the environment drives according to the control word.
// In state 15 both GateMARMUX and GatePSR are asserted, as the TRAP change lists
// Vector <= ZEXT(IR[7:0]) over the bus and MDR <= PSR in the same state; here the bus
// carries ZEXT(IR[7:0]), and an MDR would need its own path from the PSR.
// On an interrupt, PSR[10:8] is loaded with 111 (MASK_ALL_ON_INT = 1, the default, as
// the interrupt-disable addition asks) or with the device's priority (0, as the state
// diagram's state 49 lists).
// Memory ready (R), the device request and its priority and INTV come in as ports.
// Timing: one controller state per clock; control signals and sys_bus are combinational
// from the current state; all registers load at the rising edge; synchronous reset.
module lc3_fsm_top
  import lc3_pkg::*;
#(
  // 1: entering an interrupt sets PSR[10:8] to 111, so every further interrupt is held
  //    off until RTI; 0: it sets PSR[10:8] to the device's priority, holding off only
  //    requests at the same or a lower level.
  parameter bit MASK_ALL_ON_INT = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  // datapath parts outside this design
  input  logic [15:0] bus_ext,       // bus value when PC, PC-1, MDR, adder or SP is gated
  input  logic        mem_ready,     // R
  // interrupting device
  input  logic        int_req,
  input  logic [2:0]  int_priority,
  input  logic [7:0]  intv,
  // MPR load
  input  logic        ld_mpr,
  // controller
  output state_t      state,
  output ctrl_t       ctrl,
  output state_t      state2,        // two-way-branching sequencer
  output ctrl_t       ctrl2,
  output logic [15:0] sys_bus,
  output logic [15:0] sr1_out,       // register-file SR1 port (base register, SP)
  output logic [15:0] ir,
  output logic [15:0] mar,
  output logic [15:0] psr,
  output logic        ben,
  output logic        int_o,         // INT seen by the sequencer
  output logic [15:0] vector,
  output logic        is_state15,
  output logic [15:0] mpr,
  output logic        av,
  // ROM-as-logic example f(A,B,C)
  input  logic [2:0]  rom_abc,
  output logic        rom_f,
  // ROM-based Moore FSM example
  input  logic        fsm_in,
  output logic        fsm_state,
  output logic        fsm_out
);
  logic [15:0] sr2_out, alu_y;

  // ---------------- controller ----------------
  lc3_useq u_useq (
    .clk, .rst,
    .ir_op (ir[15:12]),
    .ir11  (ir[11]),
    .int_i (int_o),
    .psr15 (psr[15]),
    .ben   (ben),
    .r     (mem_ready),
    .state (state),
    .ctrl  (ctrl)
  );

  lc3_useq2 u_useq2 (
    .clk, .rst,
    .ir_op (ir[15:12]),
    .ir11  (ir[11]),
    .int_i (int_o),
    .psr15 (psr[15]),
    .ben   (ben),
    .r     (mem_ready),
    .state (state2),
    .ctrl  (ctrl2)
  );

  lc3_int_priority u_prio (
    .int_req      (int_req),
    .int_priority (int_priority),
    .psr_priority (psr[10:8]),
    .int_o        (int_o)
  );

  // ---------------- system bus ----------------
  always_comb begin
    if (ctrl.gate_alu)                       sys_bus = alu_y;
    else if (ctrl.gate_marmux && !ctrl.marmux) sys_bus = {8'h00, ir[7:0]};
    else if (ctrl.gate_psr)                  sys_bus = psr;
    else if (ctrl.gate_vector)               sys_bus = vector;
    else                                     sys_bus = bus_ext;
  end

  // Only one source may drive the bus, except in state 15 where the TRAP change
  // asserts GateMARMUX and GatePSR together (see above).
  bus_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.gate_pc, ctrl.gate_mdr, ctrl.gate_alu, ctrl.gate_marmux,
              ctrl.gate_vector, ctrl.gate_pc1, ctrl.gate_psr, ctrl.gate_sp}) || is_state15);

  // ---------------- IR and MAR ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ir  <= '0;
      mar <= '0;
    end else begin
      if (ctrl.ld_ir)  ir  <= sys_bus;
      if (ctrl.ld_mar) mar <= sys_bus;
    end
  end

  // ---------------- privilege / interrupt additions ----------------
  lc3_vector_reg u_vector (
    .clk, .rst,
    .ld_vector  (ctrl.ld_vector),
    .vectormux  (ctrl.vectormux),
    .intv       (intv),
    .sys_bus    (sys_bus),
    .state      (state),
    .is_state15 (is_state15),
    .vector     (vector)
  );

  lc3_mem_protect u_mpr (
    .clk, .rst,
    .ld_mpr (ld_mpr),
    .mpr_in (sys_bus),
    .mar_page (mar[15:12]),
    .psr15  (psr[15]),
    .mio_en (ctrl.mio_en),
    .mpr    (mpr),
    .av     (av)
  );

  // ---------------- datapath slice ----------------
  lc3_regfile u_rf (
    .clk, .rst,
    .ld_reg  (ctrl.ld_reg),
    .drmux   (ctrl.drmux),
    .sr1mux  (ctrl.sr1mux),
    .ir11_9  (ir[11:9]),
    .ir8_6   (ir[8:6]),
    .ir2_0   (ir[2:0]),
    .sys_bus (sys_bus),
    .sr1_out (sr1_out),
    .sr2_out (sr2_out)
  );

  lc3_alu u_alu (
    .aluk  (ctrl.aluk),
    .a     (sr1_out),
    .sr2   (sr2_out),
    .ir5_0 (ir[5:0]),
    .y     (alu_y)
  );

  lc3_psr u_psr (
    .clk, .rst,
    .sys_bus      (sys_bus),
    .psrmux       (ctrl.psrmux),
    .ld_priv      (ctrl.ld_priv),
    .set_priv     (ctrl.set_priv),
    .ld_priority  (ctrl.ld_priority),
    .int_priority (MASK_ALL_ON_INT ? 3'b111 : int_priority),
    .ld_cc        (ctrl.ld_cc),
    .ld_ben       (ctrl.ld_ben),
    .ir11_9       (ir[11:9]),
    .psr          (psr),
    .ben          (ben)
  );

  // ---------------- generic ROM examples ----------------
  rom_table u_rom_f (
    .addr (rom_abc),
    .out  (rom_f)
  );

  rom_fsm u_rom_fsm (
    .clk, .rst,
    .in    (fsm_in),
    .state (fsm_state),
    .out   (fsm_out)
  );
endmodule
