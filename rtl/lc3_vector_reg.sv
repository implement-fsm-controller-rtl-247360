// lc3_vector_reg: the 16-bit Vector register that holds the address of the
// interrupt/exception (and TRAP) vector-table entry.
//
// Its high byte is the constant x01 and its low byte comes from VecMUX: input 00 is the
// interrupting device's 8-bit INTV, 01 the privilege-exception vector x00, 10 the
// opcode-exception vector x01, 11 unused (x00). A second, 2:1 multiplexer in front of
// the register replaces that value with the whole system bus while the controller is in
// state 15, so TRAP can load ZEXT(trapvect8) through the bus without a new
// control-store column; the select is a 6-input AND of the state bits that is true
// only for state 15 (001111). The register loads on LD_Vector at the rising clock edge.
// All of this follows the vector-register drawing. Synchronous reset to x0000 is this
// design's choice.
module lc3_vector_reg
  import lc3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_vector,
  input  vecmux_e     vectormux,
  input  logic [7:0]  intv,
  input  logic [15:0] sys_bus,
  input  state_t      state,      // controller's current state
  output logic        is_state15,
  output logic [15:0] vector
);
  logic [7:0]  vec_lo;
  logic [15:0] d;

  always_comb begin
    unique case (vectormux)
      VEC_INTV: vec_lo = intv;
      VEC_PRIV: vec_lo = 8'h00;
      VEC_OPC:  vec_lo = 8'h01;
      default:  vec_lo = 8'h00;
    endcase
  end

  assign is_state15 = &(state ^ ~6'b001111);
  assign d = is_state15 ? sys_bus : {8'h01, vec_lo};

  always_ff @(posedge clk) begin
    if (rst)            vector <= 16'h0000;
    else if (ld_vector) vector <= d;
  end
endmodule
