// lc3_alu: the LC3 arithmetic-logic unit.
//
// Operand A is the register file's SR1 output. Operand B is chosen by IR[5]: the SR2
// register, or the 5-bit immediate IR[4:0] sign-extended. ALUK selects ADD, AND, NOT A
// or PASS A. The result reaches the system bus through the GateALU tri-state driver,
// which in this design is a multiplexer in the enclosing module.
// Only the ALU's place in the datapath comes from the ADD example; the operation set,
// the ALUK encoding and the immediate operand follow the usual LC3 definition.
// Combinational.
module lc3_alu
  import lc3_pkg::*;
(
  input  aluk_e       aluk,
  input  logic [15:0] a,        // SR1
  input  logic [15:0] sr2,
  input  logic [5:0]  ir5_0,    // IR[5:0]
  output logic [15:0] y
);
  logic [15:0] b;

  assign b = ir5_0[5] ? {{11{ir5_0[4]}}, ir5_0[4:0]} : sr2;

  always_comb begin
    unique case (aluk)
      ALU_ADD: y = a + b;
      ALU_AND: y = a & b;
      ALU_NOT: y = ~a;
      default: y = a;
    endcase
  end
endmodule
