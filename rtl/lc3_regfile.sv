// lc3_regfile: the LC3 register file with its destination and source-1 selectors.
//
// Eight 16-bit registers. DRMUX picks the register written: 00 IR[11:9], 01 R6 (the
// stack pointer, for interrupts), 10 R7 (the JSR link register). SR1MUX picks the
// register read on port SR1: 00 IR[11:9], 01 IR[8:6], 10 R6. Port SR2 reads IR[2:0].
// A write of the system bus happens on LD_Reg at the rising clock edge; reads are
// combinational. Select encodings follow the register-file drawing; the SR2 port, the
// 11 selects (treated as 00) and the synchronous reset of all registers to zero are
// this design's choices.
module lc3_regfile
  import lc3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_reg,
  input  drmux_e      drmux,
  input  sr1mux_e     sr1mux,
  input  logic [11:9] ir11_9,
  input  logic [8:6]  ir8_6,
  input  logic [2:0]  ir2_0,
  input  logic [15:0] sys_bus,
  output logic [15:0] sr1_out,
  output logic [15:0] sr2_out
);
  logic [15:0] regs [8];
  logic [2:0]  dr, sr1;

  always_comb begin
    unique case (drmux)
      DR_R6:   dr = 3'b110;
      DR_R7:   dr = 3'b111;
      default: dr = ir11_9;
    endcase
    unique case (sr1mux)
      SR1_IR8_6: sr1 = ir8_6;
      SR1_R6:    sr1 = 3'b110;
      default:   sr1 = ir11_9;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= sys_bus;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[ir2_0];
endmodule
