// tb_lc3_ustore: reads control-store rows and compares them with the register
// transfers and branches listed for each state: fetch, decode, BR, ADD, TRAP (15), the
// exception and interrupt entries (13, 44, 49), the stack pushes and RTI, plus the
// rule that no state other than an opcode's first state has the prefix 00 as a target
// of IRD.
module tb_lc3_ustore;
  import lc3_pkg::*;

  state_t  addr;
  uinstr_t row;
  int      checks = 0, failures = 0;

  lc3_ustore dut (.addr, .row);

  task automatic expect_next(input state_t s, input logic ird, input logic [2:0] cond,
                             input state_t j);
    addr = s; #1;
    checks++;
    if (row.ird !== ird || row.cond !== cond || row.j !== j) begin
      failures++;
      $display("FAIL state %0d: ird=%b cond=%0d j=%0d, expected %b %0d %0d",
               s, row.ird, row.cond, row.j, ird, cond, j);
    end
  endtask

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL state %0d: %s=%b expected %b", addr, what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // next-state fields (cond codes: 1 R, 2 BEN, 3 IR11, 4 PSR15, 5 INT)
    expect_next(6'd18, 0, 3'd5, 6'd33);
    expect_next(6'd33, 0, 3'd1, 6'd33);
    expect_next(6'd35, 0, 3'd0, 6'd32);
    expect_next(6'd32, 1, 3'd0, 6'd0);
    expect_next(6'd0,  0, 3'd2, 6'd18);
    expect_next(6'd1,  0, 3'd0, 6'd18);
    expect_next(6'd15, 0, 3'd4, 6'd37);
    expect_next(6'd13, 0, 3'd4, 6'd37);
    expect_next(6'd49, 0, 3'd4, 6'd37);
    expect_next(6'd44, 0, 3'd0, 6'd45);
    expect_next(6'd45, 0, 3'd0, 6'd37);
    expect_next(6'd8,  0, 3'd4, 6'd36);
    expect_next(6'd34, 0, 3'd4, 6'd51);
    expect_next(6'd59, 0, 3'd0, 6'd18);
    expect_next(6'd51, 0, 3'd0, 6'd18);
    expect_next(6'd54, 0, 3'd0, 6'd18);
    expect_next(6'd50, 0, 3'd0, 6'd52);
    // state 18: MAR <= PC, PC <= PC+1
    addr = 6'd18; #1;
    expect_bit("ld_mar", row.ctrl.ld_mar, 1);
    expect_bit("ld_pc", row.ctrl.ld_pc, 1);
    expect_bit("gate_pc", row.ctrl.gate_pc, 1);
    expect_bit("pcmux=PC+1", row.ctrl.pcmux == PC_PLUS1, 1);
    // state 1 (ADD): LD_Reg, LD_CC, DRMUX 00, SR1MUX 01
    addr = 6'd1; #1;
    expect_bit("ld_reg", row.ctrl.ld_reg, 1);
    expect_bit("ld_cc", row.ctrl.ld_cc, 1);
    expect_bit("drmux=00", row.ctrl.drmux == 2'b00, 1);
    expect_bit("sr1mux=01", row.ctrl.sr1mux == 2'b01, 1);
    expect_bit("gate_alu", row.ctrl.gate_alu, 1);
    expect_bit("aluk=add", row.ctrl.aluk == ALU_ADD, 1);
    // state 15: Vector <= bus <= MARMUX(ZEXT), MDR <= PSR, PSR[15] <= 0
    addr = 6'd15; #1;
    expect_bit("ld_vector", row.ctrl.ld_vector, 1);
    expect_bit("gate_marmux", row.ctrl.gate_marmux, 1);
    expect_bit("marmux=zext", row.ctrl.marmux, 0);
    expect_bit("ld_mdr", row.ctrl.ld_mdr, 1);
    expect_bit("ld_priv", row.ctrl.ld_priv, 1);
    expect_bit("set_priv", row.ctrl.set_priv, 0);
    // states 13, 44, 49: vector selects
    addr = 6'd13; #1; expect_bit("vecmux=opc", row.ctrl.vectormux == 2'b10, 1);
    expect_bit("ld_vector", row.ctrl.ld_vector, 1);
    addr = 6'd44; #1; expect_bit("vecmux=priv", row.ctrl.vectormux == 2'b01, 1);
    addr = 6'd49; #1; expect_bit("vecmux=intv", row.ctrl.vectormux == 2'b00, 1);
    expect_bit("ld_priority", row.ctrl.ld_priority, 1);
    // 45: Saved_USP <= SP, SP <= Saved_SSP
    addr = 6'd45; #1; expect_bit("ld_saved_usp", row.ctrl.ld_saved_usp, 1);
    expect_bit("spmux=ssp", row.ctrl.spmux == SP_SSP, 1);
    expect_bit("drmux=R6", row.ctrl.drmux == DR_R6, 1);
    // 50: MAR <= Vector
    addr = 6'd50; #1; expect_bit("gate_vector", row.ctrl.gate_vector, 1);
    expect_bit("ld_mar", row.ctrl.ld_mar, 1);
    // 41 and 48 write memory, 33 reads it
    addr = 6'd41; #1; expect_bit("r_w", row.ctrl.r_w, 1); expect_bit("mio_en", row.ctrl.mio_en, 1);
    addr = 6'd33; #1; expect_bit("r_w", row.ctrl.r_w, 0); expect_bit("mio_en", row.ctrl.mio_en, 1);
    // 32: LD_BEN
    addr = 6'd32; #1; expect_bit("ld_ben", row.ctrl.ld_ben, 1);
    // No row other than 32 uses IRD, and no JUMP field targets a 00xxxx state other
    // than state 0 (the BR return 18 is 010010).
    for (int s = 0; s < 64; s++) begin
      addr = state_t'(s); #1;
      checks++;
      if (row.ird !== (s == 32)) begin
        failures++; $display("FAIL state %0d ird=%b", s, row.ird);
      end
      checks++;
      if (!row.ird && row.j[5:4] == 2'b00) begin
        failures++; $display("FAIL state %0d jumps to %0d", s, row.j);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
