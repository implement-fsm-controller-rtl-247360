// tb_lc3_regfile: random writes and reads against a reference array, covering every
// DRMUX choice (IR[11:9], R6, R7) and every SR1MUX choice (IR[11:9], IR[8:6], R6).
module tb_lc3_regfile;
  import lc3_pkg::*;

  logic        clk = 0, rst = 1, ld_reg = 0;
  drmux_e      drmux = DR_IR11_9;
  sr1mux_e     sr1mux = SR1_IR11_9;
  logic [15:0] ir = '0, sys_bus = '0, sr1_out, sr2_out;
  logic [15:0] ref_regs [8];
  int          checks = 0, failures = 0;
  logic [2:0]  dr, s1;

  lc3_regfile dut (.clk, .rst, .ld_reg, .drmux, .sr1mux, .ir11_9(ir[11:9]),
                   .ir8_6(ir[8:6]), .ir2_0(ir[2:0]), .sys_bus, .sr1_out, .sr2_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) ref_regs[i] = '0;
    @(posedge clk); #1; rst = 0;
    for (int t = 0; t < 3000; t++) begin
      ir      = 16'($urandom);
      drmux   = drmux_e'($urandom_range(0, 2));
      sr1mux  = sr1mux_e'($urandom_range(0, 2));
      sys_bus = 16'($urandom);
      ld_reg  = 1'($urandom);
      dr = (drmux == DR_R6) ? 3'd6 : (drmux == DR_R7) ? 3'd7 : ir[11:9];
      s1 = (sr1mux == SR1_R6) ? 3'd6 : (sr1mux == SR1_IR8_6) ? ir[8:6] : ir[11:9];
      #1;
      checks++;
      if (sr1_out !== ref_regs[s1] || sr2_out !== ref_regs[ir[2:0]]) begin
        failures++;
        $display("FAIL read sr1=%0d sr2=%0d: %h %h expected %h %h", s1, ir[2:0],
                 sr1_out, sr2_out, ref_regs[s1], ref_regs[ir[2:0]]);
      end
      @(posedge clk); #1;
      if (ld_reg) ref_regs[dr] = sys_bus;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
