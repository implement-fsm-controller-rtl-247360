// tb_lc3_vector_reg: checks the Vector register's sources. With LD_Vector in a state
// other than 15 it must load x01 followed by INTV, x00 (privilege) or x01 (opcode);
// in state 15 it must load the whole system bus; without LD_Vector it must hold.
module tb_lc3_vector_reg;
  import lc3_pkg::*;

  logic        clk = 0, rst = 1, ld_vector = 0, is_state15;
  vecmux_e     vectormux = VEC_INTV;
  logic [7:0]  intv = '0;
  logic [15:0] sys_bus = '0, vector, exp_v;
  state_t      state = '0;
  int          checks = 0, failures = 0;

  lc3_vector_reg dut (.clk, .rst, .ld_vector, .vectormux, .intv, .sys_bus, .state,
                      .is_state15, .vector);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1; rst = 0;
    checks++; if (vector !== 16'h0000) failures++;
    exp_v = 16'h0000;
    for (int t = 0; t < 2000; t++) begin
      vectormux = vecmux_e'($urandom_range(0, 3));
      intv      = 8'($urandom);
      sys_bus   = 16'($urandom);
      state     = (t % 5 == 0) ? 6'd15 : state_t'($urandom);
      ld_vector = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (is_state15 !== (state == 6'd15)) begin
        failures++; $display("FAIL isState15 for state %0d", state);
      end
      if (ld_vector) begin
        if (state == 6'd15)                exp_v = sys_bus;
        else if (vectormux == VEC_INTV)    exp_v = {8'h01, intv};
        else if (vectormux == VEC_PRIV)    exp_v = 16'h0100;
        else if (vectormux == VEC_OPC)     exp_v = 16'h0101;
        else                               exp_v = 16'h0100;
      end
      @(posedge clk); #1;
      checks++;
      if (vector !== exp_v) begin
        failures++;
        $display("FAIL t=%0d state=%0d mux=%0d ld=%b vector=%h expected %h",
                 t, state, vectormux, ld_vector, vector, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
