// tb_rom_fsm: drives the two-state example with random input and compares state and
// output with the state diagram: IN = 0 keeps the state, IN = 1 toggles it, and the
// output equals the state (0 in state 0, 1 in state 1). One state change per clock.
module tb_rom_fsm;
  logic clk = 0, rst = 1, in = 0, state, out, ref_state;
  int   checks = 0, failures = 0, toggles = 0;

  rom_fsm dut (.clk, .rst, .in, .state, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1; rst = 0; ref_state = 0;
    for (int t = 0; t < 1000; t++) begin
      in = 1'($urandom);
      @(posedge clk); #1;
      if (in) begin ref_state = ~ref_state; toggles++; end
      checks++;
      if (state !== ref_state || out !== ref_state) begin
        failures++;
        $display("FAIL t=%0d in=%b state=%b out=%b expected %b", t, in, state, out, ref_state);
      end
    end
    checks++; if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
