// tb_lc3_useq2: walks the two-way-branching micro-sequencer through the documented state graph.
// Each step sets the condition inputs, clocks once and compares the new state with the
// state number given for that transition: fetch (18, 33 with memory waits, 35), decode
// 32 for all 16 opcodes, BR taken and not taken, the interrupt chain
// 18-49-45-37-41-43-47-48-50-52-54-18, the exception entries 13 and 44, the modified
// TRAP state 15, and RTI returning to supervisor (51) or user (59) mode.
module tb_lc3_useq2;
  import lc3_pkg::*;

  logic         clk = 0, rst = 1;
  logic [15:12] ir_op = '0;
  logic         ir11 = 0, int_i = 0, psr15 = 0, ben = 0, r = 0;
  state_t       state;
  ctrl_t        ctrl;
  int           checks = 0, failures = 0, cycles = 0;

  lc3_useq2 dut (.clk, .rst, .ir_op, .ir11, .int_i, .psr15, .ben, .r, .state, .ctrl);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Set the inputs {op, ir11, int, psr15, ben, r}, take one clock and check the state.
  task automatic step(input logic [3:0] op, input logic [4:0] in, input int exp);
    ir_op = op;
    {ir11, int_i, psr15, ben, r} = in;
    @(posedge clk); #1;
    checks++;
    if (state !== state_t'(exp)) begin
      failures++;
      $display("FAIL t=%0t state=%0d expected %0d", $time, state, exp);
    end
  endtask

  // inputs: {ir11, int, psr15, ben, r}
  localparam logic [4:0] NONE = 5'b00000, RDY = 5'b00001, BEN = 5'b00010,
                         PRIV = 5'b00100, INT = 5'b01000, I11 = 5'b10000;

  task automatic fetch_decode(input logic [3:0] op);
    step(op, NONE, 33);   // 18 -> 33 (no interrupt)
    step(op, NONE, 33);   // memory not ready: stay
    step(op, NONE, 33);
    step(op, RDY, 35);    // ready
    step(op, NONE, 32);   // 35 -> 32
    step(op, NONE, int'(op));  // IRD: {00, IR[15:12]}
  endtask

  initial begin
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (state !== 6'd18) begin failures++; $display("FAIL reset state %0d", state); end
    // ADD: 32 -> 1 -> 18 (the worked decode example)
    fetch_decode(4'b0001); step(4'b0001, NONE, 18);
    // BR not taken, taken
    fetch_decode(4'b0000); step(4'b0000, NONE, 18);
    fetch_decode(4'b0000); step(4'b0000, BEN, 22); step(4'b0000, NONE, 18);
    // JSR (IR[11] = 1) and JSRR
    fetch_decode(4'b0100); step(4'b0100, I11, 21); step(4'b0100, NONE, 18);
    fetch_decode(4'b0100); step(4'b0100, NONE, 20); step(4'b0100, NONE, 18);
    // LDI: 10 -> 24 -> 26 -> 25 -> 27 -> 18
    fetch_decode(4'b1010); step(4'b1010, NONE, 24); step(4'b1010, NONE, 24);
    step(4'b1010, RDY, 26); step(4'b1010, NONE, 25); step(4'b1010, RDY, 27);
    step(4'b1010, NONE, 18);
    // STI: 11 -> 29 -> 31 -> 23 -> 16 -> 18
    fetch_decode(4'b1011); step(4'b1011, NONE, 29); step(4'b1011, RDY, 31);
    step(4'b1011, NONE, 23); step(4'b1011, NONE, 16); step(4'b1011, NONE, 16);
    step(4'b1011, RDY, 18);
    // remaining opcodes reach their first state and return to fetch
    fetch_decode(4'b0010); step(4'b0010, RDY, 25); step(4'b0010, RDY, 27); step(4'b0010, NONE, 18);
    fetch_decode(4'b0110); step(4'b0110, NONE, 25); step(4'b0110, RDY, 27); step(4'b0110, NONE, 18);
    fetch_decode(4'b0011); step(4'b0011, NONE, 23); step(4'b0011, NONE, 16); step(4'b0011, RDY, 18);
    fetch_decode(4'b0111); step(4'b0111, NONE, 23); step(4'b0111, RDY, 16); step(4'b0111, RDY, 18);
    fetch_decode(4'b0101); step(4'b0101, NONE, 18);
    fetch_decode(4'b1001); step(4'b1001, NONE, 18);
    fetch_decode(4'b1100); step(4'b1100, NONE, 18);
    fetch_decode(4'b1110);
    // (state is now 14, LEA) -> 18
    step(4'b1110, NONE, 18);
    // interrupt while in user mode: 18 -> 49 -> 45 -> 37 -> 41 -> 43 -> 47 -> 48 -> 50
    // -> 52 -> 54 -> 18
    step(4'b0000, INT | PRIV, 49);
    step(4'b0000, PRIV, 45);
    step(4'b0000, NONE, 37);
    step(4'b0000, NONE, 41); step(4'b0000, NONE, 41); step(4'b0000, RDY, 43);
    step(4'b0000, NONE, 47); step(4'b0000, NONE, 48); step(4'b0000, RDY, 50);
    step(4'b0000, NONE, 52); step(4'b0000, RDY, 54); step(4'b0000, NONE, 18);
    // interrupt in supervisor mode skips the stack switch: 49 -> 37
    step(4'b0000, INT, 49); step(4'b0000, NONE, 37);
    step(4'b0000, RDY, 41); step(4'b0000, RDY, 43);
    step(4'b0000, NONE, 47); step(4'b0000, NONE, 48); step(4'b0000, RDY, 50);
    step(4'b0000, NONE, 52); step(4'b0000, RDY, 54); step(4'b0000, NONE, 18);
    // opcode exception (1101) in user mode: 13 -> 45
    fetch_decode(4'b1101); step(4'b1101, PRIV, 45); step(4'b1101, NONE, 37);
    step(4'b0000, NONE, 41); step(4'b0000, RDY, 43);
    step(4'b0000, NONE, 47); step(4'b0000, NONE, 48); step(4'b0000, RDY, 50);
    step(4'b0000, NONE, 52); step(4'b0000, RDY, 54); step(4'b0000, NONE, 18);
    // TRAP (modified): 15 -> 45 in user mode, 15 -> 37 in supervisor mode
    fetch_decode(4'b1111); step(4'b1111, PRIV, 45);
    step(4'b1111, NONE, 37);
    step(4'b1111, NONE, 41); step(4'b1111, RDY, 43);
    step(4'b1111, NONE, 47); step(4'b1111, NONE, 48); step(4'b1111, RDY, 50);
    step(4'b1111, NONE, 52); step(4'b1111, RDY, 54); step(4'b1111, NONE, 18);
    fetch_decode(4'b1111); step(4'b1111, NONE, 37);
    step(4'b1111, RDY, 41); step(4'b1111, RDY, 43);
    step(4'b1111, NONE, 47); step(4'b1111, RDY, 48); step(4'b1111, RDY, 50);
    step(4'b1111, NONE, 52); step(4'b1111, RDY, 54); step(4'b1111, NONE, 18);
    // RTI in user mode: privilege exception 8 -> 44 -> 45 -> 37
    fetch_decode(4'b1000); step(4'b1000, PRIV, 44); step(4'b1000, PRIV, 45);
    step(4'b1000, NONE, 37);
    // finish that chain
    step(4'b0000, RDY, 41); step(4'b0000, RDY, 43);
    step(4'b0000, NONE, 47); step(4'b0000, RDY, 48); step(4'b0000, RDY, 50);
    step(4'b0000, NONE, 52); step(4'b0000, RDY, 54); step(4'b0000, NONE, 18);
    // RTI in supervisor mode returning to user: 8-36-38-39-40-42-34-59-18
    fetch_decode(4'b1000); step(4'b1000, NONE, 36); step(4'b1000, RDY, 38);
    step(4'b1000, NONE, 39); step(4'b1000, NONE, 40); step(4'b1000, RDY, 42);
    step(4'b1000, NONE, 34); step(4'b1000, PRIV, 59); step(4'b1000, NONE, 18);
    // RTI staying in supervisor mode: 34 -> 51 -> 18
    fetch_decode(4'b1000); step(4'b1000, NONE, 36); step(4'b1000, RDY, 38);
    step(4'b1000, NONE, 39); step(4'b1000, RDY, 40); step(4'b1000, RDY, 42);
    step(4'b1000, NONE, 34); step(4'b1000, NONE, 51); step(4'b1000, NONE, 18);
    // control word follows the state: fetch loads MAR and PC
    checks++;
    if (!(ctrl.ld_mar && ctrl.ld_pc && ctrl.gate_pc)) begin
      failures++; $display("FAIL control word in state 18");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
