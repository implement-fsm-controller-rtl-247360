// rom_fsm: a Moore finite-state machine whose next-state and output functions are both
// held in one ROM.
//
// The ROM address is {current state, IN} (J + I bits). Each word holds the J-bit next
// state and the N-bit output; both are captured in one register at the rising clock
// edge, so the output belongs to the state just entered (Moore). The register's state
// part feeds back to the address. Defaults are the one-input, two-state example:
// rows 00, 01, 10, 11 of {state, IN} hold {next, out} = 00, 11, 11, 00, so IN = 1
// toggles the state and the output equals the state.
// Synchronous reset to state 0 with output 0 is this design's choice.
module rom_fsm #(
  parameter int unsigned I = 1,  // input bits
  parameter int unsigned J = 1,  // state bits
  parameter int unsigned N = 1,  // output bits
  // word a = {next state, output} at bits [a*(J+N) +: J+N], a = {state, IN}
  parameter logic [(2**(I+J))*(J+N)-1:0] CONTENTS = 8'b00_11_11_00
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [I-1:0] in,
  output logic [J-1:0] state,
  output logic [N-1:0] out
);
  logic [J+N-1:0] word;

  rom_table #(.K(I + J), .N(J + N), .CONTENTS(CONTENTS)) u_rom (
    .addr({state, in}),
    .out (word)
  );

  always_ff @(posedge clk) begin
    if (rst) {state, out} <= '0;
    else     {state, out} <= word;
  end
endmodule
