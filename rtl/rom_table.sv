// rom_table: a read-only memory used as a combinational function.
//
// A k-bit input is the address of one of 2^k fixed words of n bits; the word at that
// address is the output. Any truth table of k inputs and n outputs is implemented this
// way by writing its output column into the table. The default is the 3-input,
// 1-output example f(A,B,C) with A as the most significant address bit; its first five
// rows (0,1,0,1,1) are given, rows 5-7 are not and are set to 0 here.
// Combinational.
module rom_table #(
  parameter int unsigned K = 3,
  parameter int unsigned N = 1,
  parameter logic [(2**K)*N-1:0] CONTENTS = 8'b0001_1010  // word a at bits [a*N +: N]
) (
  input  logic [K-1:0] addr,
  output logic [N-1:0] out
);
  assign out = CONTENTS[addr*N +: N];
endmodule
