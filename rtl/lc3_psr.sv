// lc3_psr: the processor status register and the branch-enable bit.
//
// PSR[15] is the privilege bit (0 supervisor, 1 user), PSR[10:8] the running priority
// and PSR[2:0] the condition codes N, Z, P. With PSRMUX = 0 each part loads on its own
// signal: LD_Priv writes Set_Priv into PSR[15] (states 13, 15, 44, 49 clear it),
// LD_Priority writes the interrupt's priority into PSR[10:8] (state 49), and LD_CC sets
// N/Z/P from the value on the bus (negative, zero, positive). With PSRMUX = 1 the same
// load signals take the fields from the bus word instead (RTI, state 42, PSR <= MDR).
// In decode state 32, LD_BEN stores BEN = OR(IR[11:9] & {N,Z,P}).
// All registers load at the rising clock edge. The PSR bit positions and the BEN rule
// come from the state diagram; the PSRMUX mechanism and the reset value (supervisor,
// priority 0, Z set) are this design's choices.
module lc3_psr
  import lc3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] sys_bus,
  input  logic        psrmux,
  input  logic        ld_priv,
  input  logic        set_priv,
  input  logic        ld_priority,
  input  logic [2:0]  int_priority,
  input  logic        ld_cc,
  input  logic        ld_ben,
  input  logic [11:9] ir11_9,
  output logic [15:0] psr,
  output logic        ben
);
  logic       priv;
  logic [2:0] prio;
  logic [2:0] nzp;
  logic [2:0] nzp_bus;

  // CC logic: sign and zero test of the bus.
  always_comb begin
    if (sys_bus[15])          nzp_bus = 3'b100;
    else if (sys_bus == '0)   nzp_bus = 3'b010;
    else                      nzp_bus = 3'b001;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      priv <= 1'b0;
      prio <= 3'd0;
      nzp  <= 3'b010;
      ben  <= 1'b0;
    end else begin
      if (ld_priv)     priv <= psrmux ? sys_bus[15]   : set_priv;
      if (ld_priority) prio <= psrmux ? sys_bus[10:8] : int_priority;
      if (ld_cc)       nzp  <= psrmux ? sys_bus[2:0]  : nzp_bus;
      if (ld_ben)      ben  <= |(ir11_9 & nzp);
    end
  end

  assign psr = {priv, 4'b0000, prio, 5'b00000, nzp};
endmodule
