// lc3_int_priority: interrupt priority comparator.
//
// A device's interrupt request reaches the micro-sequencer as INT only when the
// device's 3-bit priority is strictly greater than the running program's priority,
// PSR[10:8]. Because entering an interrupt sets PSR[10:8] to the device's priority, a
// second request at the same or a lower level is held off until the handler returns.
// Combinational.
module lc3_int_priority (
  input  logic       int_req,       // device requests an interrupt
  input  logic [2:0] int_priority,  // priority of the request
  input  logic [2:0] psr_priority,  // PSR[10:8]
  output logic       int_o          // INT to the micro-sequencer
);
  assign int_o = int_req & (int_priority > psr_priority);
endmodule
