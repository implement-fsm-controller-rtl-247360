// lc3_mem_protect: page-based memory protection.
//
// The 64K-word address space is cut into 16 pages of 4K words, numbered by the top four
// address bits. The 16-bit Memory Protection Register (MPR) holds one bit per page:
// 0 = supervisor only, 1 = user or supervisor. MAR[15:12] selects one MPR bit; an
// access violation (AV) is flagged when that bit is 0, the processor is in user mode
// (PSR[15] = 1) and a memory access is under way (MIO_EN = 1). AV is meant for the
// micro-sequencer, which would branch to an access-violation exception.
// The MPR loads from the bus on LD_MPR at the rising clock edge; how it is loaded is
// this design's choice. Its reset value, parameter MPR_RESET, makes pages 0-2 and 15
// supervisor-only and pages 3-14 user pages, following the page map example (pages 2
// and 4-13 are this design's reading of that example).
// AV is combinational from MAR, PSR[15], MIO_EN and the MPR.
module lc3_mem_protect #(
  parameter logic [15:0] MPR_RESET = 16'h7FF8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_mpr,
  input  logic [15:0] mpr_in,
  input  logic [3:0]  mar_page,  // MAR[15:12]
  input  logic        psr15,   // 1 = user mode
  input  logic        mio_en,
  output logic [15:0] mpr,
  output logic        av       // access violation
);
  logic page_ok;

  always_ff @(posedge clk) begin
    if (rst)         mpr <= MPR_RESET;
    else if (ld_mpr) mpr <= mpr_in;
  end

  assign page_ok = mpr[mar_page];
  assign av      = psr15 & ~page_ok & mio_en;
endmodule
