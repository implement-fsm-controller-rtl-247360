// tb_lc3_mem_protect: checks the reset page map (x0000-x2FFF and xF000-xFFFF
// supervisor only, x3000-xEFFF user), loading of the MPR, and that an access violation
// is flagged exactly for a user-mode memory access to a page whose MPR bit is 0.
module tb_lc3_mem_protect;
  logic        clk = 0, rst = 1, ld_mpr = 0, psr15 = 0, mio_en = 0, av;
  logic [15:0] mpr_in = '0, mpr, addr = '0, ref_mpr;
  int          checks = 0, failures = 0, violations = 0;

  lc3_mem_protect dut (.clk, .rst, .ld_mpr, .mpr_in, .mar_page(addr[15:12]), .psr15,
                       .mio_en, .mpr, .av);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_av(input logic exp);
    #1;
    checks++;
    if (av !== exp) begin
      failures++;
      $display("FAIL addr=%h psr15=%b mio=%b mpr=%h av=%b expected %b",
               addr, psr15, mio_en, mpr, av, exp);
    end
    if (av) violations++;
  endtask

  initial begin
    @(posedge clk); #1; rst = 0;
    // reset map
    psr15 = 1; mio_en = 1;
    addr = 16'h0123; check_av(1);  // OS space
    addr = 16'h1FFF; check_av(1);
    addr = 16'h3000; check_av(0);  // user space
    addr = 16'hE000; check_av(0);
    addr = 16'hEFFF; check_av(0);
    addr = 16'hF000; check_av(1);  // OS space (device registers)
    psr15 = 0; addr = 16'hF000; check_av(0);  // supervisor may access
    psr15 = 1; mio_en = 0; check_av(0);       // no access, no violation
    // random MPR values
    ref_mpr = mpr;
    for (int t = 0; t < 1000; t++) begin
      if (t % 50 == 0) begin
        mpr_in = 16'($urandom); ld_mpr = 1;
        @(posedge clk); #1; ld_mpr = 0; ref_mpr = mpr_in;
        checks++; if (mpr !== ref_mpr) failures++;
      end
      addr   = 16'($urandom);
      psr15  = 1'($urandom);
      mio_en = 1'($urandom);
      check_av(psr15 && mio_en && !ref_mpr[addr[15:12]]);
    end
    checks++;
    if (violations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
