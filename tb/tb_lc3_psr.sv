// tb_lc3_psr: checks the condition codes set from the bus, BEN = OR(IR[11:9] & NZP),
// clearing and setting the privilege bit, loading the priority, and loading the whole
// PSR from the bus as RTI does, against a reference model kept in the bench.
module tb_lc3_psr;
  logic        clk = 0, rst = 1;
  logic [15:0] sys_bus = '0, psr;
  logic        psrmux = 0, ld_priv = 0, set_priv = 0, ld_priority = 0, ld_cc = 0, ld_ben = 0;
  logic [2:0]  int_priority = '0;
  logic [11:9] ir11_9 = '0;
  logic        ben;
  logic        r_priv, r_ben;
  logic [2:0]  r_prio, r_nzp;
  int          checks = 0, failures = 0;

  lc3_psr dut (.clk, .rst, .sys_bus, .psrmux, .ld_priv, .set_priv, .ld_priority,
               .int_priority, .ld_cc, .ld_ben, .ir11_9, .psr, .ben);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1; rst = 0;
    r_priv = 0; r_prio = 0; r_nzp = 3'b010; r_ben = 0;
    checks++; if (psr !== 16'h0002) begin failures++; $display("FAIL reset psr %h", psr); end
    for (int t = 0; t < 4000; t++) begin
      sys_bus      = (t % 7 == 0) ? 16'h0000 : 16'($urandom);
      psrmux       = ($urandom_range(0, 5) == 0);
      ld_priv      = 1'($urandom);
      set_priv     = 1'($urandom);
      ld_priority  = 1'($urandom);
      int_priority = 3'($urandom);
      ld_cc        = 1'($urandom);
      ld_ben       = 1'($urandom);
      ir11_9       = 3'($urandom);
      @(posedge clk); #1;
      if (ld_ben)      r_ben  = ((ir11_9 & r_nzp) != 0);
      if (ld_priv)     r_priv = psrmux ? sys_bus[15] : set_priv;
      if (ld_priority) r_prio = psrmux ? sys_bus[10:8] : int_priority;
      if (ld_cc)       r_nzp  = psrmux ? sys_bus[2:0] :
                                ($signed(sys_bus) < 0) ? 3'b100 :
                                (sys_bus == 0) ? 3'b010 : 3'b001;
      checks++;
      if (psr !== {r_priv, 4'b0, r_prio, 5'b0, r_nzp} || ben !== r_ben) begin
        failures++;
        $display("FAIL t=%0d psr=%h ben=%b expected %h %b", t, psr, ben,
                 {r_priv, 4'b0, r_prio, 5'b0, r_nzp}, r_ben);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
