// tb_lc3_int_priority: exhaustive check that INT is raised only for a request whose
// priority is strictly above PSR[10:8].
module tb_lc3_int_priority;
  logic       int_req, int_o;
  logic [2:0] int_priority, psr_priority;
  int         checks = 0, failures = 0;

  lc3_int_priority dut (.int_req, .int_priority, .psr_priority, .int_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rq = 0; rq < 2; rq++)
      for (int ip = 0; ip < 8; ip++)
        for (int pp = 0; pp < 8; pp++) begin
          int_req = 1'(rq); int_priority = 3'(ip); psr_priority = 3'(pp);
          #1;
          checks++;
          if (int_o !== (rq == 1 && ip > pp)) begin
            failures++;
            $display("FAIL req=%0d ip=%0d pp=%0d int=%b", rq, ip, pp, int_o);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
