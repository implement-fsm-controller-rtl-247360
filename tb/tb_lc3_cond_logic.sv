// tb_lc3_cond_logic: exhaustive check of the micro-branch function.
// Every COND code, every combination of the five condition inputs and random JUMP
// values (with and without the branch bit already set) are applied; the expected next
// state is worked out from a separate table of which JUMP bit each code may set.
module tb_lc3_cond_logic;
  import lc3_pkg::*;

  cond_e  cond;
  state_t j, next;
  logic   int_i, psr15, ben, r, ir11;
  int     checks = 0, failures = 0;

  lc3_cond_logic dut (.cond, .j, .int_i, .psr15, .ben, .r, .ir11, .next);

  function automatic state_t model(logic [2:0] c, state_t jj, logic [4:0] in);
    // in = {int, psr15, ben, r, ir11}
    state_t n = jj;
    case (c)
      3'd1: if (in[1]) n[1] = 1'b1;  // R
      3'd2: if (in[2]) n[2] = 1'b1;  // BEN
      3'd3: if (in[0]) n[0] = 1'b1;  // IR[11]
      3'd4: if (in[3]) n[3] = 1'b1;  // PSR[15]
      3'd5: if (in[4]) n[4] = 1'b1;  // INT
      default: ;
    endcase
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int in = 0; in < 32; in++) begin
        for (int t = 0; t < 8; t++) begin
          cond = cond_e'(c);
          j    = (t == 0) ? 6'd18 : (t == 1) ? 6'd33 : state_t'($urandom);
          {int_i, psr15, ben, r, ir11} = 5'(in);
          #1;
          checks++;
          if (next !== model(3'(c), j, 5'(in))) begin
            failures++;
            $display("FAIL cond=%0d in=%b j=%0d next=%0d exp=%0d", c, in[4:0], j, next,
                     model(3'(c), j, 5'(in)));
          end
        end
      end
    end
    // Documented pairs: BR 18/22, fetch 33/49 on INT, RTI 36/44 on PSR[15].
    cond = COND_BEN;   j = 6'd18; {int_i, psr15, ben, r, ir11} = 5'b00100; #1;
    checks++; if (next !== 6'd22) failures++;
    cond = COND_INT;   j = 6'd33; {int_i, psr15, ben, r, ir11} = 5'b10000; #1;
    checks++; if (next !== 6'd49) failures++;
    cond = COND_PSR15; j = 6'd36; {int_i, psr15, ben, r, ir11} = 5'b01000; #1;
    checks++; if (next !== 6'd44) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
