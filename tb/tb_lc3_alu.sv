// tb_lc3_alu: random operands for ADD, AND, NOT and PASS, with register and
// sign-extended immediate second operands, compared with arithmetic done in the bench.
module tb_lc3_alu;
  import lc3_pkg::*;

  aluk_e       aluk;
  logic [15:0] a, sr2, y, b, exp_y;
  logic [5:0]  ir5_0;
  int          checks = 0, failures = 0;

  lc3_alu dut (.aluk, .a, .sr2, .ir5_0, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      aluk  = aluk_e'(t % 4);
      a     = 16'($urandom);
      sr2   = 16'($urandom);
      ir5_0 = 6'($urandom);
      b     = ir5_0[5] ? 16'(signed'(ir5_0[4:0])) : sr2;
      case (t % 4)
        0: exp_y = a + b;
        1: exp_y = a & b;
        2: exp_y = a ^ 16'hFFFF;
        default: exp_y = a;
      endcase
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL aluk=%0d a=%h sr2=%h ir=%b y=%h expected %h", t % 4, a, sr2, ir5_0, y, exp_y);
      end
    end
    // ADD R?, R?, #-1 on 0 gives xFFFF
    aluk = ALU_ADD; a = 16'h0000; ir5_0 = 6'b111111; #1;
    checks++; if (y !== 16'hFFFF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
