// tb_rom_table: checks the default table against the given rows of f(A,B,C)
// (000->0, 001->1, 010->0, 011->1, 100->1) and a 4-input, 3-output table filled with
// random words, read back at every address.
module tb_rom_table;
  localparam logic [47:0] T2 = 48'h9E37_79B9_7F4A;
  logic [2:0] abc;
  logic       f;
  logic [3:0] a2;
  logic [2:0] o2;
  int         checks = 0, failures = 0;
  logic [4:0] given = 5'b11010;  // rows 4..0

  rom_table dut (.addr(abc), .out(f));
  rom_table #(.K(4), .N(3), .CONTENTS(T2)) dut2 (.addr(a2), .out(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      abc = 3'(i); #1;
      checks++;
      if (f !== given[i]) begin failures++; $display("FAIL f(%b)=%b", abc, f); end
    end
    for (int i = 0; i < 16; i++) begin
      a2 = 4'(i); #1;
      checks++;
      if (o2 !== T2[3*i +: 3]) begin failures++; $display("FAIL row %0d = %b", i, o2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
