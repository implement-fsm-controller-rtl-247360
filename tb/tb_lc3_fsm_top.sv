// tb_lc3_fsm_top: end-to-end run of the control unit on a small LC3 program.
//
// The bench models what the design leaves outside: the PC with its PCMUX, the MDR,
// 64K words of memory that answer after two wait cycles (memory ready R), the address
// adder, the stack-pointer adjust logic with the saved user and supervisor stack
// pointers, and an interrupting device. It drives bus_ext from the control word.
// The program boots in supervisor mode, returns with RTI first to supervisor code and
// then to a user program, which runs ADD/AND/NOT, BR taken and not taken, LD, LDR,
// LDI, ST, STR, STI, LEA, JSR, JSRR and JMP, then TRAP x25 (entered through state 15),
// an illegal opcode (1101), an RTI in user mode (privilege exception) and a load from
// a supervisor page (access violation), and finally loops until a priority-4 interrupt
// arrives. Each handler leaves a marker in memory; the results are compared with
// values worked out by hand. Every cycle the two-way-branching sequencer must be in
// the same state with the same control word, and each mechanism (memory wait, BR
// taken/not taken, JSR/JSRR, interrupt taken, interrupt held off by priority, TRAP
// via state 15, opcode and privilege exceptions, stack switch 45/59, RTI to
// supervisor 51, access violation) is counted and must occur. Inside the interrupt
// handler the running priority must read 111.
module tb_lc3_fsm_top;
  import lc3_pkg::*;

  logic        clk = 0, rst = 1;
  logic [15:0] bus_ext;
  logic        mem_ready;
  logic        int_req = 0;
  logic [2:0]  int_priority = 3'd4;
  logic [7:0]  intv = 8'h80;
  logic        ld_mpr = 0;
  state_t      state, state2;
  ctrl_t       ctrl, ctrl2;
  logic [15:0] sys_bus, sr1_out, ir, mar, psr, vector, mpr;
  logic        ben, int_o, is_state15, av;
  logic [2:0]  rom_abc = '0;
  logic        rom_f, fsm_in = 0, fsm_state, fsm_out;

  lc3_fsm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;

  // ---------------- environment: PC, MDR, memory, SP logic ----------------
  logic [15:0] mem [65536];
  logic [15:0] pc, mdr, usp, ssp, adder, off;
  int          wait_cnt;

  assign mem_ready = (wait_cnt == 2);

  always_comb begin
    unique case (ctrl.addr2mux)
      A2_ZERO:  off = 16'h0000;
      A2_OFF6:  off = {{10{ir[5]}}, ir[5:0]};
      A2_OFF9:  off = {{7{ir[8]}}, ir[8:0]};
      default:  off = {{5{ir[10]}}, ir[10:0]};
    endcase
    adder = (ctrl.addr1mux ? sr1_out : pc) + off;
    if (ctrl.gate_pc)                         bus_ext = pc;
    else if (ctrl.gate_mdr)                   bus_ext = mdr;
    else if (ctrl.gate_pc1)                   bus_ext = pc - 16'd1;
    else if (ctrl.gate_marmux && ctrl.marmux) bus_ext = adder;
    else if (ctrl.gate_sp) begin
      unique case (ctrl.spmux)
        SP_PLUS1:  bus_ext = sr1_out + 16'd1;
        SP_MINUS1: bus_ext = sr1_out - 16'd1;
        SP_SSP:    bus_ext = ssp;
        default:   bus_ext = usp;
      endcase
    end else                                  bus_ext = 16'h0000;
  end

  always @(posedge clk) begin
    if (rst) begin
      pc <= 16'h0200; mdr <= '0; usp <= 16'h4000; ssp <= '0; wait_cnt <= 0;
    end else begin
      if (ctrl.mio_en && !mem_ready) wait_cnt <= wait_cnt + 1;
      else                           wait_cnt <= 0;
      if (ctrl.ld_pc) begin
        unique case (ctrl.pcmux)
          PC_PLUS1: pc <= pc + 16'd1;
          PC_BUS:   pc <= sys_bus;
          default:  pc <= adder;
        endcase
      end
      if (ctrl.ld_mdr) begin
        if (ctrl.mio_en) begin
          if (mem_ready) mdr <= mem[mar];
        end else if (ctrl.gate_psr) mdr <= psr;  // MDR <= PSR path
        else                        mdr <= sys_bus;
      end
      if (ctrl.mio_en && ctrl.r_w && mem_ready) mem[mar] <= mdr;
      if (ctrl.ld_saved_usp) usp <= sr1_out;
      if (ctrl.ld_saved_ssp) ssp <= sr1_out;
    end
  end

  // ---------------- tiny assembler ----------------
  function automatic logic [15:0] op_rri(logic [3:0] op, int dr, int sr, int imm5);
    return {op, 3'(dr), 3'(sr), 1'b1, 5'(imm5)};
  endfunction
  function automatic logic [15:0] op_rrr(logic [3:0] op, int dr, int s1, int s2);
    return {op, 3'(dr), 3'(s1), 3'b000, 3'(s2)};
  endfunction
  function automatic logic [15:0] op_not(int dr, int sr);
    return {4'b1001, 3'(dr), 3'(sr), 6'b111111};
  endfunction
  function automatic logic [15:0] op_pc9(logic [3:0] op, int r, int at, int target);
    return {op, 3'(r), 9'(target - (at + 1))};
  endfunction
  function automatic logic [15:0] op_br(logic [2:0] nzp, int at, int target);
    return {4'b0000, nzp, 9'(target - (at + 1))};
  endfunction
  function automatic logic [15:0] op_base6(logic [3:0] op, int r, int base, int off6);
    return {op, 3'(r), 3'(base), 6'(off6)};
  endfunction
  function automatic logic [15:0] op_jsr(int at, int target);
    return {4'b0100, 1'b1, 11'(target - (at + 1))};
  endfunction
  function automatic logic [15:0] op_jsrr(int base);
    return {4'b0100, 3'b000, 3'(base), 6'b000000};
  endfunction
  function automatic logic [15:0] op_jmp(int base);
    return {4'b1100, 3'b000, 3'(base), 6'b000000};
  endfunction
  localparam logic [3:0] ADD = 4'b0001, AND = 4'b0101, LD = 4'b0010, ST = 4'b0011,
                         LDR = 4'b0110, STR = 4'b0111, LDI = 4'b1010, STI = 4'b1011,
                         LEA = 4'b1110;
  localparam logic [15:0] RTI = 16'h8000;

  task automatic handler(int at, int marker, int ptr_at, int ptr, logic fix_pc);
    mem[at]     = op_rri(AND, 0, 0, 0);
    mem[at + 1] = op_rri(ADD, 0, 0, marker);
    mem[at + 2] = op_pc9(STI, 0, at + 2, ptr_at);
    mem[ptr_at] = 16'(ptr);
    if (fix_pc) begin  // step the saved PC past the instruction that trapped
      mem[at + 3] = op_base6(LDR, 1, 6, 0);
      mem[at + 4] = op_rri(ADD, 1, 1, 1);
      mem[at + 5] = op_base6(STR, 1, 6, 0);
      mem[at + 6] = RTI;
    end else begin     // interrupt: acknowledge the device, then return
      mem[at + 3] = op_pc9(STI, 0, at + 3, ptr_at + 1);
      mem[ptr_at + 1] = 16'hFE00;
      mem[at + 4] = RTI;
    end
  endtask

  task automatic load_program();
    for (int a = 0; a < 65536; a++) mem[a] = '0;
    // boot (supervisor): R6 <= x2FEC, RTI to x0202 (supervisor), RTI to x3000 (user)
    mem['h0200] = op_pc9(LD, 6, 'h0200, 'h0210);
    mem['h0201] = RTI;
    mem['h0202] = RTI;
    mem['h0210] = 16'h2FEC;
    mem['h2FEC] = 16'h0202; mem['h2FED] = 16'h0000;
    mem['h2FEE] = 16'h3000; mem['h2FEF] = 16'h8002;
    // user program
    mem['h3000] = op_rri(AND, 0, 0, 0);
    mem['h3001] = op_rri(ADD, 0, 0, 7);
    mem['h3002] = op_rri(ADD, 1, 0, -3);
    mem['h3003] = op_rrr(ADD, 2, 0, 1);
    mem['h3004] = op_not(3, 2);
    mem['h3005] = op_pc9(ST, 2, 'h3005, 'h3040);
    mem['h3006] = op_br(3'b100, 'h3006, 'h3008);   // BRn, taken
    mem['h3007] = op_rri(ADD, 2, 2, 1);            // skipped
    mem['h3008] = op_br(3'b010, 'h3008, 'h300A);   // BRz, not taken
    mem['h3009] = op_pc9(LEA, 4, 'h3009, 'h3040);
    mem['h300A] = op_base6(STR, 3, 4, 1);
    mem['h300B] = op_base6(LDR, 5, 4, 0);
    mem['h300C] = op_pc9(LDI, 1, 'h300C, 'h3043);
    mem['h300D] = op_pc9(STI, 0, 'h300D, 'h3044);
    mem['h300E] = op_base6(STR, 5, 4, 12);
    mem['h300F] = op_base6(STR, 1, 4, 13);
    mem['h3010] = op_base6(STR, 2, 4, 11);
    mem['h3011] = op_jsr('h3011, 'h3030);
    mem['h3012] = 16'hF025;                        // TRAP x25
    mem['h3013] = 16'hD000;                        // opcode 1101
    mem['h3014] = RTI;                             // privileged in user mode
    mem['h3015] = op_pc9(LD, 1, 'h3015, 'h3045);
    mem['h3016] = op_base6(LDR, 2, 1, 0);          // reads x0200: access violation
    mem['h3017] = op_base6(STR, 2, 4, 14);
    mem['h3018] = op_pc9(LEA, 3, 'h3018, 'h3032);
    mem['h3019] = op_jsrr(3);
    mem['h301A] = op_br(3'b111, 'h301A, 'h301A);   // wait for the interrupt
    mem['h3030] = op_pc9(ST, 7, 'h3030, 'h3046);
    mem['h3031] = op_jmp(7);
    mem['h3032] = op_jmp(7);
    mem['h3043] = 16'h3041;
    mem['h3044] = 16'h3042;
    mem['h3045] = 16'h0200;
    // vector table and handlers
    mem['h0025] = 16'h0400; handler('h0400, 9,  'h0410, 'h3047, 1'b1);  // TRAP x25
    mem['h0101] = 16'h0420; handler('h0420, 10, 'h0430, 'h304A, 1'b1);  // opcode
    mem['h0100] = 16'h0440; handler('h0440, 13, 'h0450, 'h3048, 1'b1);  // privilege
    mem['h0180] = 16'h0480; handler('h0480, 12, 'h0490, 'h3049, 1'b0);  // interrupt
  endtask

  // ---------------- monitors ----------------
  int n_wait, n_br_taken, n_br_not, n_jsr, n_jsrr, n_int, n_int_held, n_trap15, n_op13,
      n_priv44, n_save45, n_restore59, n_rti51, n_av, n_ldi, n_sti, n_vec;
  state_t          prev;
  logic [15:0]     vec_seen [4];
  logic            started = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cycles++;
      checks++;
      if (state2 !== state || ctrl2 !== ctrl) begin
        failures++;
        $display("FAIL cycle %0d: two-way sequencer in %0d, main in %0d", cycles, state2, state);
      end
      if (ctrl.mio_en && !mem_ready) n_wait++;
      if (state == 6'd18 && int_req && !int_o) n_int_held++;
      if (av) begin
        n_av++;
        checks++;
        if (!(psr[15] && mar[15:12] == 4'h0 && ctrl.mio_en)) begin
          failures++; $display("FAIL unexpected AV at mar=%h", mar);
        end
      end
      // inside the interrupt handler every interrupt is masked: PSR[10:8] = 111
      if (state == 6'd18 && pc >= 16'h0480 && pc <= 16'h0484) begin
        checks++;
        if (psr[10:8] !== 3'b111) begin
          failures++; $display("FAIL handler runs at priority %0d", psr[10:8]);
        end
      end
      if (state == 6'd50) begin
        if (n_vec < 4) vec_seen[n_vec] = vector;
        n_vec++;
      end
      if (started) begin
        if (prev == 6'd0  && state == 6'd22) n_br_taken++;
        if (prev == 6'd0  && state == 6'd18) n_br_not++;
        if (prev == 6'd4  && state == 6'd21) n_jsr++;
        if (prev == 6'd4  && state == 6'd20) n_jsrr++;
        if (prev == 6'd18 && state == 6'd49) n_int++;
        if (prev == 6'd15 && state == 6'd45) n_trap15++;
        if (prev == 6'd13 && state == 6'd45) n_op13++;
        if (prev == 6'd8  && state == 6'd44) n_priv44++;
        if (state == 6'd45 && prev != 6'd45) n_save45++;
        if (prev == 6'd34 && state == 6'd59) n_restore59++;
        if (prev == 6'd34 && state == 6'd51) n_rti51++;
        if (prev == 6'd24 && state == 6'd26) n_ldi++;
        if (prev == 6'd29 && state == 6'd31) n_sti++;
      end
      prev    = state;
      started = 1;
      // the device: request when the program reaches its idle loop, drop on the ack
      if (state == 6'd18 && pc == 16'h301A && mem['h3049] == 16'h0000) begin
        int_req = 1'b1;
      end
      if (ctrl.mio_en && ctrl.r_w && mem_ready && mar == 16'hFE00) int_req = 1'b0;
    end
  end

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: state %0d pc %h", state, pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_program();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // run until the interrupt handler has left its marker and control is back in the loop
    wait (mem['h3049] == 16'd12 && !int_req);
    wait (state == 6'd18 && pc == 16'h301A);
    repeat (40) @(posedge clk);
    #1;
    expect_eq("x3040 ST R2", mem['h3040], 16'd11);
    expect_eq("x3041 STR NOT", mem['h3041], 16'hFFF4);
    expect_eq("x3042 STI R0", mem['h3042], 16'd7);
    expect_eq("x304B R2 after BRn", mem['h304B], 16'd11);
    expect_eq("x304C LDR", mem['h304C], 16'd11);
    expect_eq("x304D LDI", mem['h304D], 16'hFFF4);
    expect_eq("x304E load of x0200", mem['h304E], mem['h0200]);
    expect_eq("x3046 JSR link R7", mem['h3046], 16'h3012);
    expect_eq("TRAP marker", mem['h3047], 16'd9);
    expect_eq("opcode-exception marker", mem['h304A], 16'd10);
    expect_eq("privilege-exception marker", mem['h3048], 16'd13);
    expect_eq("interrupt marker", mem['h3049], 16'd12);
    expect_eq("vector: TRAP", vec_seen[0], 16'h0025);
    expect_eq("vector: opcode", vec_seen[1], 16'h0101);
    expect_eq("vector: privilege", vec_seen[2], 16'h0100);
    expect_eq("vector: interrupt", vec_seen[3], 16'h0180);
    expect_eq("user mode at the end", 16'(psr[15]), 16'd1);
    expect_eq("priority restored", 16'(psr[10:8]), 16'd0);
    expect_eq("supervisor stack back at x2FF0", ssp, 16'h2FF0);
    // generic ROM examples, side by side
    rom_abc = 3'b011; #1; expect_eq("ROM f(0,1,1)", 16'(rom_f), 16'd1);
    rom_abc = 3'b010; #1; expect_eq("ROM f(0,1,0)", 16'(rom_f), 16'd0);
    fsm_in = 1; @(posedge clk); #1; expect_eq("ROM FSM toggles", 16'(fsm_out), 16'd1);
    fsm_in = 0; @(posedge clk); #1; expect_eq("ROM FSM holds", 16'(fsm_out), 16'd1);
    $display("mechanisms seen in %0d cycles:", cycles);
    expect_seen("memory wait (R = 0)", n_wait);
    expect_seen("BR taken (0 -> 22)", n_br_taken);
    expect_seen("BR not taken (0 -> 18)", n_br_not);
    expect_seen("JSR (4 -> 21)", n_jsr);
    expect_seen("JSRR (4 -> 20)", n_jsrr);
    expect_seen("LDI chain (24 -> 26)", n_ldi);
    expect_seen("STI chain (29 -> 31)", n_sti);
    expect_seen("interrupt taken (18 -> 49)", n_int);
    expect_seen("interrupt held by priority", n_int_held);
    expect_seen("TRAP via state 15 (15 -> 45)", n_trap15);
    expect_seen("opcode exception (13 -> 45)", n_op13);
    expect_seen("privilege exception (8 -> 44)", n_priv44);
    expect_seen("stack switch to SSP (45)", n_save45);
    expect_seen("return to user (34 -> 59)", n_restore59);
    expect_seen("RTI to supervisor (34 -> 51)", n_rti51);
    expect_seen("access violation (AV)", n_av);
    checks++;
    if (n_int != 1) begin failures++; $display("FAIL interrupt taken %0d times", n_int); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
