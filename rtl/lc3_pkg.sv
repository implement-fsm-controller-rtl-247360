// lc3_pkg: shared types and the micro-program of the LC3 micro-sequenced control unit.
//
// The control store is 64 rows, one per controller state. Each row holds a 10-bit
// next-state part (IRD, a 3-bit COND code and a 6-bit JUMP address J) and a 40-bit
// control word that drives the datapath during that state. The row contents are
// produced by the function ucode() below rather than read from a file, so the table is
// the case statement itself.
//
// Taken from the design: 64 rows, 6-bit state, 40 control bits, IRD selecting
// {00, IR[15:12]} for state 32, COND code i altering J[i] for R (1) and BEN (2),
// state numbers and transitions of fetch, decode, BR, ADD and the interrupt/exception
// flow, and the modified TRAP state 15 that behaves like the opcode-exception state 13
// with the vector taken from ZEXT(IR[7:0]) over the system bus.
// This design's own choices: the order of the control bits inside the word, the
// encodings of the multiplexer selects other than DRMUX/SR1MUX/VectorMUX, COND codes
// 3 (IR[11] -> J[0]), 4 (PSR[15] -> J[3]) and 5 (INT -> J[4]) chosen to reproduce the
// documented state numbers, the remaining LC3 instruction states (loads, stores, JSR,
// JMP, LEA, NOT, AND) following the standard LC3 state machine, one LD_Priority bit
// to load PSR[10:8], and all unused rows going to state 18 with no control asserted.
package lc3_pkg;

  localparam int unsigned STATE_W = 6;   // 2^6 = 64 rows, 59 of them used by the LC3
  localparam int unsigned CTRL_W  = 40;  // control-signal bits per row
  localparam int unsigned NEXT_W  = 10;  // IRD + COND + J

  typedef logic [STATE_W-1:0] state_t;

  // COND codes of the micro-branch decoder.
  typedef enum logic [2:0] {
    COND_NONE  = 3'd0,  // JUMP unaltered
    COND_R     = 3'd1,  // memory ready      -> J[1]
    COND_BEN   = 3'd2,  // branch enable     -> J[2]
    COND_IR11  = 3'd3,  // JSR/JSRR mode     -> J[0]
    COND_PSR15 = 3'd4,  // privilege (user)  -> J[3]
    COND_INT   = 3'd5   // interrupt pending -> J[4]
  } cond_e;

  // Datapath multiplexer selects. DRMUX, SR1MUX and VectorMUX encodings follow the
  // drawings of the register file and the vector register.
  typedef enum logic [1:0] {DR_IR11_9 = 2'b00, DR_R6 = 2'b01, DR_R7 = 2'b10} drmux_e;
  typedef enum logic [1:0] {SR1_IR11_9 = 2'b00, SR1_IR8_6 = 2'b01, SR1_R6 = 2'b10} sr1mux_e;
  typedef enum logic [1:0] {VEC_INTV = 2'b00, VEC_PRIV = 2'b01, VEC_OPC = 2'b10, VEC_UNUSED = 2'b11} vecmux_e;
  typedef enum logic [1:0] {PC_PLUS1 = 2'b00, PC_BUS = 2'b01, PC_ADDER = 2'b10} pcmux_e;
  typedef enum logic [1:0] {A2_ZERO = 2'b00, A2_OFF6 = 2'b01, A2_OFF9 = 2'b10, A2_OFF11 = 2'b11} addr2mux_e;
  typedef enum logic [1:0] {SP_PLUS1 = 2'b00, SP_MINUS1 = 2'b01, SP_SSP = 2'b10, SP_USP = 2'b11} spmux_e;
  typedef enum logic [1:0] {ALU_ADD = 2'b00, ALU_AND = 2'b01, ALU_NOT = 2'b10, ALU_PASSA = 2'b11} aluk_e;

  // The 40-bit control word.
  typedef struct packed {
    logic       ld_mar;
    logic       ld_mdr;
    logic       ld_ir;
    logic       ld_ben;
    logic       ld_reg;
    logic       ld_cc;
    logic       ld_pc;
    logic       ld_priv;
    logic       ld_priority;
    logic       ld_saved_ssp;
    logic       ld_saved_usp;
    logic       ld_vector;
    logic       gate_pc;
    logic       gate_mdr;
    logic       gate_alu;
    logic       gate_marmux;
    logic       gate_vector;
    logic       gate_pc1;
    logic       gate_psr;
    logic       gate_sp;
    pcmux_e     pcmux;
    drmux_e     drmux;
    sr1mux_e    sr1mux;
    logic       addr1mux;    // 0: PC, 1: BaseR
    addr2mux_e  addr2mux;
    spmux_e     spmux;
    logic       marmux;      // 0: ZEXT(IR[7:0]), 1: address adder
    vecmux_e    vectormux;
    logic       psrmux;      // 0: individual settings, 1: load PSR from the bus
    aluk_e      aluk;
    logic       mio_en;
    logic       r_w;         // 0: read, 1: write
    logic       set_priv;    // value written to PSR[15] when ld_priv and psrmux == 0
  } ctrl_t;

  // One row of the control store.
  typedef struct packed {
    logic    ird;
    cond_e   cond;
    state_t  j;
    ctrl_t   ctrl;
  } uinstr_t;

  // Bit of J that each COND code may set.
  function automatic int unsigned cond_bit(cond_e c);
    case (c)
      COND_R:     return 1;
      COND_BEN:   return 2;
      COND_IR11:  return 0;
      COND_PSR15: return 3;
      COND_INT:   return 4;
      default:    return 0;
    endcase
  endfunction

  // Shared register-transfer fragments.
  function automatic ctrl_t mem_read();   // MDR <= M
    ctrl_t c = '0;
    c.ld_mdr = 1'b1;
    c.mio_en = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t mem_write();  // M <= MDR
    ctrl_t c = '0;
    c.mio_en = 1'b1;
    c.r_w    = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t mar_pc_off9();  // MAR <= PC + off9
    ctrl_t c = '0;
    c.addr1mux    = 1'b0;
    c.addr2mux    = A2_OFF9;
    c.marmux      = 1'b1;
    c.gate_marmux = 1'b1;
    c.ld_mar      = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t mar_base_off6();  // MAR <= BaseR + off6
    ctrl_t c = '0;
    c.sr1mux      = SR1_IR8_6;
    c.addr1mux    = 1'b1;
    c.addr2mux    = A2_OFF6;
    c.marmux      = 1'b1;
    c.gate_marmux = 1'b1;
    c.ld_mar      = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t enter_super(vecmux_e v, logic vec_from_vmux);
    // MDR <= PSR, PSR[15] <= 0, and Vector <= VecMUX (states 13, 44, 49)
    ctrl_t c = '0;
    c.gate_psr  = 1'b1;
    c.ld_mdr    = 1'b1;
    c.ld_priv   = 1'b1;
    c.set_priv  = 1'b0;
    c.ld_vector = vec_from_vmux;
    c.vectormux = v;
    return c;
  endfunction

  function automatic ctrl_t sp_step(spmux_e m, logic to_mar);  // SP <= SPMUX (, MAR <= same)
    ctrl_t c = '0;
    c.sr1mux  = SR1_R6;
    c.spmux   = m;
    c.gate_sp = 1'b1;
    c.drmux   = DR_R6;
    c.ld_reg  = 1'b1;
    c.ld_mar  = to_mar;
    return c;
  endfunction

  // The micro-program: control-store row for state s.
  function automatic uinstr_t ucode(state_t s);
    uinstr_t u;
    u      = '0;
    u.cond = COND_NONE;
    u.j    = 6'd18;
    case (s)
      // ---- fetch and decode ----
      6'd18: begin  // MAR <= PC, PC <= PC+1, [INT]
        u.ctrl.ld_mar  = 1'b1; u.ctrl.gate_pc = 1'b1;
        u.ctrl.ld_pc   = 1'b1; u.ctrl.pcmux   = PC_PLUS1;
        u.cond = COND_INT; u.j = 6'd33;
      end
      6'd33: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd33; end  // MDR <= M
      6'd35: begin  // IR <= MDR
        u.ctrl.gate_mdr = 1'b1; u.ctrl.ld_ir = 1'b1; u.j = 6'd32;
      end
      6'd32: begin  // BEN <= IR[11:9] & {N,Z,P}, [IR[15:12]]
        u.ctrl.ld_ben = 1'b1; u.ird = 1'b1; u.j = 6'd0;
      end
      // ---- operate instructions ----
      6'd1, 6'd5, 6'd9: begin  // ADD, AND, NOT: DR <= SR1 op OP2, set CC
        u.ctrl.sr1mux = SR1_IR8_6; u.ctrl.gate_alu = 1'b1;
        u.ctrl.drmux  = DR_IR11_9; u.ctrl.ld_reg   = 1'b1; u.ctrl.ld_cc = 1'b1;
        u.ctrl.aluk   = (s == 6'd1) ? ALU_ADD : (s == 6'd5) ? ALU_AND : ALU_NOT;
      end
      6'd14: begin  // LEA: DR <= PC + off9, set CC
        u.ctrl = mar_pc_off9(); u.ctrl.ld_mar = 1'b0;
        u.ctrl.drmux = DR_IR11_9; u.ctrl.ld_reg = 1'b1; u.ctrl.ld_cc = 1'b1;
      end
      // ---- control instructions ----
      6'd0:  begin u.cond = COND_BEN; u.j = 6'd18; end  // BR: [BEN]
      6'd22: begin  // PC <= PC + off9
        u.ctrl.addr1mux = 1'b0; u.ctrl.addr2mux = A2_OFF9;
        u.ctrl.pcmux = PC_ADDER; u.ctrl.ld_pc = 1'b1;
      end
      6'd12, 6'd20: begin  // JMP / JSRR: PC <= BaseR
        u.ctrl.sr1mux = SR1_IR8_6; u.ctrl.addr1mux = 1'b1; u.ctrl.addr2mux = A2_ZERO;
        u.ctrl.pcmux = PC_ADDER; u.ctrl.ld_pc = 1'b1;
      end
      6'd4: begin  // JSR: R7 <= PC, [IR[11]]
        u.ctrl.gate_pc = 1'b1; u.ctrl.drmux = DR_R7; u.ctrl.ld_reg = 1'b1;
        u.cond = COND_IR11; u.j = 6'd20;
      end
      6'd21: begin  // PC <= PC + off11
        u.ctrl.addr1mux = 1'b0; u.ctrl.addr2mux = A2_OFF11;
        u.ctrl.pcmux = PC_ADDER; u.ctrl.ld_pc = 1'b1;
      end
      // ---- loads ----
      6'd2:  begin u.ctrl = mar_pc_off9();   u.j = 6'd25; end  // LD
      6'd6:  begin u.ctrl = mar_base_off6(); u.j = 6'd25; end  // LDR
      6'd10: begin u.ctrl = mar_pc_off9();   u.j = 6'd24; end  // LDI
      6'd24: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd24; end
      6'd26: begin u.ctrl.gate_mdr = 1'b1; u.ctrl.ld_mar = 1'b1; u.j = 6'd25; end
      6'd25: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd25; end
      6'd27: begin  // DR <= MDR, set CC
        u.ctrl.gate_mdr = 1'b1; u.ctrl.drmux = DR_IR11_9;
        u.ctrl.ld_reg = 1'b1; u.ctrl.ld_cc = 1'b1;
      end
      // ---- stores ----
      6'd3:  begin u.ctrl = mar_pc_off9();   u.j = 6'd23; end  // ST
      6'd7:  begin u.ctrl = mar_base_off6(); u.j = 6'd23; end  // STR
      6'd11: begin u.ctrl = mar_pc_off9();   u.j = 6'd29; end  // STI
      6'd29: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd29; end
      6'd31: begin u.ctrl.gate_mdr = 1'b1; u.ctrl.ld_mar = 1'b1; u.j = 6'd23; end
      6'd23: begin  // MDR <= SR
        u.ctrl.sr1mux = SR1_IR11_9; u.ctrl.aluk = ALU_PASSA;
        u.ctrl.gate_alu = 1'b1; u.ctrl.ld_mdr = 1'b1; u.j = 6'd16;
      end
      6'd16: begin u.ctrl = mem_write(); u.cond = COND_R; u.j = 6'd16; end
      // ---- TRAP, changed to enter the exception chain ----
      6'd15: begin  // Vector <= sys_bus <= ZEXT(IR[7:0]), MDR <= PSR, PSR[15] <= 0, [PSR[15]]
        u.ctrl = enter_super(VEC_INTV, 1'b1);
        u.ctrl.marmux = 1'b0; u.ctrl.gate_marmux = 1'b1;
        u.cond = COND_PSR15; u.j = 6'd37;
      end
      // ---- exceptions and interrupts ----
      6'd13: begin  // opcode exception: Vector <= x0101, [PSR[15]]
        u.ctrl = enter_super(VEC_OPC, 1'b1); u.cond = COND_PSR15; u.j = 6'd37;
      end
      6'd44: begin  // privilege exception: Vector <= x0100
        u.ctrl = enter_super(VEC_PRIV, 1'b1); u.j = 6'd45;
      end
      6'd49: begin  // interrupt: Vector <= INTV, PSR[10:8] <= IntPriority, [PSR[15]]
        u.ctrl = enter_super(VEC_INTV, 1'b1); u.ctrl.ld_priority = 1'b1;
        u.cond = COND_PSR15; u.j = 6'd37;
      end
      6'd45: begin  // Saved_USP <= SP, SP <= Saved_SSP
        u.ctrl = sp_step(SP_SSP, 1'b0); u.ctrl.ld_saved_usp = 1'b1; u.j = 6'd37;
      end
      6'd37, 6'd47: begin  // MAR <= SP-1, SP <= SP-1
        u.ctrl = sp_step(SP_MINUS1, 1'b1); u.j = (s == 6'd37) ? 6'd41 : 6'd48;
      end
      6'd41: begin u.ctrl = mem_write(); u.cond = COND_R; u.j = 6'd41; end  // push PSR
      6'd43: begin u.ctrl.gate_pc1 = 1'b1; u.ctrl.ld_mdr = 1'b1; u.j = 6'd47; end  // MDR <= PC-1
      6'd48: begin u.ctrl = mem_write(); u.cond = COND_R; u.j = 6'd48; end  // push PC
      6'd50: begin u.ctrl.gate_vector = 1'b1; u.ctrl.ld_mar = 1'b1; u.j = 6'd52; end  // MAR <= Vector
      6'd52: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd52; end
      6'd54: begin  // PC <= MDR
        u.ctrl.gate_mdr = 1'b1; u.ctrl.pcmux = PC_BUS; u.ctrl.ld_pc = 1'b1;
      end
      // ---- RTI ----
      6'd8: begin  // MAR <= SP, [PSR[15]]
        u.ctrl.sr1mux = SR1_R6; u.ctrl.aluk = ALU_PASSA;
        u.ctrl.gate_alu = 1'b1; u.ctrl.ld_mar = 1'b1;
        u.cond = COND_PSR15; u.j = 6'd36;
      end
      6'd36: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd36; end
      6'd38: begin  // PC <= MDR
        u.ctrl.gate_mdr = 1'b1; u.ctrl.pcmux = PC_BUS; u.ctrl.ld_pc = 1'b1; u.j = 6'd39;
      end
      6'd39: begin u.ctrl = sp_step(SP_PLUS1, 1'b1); u.j = 6'd40; end  // MAR, SP <= SP+1
      6'd40: begin u.ctrl = mem_read(); u.cond = COND_R; u.j = 6'd40; end
      6'd42: begin  // PSR <= MDR
        u.ctrl.gate_mdr = 1'b1; u.ctrl.psrmux = 1'b1; u.ctrl.ld_priv = 1'b1;
        u.ctrl.ld_priority = 1'b1; u.ctrl.ld_cc = 1'b1; u.j = 6'd34;
      end
      6'd34: begin  // SP <= SP+1, [PSR[15]]
        u.ctrl = sp_step(SP_PLUS1, 1'b0); u.cond = COND_PSR15; u.j = 6'd51;
      end
      6'd59: begin  // Saved_SSP <= SP, SP <= Saved_USP
        u.ctrl = sp_step(SP_USP, 1'b0); u.ctrl.ld_saved_ssp = 1'b1;
      end
      6'd51: ;  // nothing
      default: ;  // unused rows: no control, back to fetch
    endcase
    return u;
  endfunction

  // Row of the two-way-branching control store: one-hot COND bits {R,P,B,A,I} and
  // both targets stored. It is derived from the row above: Addr0 = J and
  // Addr1 = J with the COND bit set, so both sequencers walk the same state graph.
  typedef struct packed {
    logic   ird;
    logic   c_r;   // memory ready
    logic   c_p;   // privilege bit PSR[15]
    logic   c_b;   // branch enable
    logic   c_a;   // addressing mode IR[11]
    logic   c_i;   // interrupt
    state_t addr0;
    state_t addr1;
    ctrl_t  ctrl;
  } uinstr2_t;

  function automatic uinstr2_t ucode2(state_t s);
    uinstr_t  u;
    uinstr2_t w;
    u       = ucode(s);
    w       = '0;
    w.ird   = u.ird;
    w.c_r   = (u.cond == COND_R);
    w.c_p   = (u.cond == COND_PSR15);
    w.c_b   = (u.cond == COND_BEN);
    w.c_a   = (u.cond == COND_IR11);
    w.c_i   = (u.cond == COND_INT);
    w.addr0 = u.j;
    w.addr1 = (u.cond == COND_NONE) ? u.j : (u.j | state_t'(1 << cond_bit(u.cond)));
    w.ctrl  = u.ctrl;
    return w;
  endfunction

endpackage
