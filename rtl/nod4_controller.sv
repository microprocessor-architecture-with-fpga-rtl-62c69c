// nod4_controller - the nod4.1 controller: a microprogrammed sequencer for the
// fetch-execute cycle.
//
// A micro-program counter (upc) addresses a micro-ROM (the function ucode below). Each
// micro-instruction holds a control word (ctrl_t) for the data path and the memory strobes,
// a few fields that take a register from the instruction register instead of naming one
// (the "R" of an instruction such as ldR), and a sequencing field. The sequencing field
// says what comes next:
//   NEXT      upc + 1
//   FETCH1    go to the fetch1 routine
//   DISPATCH  jump ahead on the opcode that has just been read into DX: to the access-EA
//             routine for direct and indexed instructions, else to the instruction's own
//             execute routine
//   EXEC      jump ahead on IR to the execute routine (end of access-EA)
//   END       end of instruction: the interrupt routine if irq is high and C.I = 1
//             (and the step does not load C), otherwise fetch1
//   END_PF    the same for an instruction that has pre-fetched the next opcode: continue
//             at fetch2 (which takes the opcode from DX), or enter the interrupt routine
//             at its first step, which undoes the pre-fetch (PC <= PC - 1)
//   SWI       enter the interrupt routine after its undo step, with IID 0
// The micro-program is grouped in the blocks init, fetch1, fetch2, access-EA, execute and
// interrupt; state_o reports which block upc is in.
//
// fetch1 reads the opcode at PC into DX (PC + 1). fetch2 moves it into IR, reads the next
// byte into DX (PC + 1) and dispatches. Access-EA reads or writes the effective address
// (DX for direct; ND <= S/X + offset first for indexed). The interrupt routine pushes PC, A,
// X and C (S decremented before each write), writes C <= {Z, C, I=0, IID} while pulsing
// iack (hardware requests only), and loads PC from the program interrupt address $01.
//
// Cycle counts, from one fetch2 to the next (a fetch1 in between included): implied ALU
// instructions (clra, inva, nega, inc, dec) 2, psh 3, pop 5, rts 4, rti 10, immediate 3,
// direct 4, indexed 5, jumps 3, jsr 5. Interrupt entry takes 14 cycles, 13 when no
// pre-fetch has to be undone.
// The microcoded controller with jump-ahead dispatch, the block names, the two-byte
// fetch, pre-fetching and its undo, the single vector and the IID follow the published
// design. The micro-program itself, the operation codes within each encoding group, the
// flag rules and the interrupt handshake are this design's own (see nod4_pkg).
module nod4_controller
  import nod4_pkg::*;
(
  input  logic       clock,
  input  logic       reset,
  // status from the data path
  input  logic [7:0] dx_q,
  input  logic [7:0] c_q,
  input  logic [7:0] ir_q,
  // interrupt request from a device
  input  logic       irq,
  input  logic [4:0] irq_id,
  // to the data path
  output ctrl_t      ctl,
  output logic [4:0] iid,
  output logic       iack,
  // observation
  output logic [2:0] state_o,       // 0 init, 1 fetch1, 2 fetch2, 3 access-EA, 4 execute, 5 interrupt
  output logic       ev_prefetch,   // an instruction continues at fetch2 with a pre-fetched opcode
  output logic       ev_undo,       // a pre-fetch is undone (PC <= PC - 1)
  output logic       ev_int         // interrupt entry (hardware or swi) writes the IID
);
  typedef logic [6:0] uaddr_t;

  typedef enum logic [2:0] {SQ_NEXT, SQ_FETCH1, SQ_DISPATCH, SQ_EXEC, SQ_END, SQ_END_PF, SQ_SWI} seq_t;

  typedef struct packed {
    ctrl_t c;
    logic  r_ld;     // also load the register named by IR
    logic  r_do;     // dout = register named by IR
    logic  r_b;      // B input = register named by IR
    logic  ix_b;     // B input = index register of the IR mode (S or X)
    logic  jcond;    // load PC only if IR's jump condition holds
    logic  undo;     // this step undoes a pre-fetch
    seq_t  seq;
  } uinstr_t;

  // micro-program addresses
  localparam uaddr_t U_INIT = 0, U_F1 = 2, U_F2 = 3,
    U_EA_DIR_RD = 4, U_EA_DIR_WR = 5, U_EA_IND_RD = 6, U_EA_IND_WR = 8,
    U_NOP_PF = 10, U_NOP = 11, U_CLRA = 12, U_INVA = 13, U_NEGA = 14,
    U_RTS = 15, U_RTI = 17, U_SWI = 25, U_JMP = 26, U_JSR = 27, U_PSH = 30, U_POP = 32,
    U_INCA = 35, U_DECA = 36, U_INCX = 37, U_DECX = 38, U_INCS = 39, U_DECS = 40,
    U_ANDA = 41, U_ORA = 42, U_CMPA = 43, U_ADDA = 44, U_SUBA = 45, U_LDA = 46,
    U_ANDR = 47, U_ORR = 48, U_CMPR = 49, U_ADDR = 50, U_SUBR = 51, U_LDR = 52, U_ST = 53,
    U_INT = 54, U_LAST = 67;

  // ---------------------------------------------------------------- micro-ROM
  function automatic uinstr_t ucode(input uaddr_t a);
    uinstr_t u = '0;
    u.seq = SQ_NEXT;
    unique case (a)
      // init: read the PSA at $00 (PC is 0 after reset) into PC
      7'd0:  begin u.c.axsel = AXSEL_PC; u.c.rd = 1; u.c.dx_ld = 1; end
      7'd1:  begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.pc_ld = 1; u.seq = SQ_FETCH1; end
      // fetch1, fetch2
      7'd2:  begin u.c.axsel = AXSEL_PC; u.c.rd = 1; u.c.dx_ld = 1;
                   u.c.bsel = BSEL_PC; u.c.alu_op = ALU_INCB; u.c.pc_ld = 1; end
      7'd3:  begin u.c.ir_ld = 1; u.c.axsel = AXSEL_PC; u.c.rd = 1; u.c.dx_ld = 1;
                   u.c.bsel = BSEL_PC; u.c.alu_op = ALU_INCB; u.c.pc_ld = 1; u.seq = SQ_DISPATCH; end
      // access-EA
      7'd4:  begin u.c.axsel = AXSEL_DX; u.c.rd = 1; u.c.dx_ld = 1; u.seq = SQ_EXEC; end
      7'd5:  begin u.c.axsel = AXSEL_DX; u.c.wr = 1; u.r_do = 1; u.seq = SQ_EXEC; end
      7'd6,
      7'd8:  begin u.c.dsel = DSEL_DX; u.ix_b = 1; u.c.alu_op = ALU_ADD; u.c.nd_ld = 1; end
      7'd7:  begin u.c.axsel = AXSEL_ND; u.c.rd = 1; u.c.dx_ld = 1; u.seq = SQ_EXEC; end
      7'd9:  begin u.c.axsel = AXSEL_ND; u.c.wr = 1; u.r_do = 1; u.seq = SQ_EXEC; end
      // execute: no-operations (reserved opcodes)
      7'd10: u.seq = SQ_END_PF;
      7'd11: u.seq = SQ_END;
      // clra, inva, nega
      7'd12: begin u.c.alu_op = ALU_ZERO; u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END_PF; end
      7'd13: begin u.c.dsel = DSEL_A; u.c.alu_op = ALU_NOTD; u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END_PF; end
      7'd14: begin u.c.dsel = DSEL_A; u.c.alu_op = ALU_NEGD; u.c.a_ld = 1; u.c.z_ld = 1;
                   u.c.cy_ld = 1; u.seq = SQ_END_PF; end
      // rts: pop PC
      7'd15, 7'd17, 7'd19, 7'd21, 7'd23, 7'd33:
             begin u.c.axsel = AXSEL_S; u.c.rd = 1; u.c.dx_ld = 1;
                   u.c.bsel = BSEL_S; u.c.alu_op = ALU_INCB; u.c.s_ld = 1; end
      7'd16: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.pc_ld = 1; u.seq = SQ_END; end
      // rti: pop C, X, A, PC (the pops at 17, 19, 21, 23 above)
      7'd18: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.c_ld = 1; end
      7'd20: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.x_ld = 1; end
      7'd22: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.a_ld = 1; end
      7'd24: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.pc_ld = 1; u.seq = SQ_END; end
      // swi: one byte long, undo the pre-fetch and enter the interrupt routine
      7'd25: begin u.c.bsel = BSEL_PC; u.c.alu_op = ALU_DECB; u.c.pc_ld = 1; u.undo = 1; u.seq = SQ_SWI; end
      // jumps
      7'd26: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.jcond = 1; u.seq = SQ_END; end
      // jsr: push PC (already the return address), PC <= target
      7'd27, 7'd30:
             begin u.c.bsel = BSEL_S; u.c.alu_op = ALU_DECB; u.c.s_ld = 1; end
      7'd28: begin u.c.axsel = AXSEL_S; u.c.dosel = DOSEL_PC; u.c.wr = 1; end
      7'd29: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.pc_ld = 1; u.seq = SQ_END; end
      // pshR (S decremented at 30)
      7'd31: begin u.c.axsel = AXSEL_S; u.c.wr = 1; u.r_do = 1; u.seq = SQ_END_PF; end
      // popR: the read reuses DX, so undo the pre-fetch first (pop itself at 33)
      7'd32: begin u.c.bsel = BSEL_PC; u.c.alu_op = ALU_DECB; u.c.pc_ld = 1; u.undo = 1; end
      7'd34: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.r_ld = 1; u.seq = SQ_END; end
      // incR, decR
      7'd35: begin u.c.dsel = DSEL_A; u.c.alu_op = ALU_INCD; u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END_PF; end
      7'd36: begin u.c.dsel = DSEL_A; u.c.alu_op = ALU_DECD; u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END_PF; end
      7'd37: begin u.c.bsel = BSEL_X; u.c.alu_op = ALU_INCB; u.c.x_ld = 1; u.c.z_ld = 1; u.seq = SQ_END_PF; end
      7'd38: begin u.c.bsel = BSEL_X; u.c.alu_op = ALU_DECB; u.c.x_ld = 1; u.c.z_ld = 1; u.seq = SQ_END_PF; end
      7'd39: begin u.c.bsel = BSEL_S; u.c.alu_op = ALU_INCB; u.c.s_ld = 1; u.seq = SQ_END_PF; end
      7'd40: begin u.c.bsel = BSEL_S; u.c.alu_op = ALU_DECB; u.c.s_ld = 1; u.seq = SQ_END_PF; end
      // A op M: A on the D input, the operand (DX) on B
      7'd41: begin u.c.bsel = BSEL_DX; u.c.alu_op = ALU_AND;   u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END; end
      7'd42: begin u.c.bsel = BSEL_DX; u.c.alu_op = ALU_OR;    u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END; end
      7'd43: begin u.c.bsel = BSEL_DX; u.c.alu_op = ALU_SUB;   u.c.z_ld = 1; u.c.cy_ld = 1; u.seq = SQ_END; end
      7'd44: begin u.c.bsel = BSEL_DX; u.c.alu_op = ALU_ADD;   u.c.a_ld = 1; u.c.z_ld = 1; u.c.cy_ld = 1; u.seq = SQ_END; end
      7'd45: begin u.c.bsel = BSEL_DX; u.c.alu_op = ALU_SUB;   u.c.a_ld = 1; u.c.z_ld = 1; u.c.cy_ld = 1; u.seq = SQ_END; end
      7'd46: begin u.c.bsel = BSEL_DX; u.c.alu_op = ALU_PASSB; u.c.a_ld = 1; u.c.z_ld = 1; u.seq = SQ_END; end
      // R op M for C, S, X: the register on the B input, the operand (DX) on D
      7'd47: begin u.c.dsel = DSEL_DX; u.r_b = 1; u.c.alu_op = ALU_AND;   u.r_ld = 1; u.c.z_ld = 1; u.seq = SQ_END; end
      7'd48: begin u.c.dsel = DSEL_DX; u.r_b = 1; u.c.alu_op = ALU_OR;    u.r_ld = 1; u.c.z_ld = 1; u.seq = SQ_END; end
      7'd49: begin u.c.dsel = DSEL_DX; u.r_b = 1; u.c.alu_op = ALU_RSUB;  u.c.z_ld = 1; u.c.cy_ld = 1; u.seq = SQ_END; end
      7'd50: begin u.c.dsel = DSEL_DX; u.r_b = 1; u.c.alu_op = ALU_ADD;   u.r_ld = 1; u.c.z_ld = 1; u.c.cy_ld = 1; u.seq = SQ_END; end
      7'd51: begin u.c.dsel = DSEL_DX; u.r_b = 1; u.c.alu_op = ALU_RSUB;  u.r_ld = 1; u.c.z_ld = 1; u.c.cy_ld = 1; u.seq = SQ_END; end
      7'd52: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.r_ld = 1; u.c.z_ld = 1; u.seq = SQ_END; end
      // stR: the write was done in access-EA
      7'd53: u.seq = SQ_END;
      // interrupt: undo a pre-fetch, push PC, A, X, C, write the IID, PC <= [$01]
      7'd54: begin u.c.bsel = BSEL_PC; u.c.alu_op = ALU_DECB; u.c.pc_ld = 1; u.undo = 1; end
      7'd55, 7'd57, 7'd59, 7'd61:
             begin u.c.bsel = BSEL_S; u.c.alu_op = ALU_DECB; u.c.s_ld = 1; end
      7'd56: begin u.c.axsel = AXSEL_S; u.c.dosel = DOSEL_PC; u.c.wr = 1; end
      7'd58: begin u.c.axsel = AXSEL_S; u.c.dosel = DOSEL_A;  u.c.wr = 1; end
      7'd60: begin u.c.axsel = AXSEL_S; u.c.dosel = DOSEL_X;  u.c.wr = 1; end
      7'd62: begin u.c.axsel = AXSEL_S; u.c.dosel = DOSEL_C;  u.c.wr = 1; end
      7'd63: u.c.int_ld = 1;
      7'd64: begin u.c.alu_op = ALU_ZERO; u.c.pc_ld = 1; end
      7'd65: begin u.c.bsel = BSEL_PC; u.c.alu_op = ALU_INCB; u.c.pc_ld = 1; end   // PC = PIA address
      7'd66: begin u.c.axsel = AXSEL_PC; u.c.rd = 1; u.c.dx_ld = 1; end
      7'd67: begin u.c.dsel = DSEL_DX; u.c.alu_op = ALU_PASSD; u.c.pc_ld = 1; u.seq = SQ_FETCH1; end
      default: u.seq = SQ_FETCH1;
    endcase
    return u;
  endfunction

  // ---------------------------------------------------------------- jump-ahead rules
  // execute routine of an opcode
  function automatic uaddr_t exec_entry(input logic [7:0] op);
    logic       g   = op[7];
    reg_t       r   = reg_t'(op[6:5]);
    mode_t      m   = op_mode(op);
    logic [2:0] sel = op_sel(op);
    logic [1:0] xx  = op[1:0];
    logic       isa = (r == REG_A);
    if (op_noreg(op)) begin
      if (g) return (m == M_IMP) ? U_NOP_PF : U_NOP;             // group 1-01 is reserved
      if (m == M_IMP) begin
        unique case (sel)
          OP_CLRA: return U_CLRA;
          OP_INVA: return U_INVA;
          OP_NEGA: return U_NEGA;
          OP_RTS:  return U_RTS;
          OP_RTI:  return U_RTI;
          OP_SWI:  return U_SWI;
          default: return U_NOP_PF;
        endcase
      end
      if (m == M_IMM) return (sel == OP_JSR) ? U_JSR : U_JMP;
      return U_NOP;
    end
    if (m == M_IMP) begin
      if (!g) begin
        if (sel == OP_PSH) return U_PSH;
        if (sel == OP_POP) return U_POP;
        return U_NOP_PF;
      end
      if (sel == OP_INC) return isa ? U_INCA : (r == REG_X) ? U_INCX : U_INCS;
      if (sel == OP_DEC) return isa ? U_DECA : (r == REG_X) ? U_DECX : U_DECS;
      return U_NOP_PF;
    end
    if (!g) begin
      unique case (xx)
        OP_AND:  return isa ? U_ANDA : U_ANDR;
        OP_OR:   return isa ? U_ORA  : U_ORR;
        OP_CMP:  return isa ? U_CMPA : U_CMPR;
        default: return U_NOP;
      endcase
    end
    unique case (xx)
      OP_ADD:  return isa ? U_ADDA : U_ADDR;
      OP_SUB:  return isa ? U_SUBA : U_SUBR;
      OP_LD:   return isa ? U_LDA  : U_LDR;
      default: return U_ST;
    endcase
  endfunction

  // routine that follows fetch2: access-EA for direct and indexed, else execute
  function automatic uaddr_t dispatch(input logic [7:0] op);
    mode_t m     = op_mode(op);
    logic  store = op[7] && (op[1:0] == OP_ST);
    if (op_noreg(op) || m == M_IMP || m == M_IMM) return exec_entry(op);
    if (m == M_DIR) return store ? U_EA_DIR_WR : U_EA_DIR_RD;
    return store ? U_EA_IND_WR : U_EA_IND_RD;
  endfunction

  // ---------------------------------------------------------------- sequencer
  uaddr_t  upc, nupc;
  uinstr_t u;
  logic    int_sw, n_int_sw;            // interrupt entered by swi: IID 0, no iack
  reg_t    r;
  logic    jcond;
  logic    take_int;

  assign u        = ucode(upc);
  assign r        = reg_t'(ir_q[6:5]);
  // An instruction whose last step loads the whole C register (and/or/pop with C) never
  // ends in an interrupt entry: c_q still holds the old I in that step, so a request is
  // left for the next instruction boundary, where the new I decides.
  assign take_int = irq && c_q[C_I] && !ctl.c_ld;

  always_comb begin
    unique case (op_sel(ir_q))
      OP_JMP:  jcond = 1'b1;
      OP_JEQ:  jcond = c_q[C_Z];
      OP_JNE:  jcond = !c_q[C_Z];
      OP_JLO:  jcond = c_q[C_C];
      OP_JHS:  jcond = !c_q[C_C];
      OP_JLS:  jcond = c_q[C_C] || c_q[C_Z];
      OP_JHI:  jcond = !c_q[C_C] && !c_q[C_Z];
      default: jcond = 1'b0;
    endcase
  end

  // control word with the register fields of IR filled in
  always_comb begin
    ctl = u.c;
    if (u.r_ld) begin
      unique case (r)
        REG_A:   ctl.a_ld = 1'b1;
        REG_C:   ctl.c_ld = 1'b1;
        REG_S:   ctl.s_ld = 1'b1;
        default: ctl.x_ld = 1'b1;
      endcase
    end
    if (u.r_do) begin
      unique case (r)
        REG_A:   ctl.dosel = DOSEL_A;
        REG_C:   ctl.dosel = DOSEL_C;
        REG_S:   ctl.dosel = DOSEL_S;
        default: ctl.dosel = DOSEL_X;
      endcase
    end
    if (u.r_b)   ctl.bsel = (r == REG_C) ? BSEL_C : (r == REG_S) ? BSEL_S : BSEL_X;
    if (u.ix_b)  ctl.bsel = (op_mode(ir_q) == M_INDS) ? BSEL_S : BSEL_X;
    if (u.jcond) ctl.pc_ld = jcond;
  end

  // next micro-address
  always_comb begin
    n_int_sw = int_sw;
    unique case (u.seq)
      SQ_NEXT:     nupc = upc + 7'd1;
      SQ_FETCH1:   nupc = U_F1;
      SQ_DISPATCH: nupc = dispatch(dx_q);
      SQ_EXEC:     nupc = exec_entry(ir_q);
      SQ_END:      begin nupc = take_int ? U_INT + 7'd1 : U_F1; if (take_int) n_int_sw = 1'b0; end
      SQ_END_PF:   begin nupc = take_int ? U_INT : U_F2;        if (take_int) n_int_sw = 1'b0; end
      default:     begin nupc = U_INT + 7'd1; n_int_sw = 1'b1; end     // SQ_SWI
    endcase
  end

  assign iid         = int_sw ? 5'd0 : irq_id;
  assign iack        = u.c.int_ld && !int_sw;
  assign ev_int      = u.c.int_ld;
  assign ev_undo     = u.undo;
  assign ev_prefetch = (u.seq == SQ_END_PF) && !take_int;

  always_comb begin
    if (upc < U_F1)              state_o = 3'd0;
    else if (upc == U_F1)        state_o = 3'd1;
    else if (upc == U_F2)        state_o = 3'd2;
    else if (upc < U_NOP_PF)     state_o = 3'd3;
    else if (upc < U_INT)        state_o = 3'd4;
    else                         state_o = 3'd5;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      upc    <= U_INIT;
      int_sw <= 1'b0;
    end else begin
      upc    <= nupc;
      int_sw <= n_int_sw;
    end
  end

  // a read and a write never happen in the same cycle; upc stays inside the micro-program
  a_rdwr_exclusive: assert property (@(posedge clock) disable iff (reset) !(ctl.rd && ctl.wr));
  a_upc_range:      assert property (@(posedge clock) disable iff (reset) upc <= U_LAST);
endmodule
