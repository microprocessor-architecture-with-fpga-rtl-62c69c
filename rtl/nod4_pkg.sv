// nod4_pkg - types and constants shared by the nod4.1 processor and its memory system.
//
// The nod4 architecture is an 8-bit accumulator machine with an 8-bit address bus and the
// registers A, C, S, X and PC. C holds the flags Z, C (carry/borrow) and I (interrupt
// enable) in its upper three bits and the 5-bit interrupt identifier (IID) in the lower
// five. An opcode is split as  g | rr | mmn | xx :
//   g   (bit 7)     selects the register set: 0 = A/C/X, 1 = A/S/X
//   rr  (bits 6:5)  register code A=00 C=01 S=10 X=11; the code that is not in the set
//                   (10 for g=0, 01 for g=1) marks a group without a register operand
//   mmn (bits 4:2)  addressing mode: 00n implied, 01n immediate, 10n direct, 110 indexed
//                   from S, 111 indexed from X
//   xx  (bits 1:0)  operation within the group ({n,xx} for implied and for jumps)
// The register codes, the mode field and the four formats follow the published encoding
// summary; the assignment of individual operations to xx / {n,xx} values, the bit order of
// the flags in C and everything in the control word are this design's own choices.
package nod4_pkg;

  // register codes
  typedef enum logic [1:0] {REG_A = 2'b00, REG_C = 2'b01, REG_S = 2'b10, REG_X = 2'b11} reg_t;

  // flag positions in C
  localparam int unsigned C_Z = 7;
  localparam int unsigned C_C = 6;
  localparam int unsigned C_I = 5;

  // memory map
  localparam logic [7:0] ROM_LAST = 8'hBF;   // ROM  $00..$BF (192 bytes)
  localparam logic [7:0] RAM_BASE = 8'hC0;   // RAM  $C0..$FB (60 bytes)
  localparam logic [7:0] RAM_LAST = 8'hFB;
  localparam logic [7:0] DEV_BASE = 8'hFC;   // Dev1..Dev4 at $FC..$FF, Dev1 = LED register
  localparam logic [7:0] PSA_ADDR = 8'h00;   // program start address
  localparam logic [7:0] PIA_ADDR = 8'h01;   // program interrupt address (single vector)

  // operations of group g=0 (A/C/X), modes IMM/DIR/IND, selected by xx
  localparam logic [1:0] OP_AND = 2'b00, OP_CMP = 2'b01, OP_OR = 2'b10;
  // operations of group g=1 (A/S/X), modes IMM/DIR/IND, selected by xx
  localparam logic [1:0] OP_ADD = 2'b00, OP_ST = 2'b01, OP_SUB = 2'b10, OP_LD = 2'b11;
  // implied operations of the register groups, selected by {n,xx}
  localparam logic [2:0] OP_PSH = 3'b000, OP_POP = 3'b001;   // g=0
  localparam logic [2:0] OP_DEC = 3'b000, OP_INC = 3'b001;   // g=1
  // implied operations of the no-register group 0-10, selected by {n,xx}
  localparam logic [2:0] OP_CLRA = 3'b000, OP_INVA = 3'b001, OP_NEGA = 3'b010,
                         OP_RTS  = 3'b011, OP_RTI  = 3'b100, OP_SWI  = 3'b101;
  // immediate operations of the no-register group 0-10 (jumps), selected by {n,xx}
  localparam logic [2:0] OP_JMP = 3'b000, OP_JEQ = 3'b001, OP_JNE = 3'b010, OP_JLO = 3'b011,
                         OP_JHS = 3'b100, OP_JLS = 3'b101, OP_JHI = 3'b110, OP_JSR = 3'b111;

  // addressing mode, decoded from mmn
  typedef enum logic [2:0] {M_IMP, M_IMM, M_DIR, M_INDS, M_INDX} mode_t;

  // ALU operations: D and B are the two ALU inputs
  typedef enum logic [3:0] {
    ALU_PASSD, ALU_PASSB, ALU_ADD, ALU_SUB,  // SUB: D - B
    ALU_RSUB,                                // B - D
    ALU_AND, ALU_OR, ALU_INCD, ALU_DECD, ALU_INCB, ALU_DECB,
    ALU_NOTD, ALU_NEGD, ALU_ZERO
  } alu_op_t;

  typedef enum logic       {DSEL_A, DSEL_DX} dsel_t;
  typedef enum logic [2:0] {BSEL_C, BSEL_S, BSEL_X, BSEL_PC, BSEL_ND, BSEL_DX} bsel_t;
  typedef enum logic [1:0] {AXSEL_PC, AXSEL_S, AXSEL_DX, AXSEL_ND} axsel_t;
  typedef enum logic [2:0] {DOSEL_A, DOSEL_C, DOSEL_S, DOSEL_X, DOSEL_PC} dosel_t;

  // enables from the controller to the data path
  typedef struct packed {
    logic    a_ld, c_ld, s_ld, x_ld, pc_ld, nd_ld, ir_ld, dx_ld;
    logic    z_ld;        // C[Z] <= F.z
    logic    cy_ld;       // C[C] <= F.c
    logic    int_ld;      // C <= {Z, C, I=0, iid}
    dsel_t   dsel;
    bsel_t   bsel;
    alu_op_t alu_op;
    axsel_t  axsel;
    dosel_t  dosel;
    logic    rd, wr;
  } ctrl_t;

  // split an opcode
  function automatic logic [2:0] op_sel(input logic [7:0] op); return op[2:0]; endfunction

  function automatic mode_t op_mode(input logic [7:0] op);
    unique casez (op[4:2])
      3'b00?:  return M_IMP;
      3'b01?:  return M_IMM;
      3'b10?:  return M_DIR;
      3'b110:  return M_INDS;
      default: return M_INDX;
    endcase
  endfunction

  // true for the groups without a register operand (0-10 and 1-01)
  function automatic logic op_noreg(input logic [7:0] op);
    return (op[7] == 1'b0 && op[6:5] == 2'b10) || (op[7] == 1'b1 && op[6:5] == 2'b01);
  endfunction

endpackage
