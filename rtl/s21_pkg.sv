// s21_pkg: shared types and constants of the S21 32-bit processor.
//
// S21 has fixed 32-bit instructions in three formats, all with a 5-bit
// major opcode in bits [31:27] and the destination register r1 in [26:22]:
//   L-format  op:5 r1:5 ads:22           (absolute address or 22-bit immediate)
//   D-format  op:5 r1:5 r2:5 disp:17     (displacement or 17-bit immediate)
//   X-format  op:5 r1:5 r2:5 r3:5 xop:12 (major opcode 31, extended opcode xop)
// ads and disp are sign extended. The opcode and xop numbers below are the
// architecture's own; the instruction classes (iclass_e) and the decoded
// bundle (dec_t) are this implementation's internal encoding.
package s21_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned NREGS  = 32;
  // Address of the interrupt vector: on an interrupt PC = M[1000].
  localparam logic [XLEN-1:0] INT_VECTOR = 32'd1000;

  // Major opcodes (bits [31:27]).
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,  OP_LDA  = 5'd1,  OP_LDD  = 5'd2,  OP_STA  = 5'd3,
    OP_STD  = 5'd4,  OP_MVI  = 5'd5,  OP_JMP  = 5'd6,  OP_JAL  = 5'd7,
    OP_JT   = 5'd8,  OP_JF   = 5'd9,  OP_ADDI = 5'd10, OP_SUBI = 5'd11,
    OP_MULI = 5'd12, OP_DIVI = 5'd13, OP_ANDI = 5'd14, OP_ORI  = 5'd15,
    OP_XORI = 5'd16, OP_EQI  = 5'd17, OP_NEI  = 5'd18, OP_LTI  = 5'd19,
    OP_LEI  = 5'd20, OP_GTI  = 5'd21, OP_GEI  = 5'd22, OP_SHLI = 5'd23,
    OP_SHRI = 5'd24, OP_EXT  = 5'd31
  } opcode_e;

  // Extended opcodes of X-format (bits [11:0]).
  typedef enum logic [11:0] {
    XOP_ADD  = 12'd0,  XOP_SUB  = 12'd1,  XOP_MUL  = 12'd2,  XOP_DIV  = 12'd3,
    XOP_AND  = 12'd4,  XOP_OR   = 12'd5,  XOP_XOR  = 12'd6,  XOP_EQ   = 12'd7,
    XOP_NE   = 12'd8,  XOP_LT   = 12'd9,  XOP_LE   = 12'd10, XOP_GT   = 12'd11,
    XOP_GE   = 12'd12, XOP_SHL  = 12'd13, XOP_SHR  = 12'd14, XOP_MV   = 12'd15,
    XOP_LDX  = 12'd16, XOP_STX  = 12'd17, XOP_RET  = 12'd18, XOP_TRAP = 12'd19,
    XOP_PUSH = 12'd20, XOP_POP  = 12'd21, XOP_NOT  = 12'd22, XOP_INT  = 12'd23,
    XOP_RETI = 12'd24, XOP_SAVR = 12'd25, XOP_RESR = 12'd26, XOP_SAVT = 12'd27,
    XOP_REST = 12'd28
  } xop_e;

  // ALU operations. Values 0..14 equal the X-format xop and the D-format
  // opcode minus 10 of the same operation; ALU_NOT is internal.
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,  ALU_SUB = 4'd1,  ALU_MUL = 4'd2,  ALU_DIV = 4'd3,
    ALU_AND = 4'd4,  ALU_OR  = 4'd5,  ALU_XOR = 4'd6,  ALU_EQ  = 4'd7,
    ALU_NE  = 4'd8,  ALU_LT  = 4'd9,  ALU_LE  = 4'd10, ALU_GT  = 4'd11,
    ALU_GE  = 4'd12, ALU_SHL = 4'd13, ALU_SHR = 4'd14, ALU_NOT = 4'd15
  } alu_op_e;

  // Instruction classes, one per kind of control sequence in the core.
  typedef enum logic [4:0] {
    IC_NOP,  IC_ALU,  IC_MV,   IC_LD,   IC_ST,   IC_JMP,  IC_JT,  IC_JF,
    IC_JAL,  IC_RET,  IC_TRAP, IC_PUSH, IC_POP,  IC_INT,  IC_RETI,
    IC_SAVR, IC_RESR, IC_SAVT, IC_REST, IC_ILLEGAL
  } iclass_e;

  // Memory addressing modes of ld/st.
  typedef enum logic [1:0] {
    AM_ABS = 2'd0,   // M[ads]
    AM_IND = 2'd1,   // M[d + R[r2]]
    AM_IDX = 2'd2    // M[R[r2] + R[r3]]
  } amode_e;

  // One decoded instruction.
  typedef struct packed {
    iclass_e   cls;
    alu_op_e   alu_op;
    logic      b_imm;    // second ALU operand (or mv source) is imm
    amode_e    amode;
    logic [4:0] r1;
    logic [4:0] r2;
    logic [4:0] r3;
    logic [XLEN-1:0] imm; // sign-extended ads (L) or disp (D)
  } dec_t;

endpackage
