// s21_decoder: combinational instruction decoder of the S21 processor.
//
// Splits a 32-bit instruction word into its fields and classifies it.
// The field layout, the sign extension of ads (22 bits) and disp (17 bits)
// and the opcode / xop numbering are those of the S21 architecture. The
// grouping into instruction classes (s21_pkg::iclass_e) is this design's own.
// Opcodes 25..30 and xop values 29..4095 are undefined by the architecture;
// they decode to IC_ILLEGAL, which the core executes as a no-operation.
//
// Interface: instr in, dec (s21_pkg::dec_t) out. No clock, no state.
module s21_decoder
  import s21_pkg::*;
(
  input  logic [XLEN-1:0] instr,
  output dec_t            dec
);

  logic [4:0]  op;
  logic [11:0] xop;

  assign op  = instr[31:27];
  assign xop = instr[11:0];

  always_comb begin
    dec        = '0;
    dec.cls    = IC_ILLEGAL;
    dec.alu_op = ALU_ADD;
    dec.amode  = AM_ABS;
    dec.r1     = instr[26:22];
    dec.r2     = instr[21:17];
    dec.r3     = instr[16:12];
    // L-format carries a 22-bit field, D-format a 17-bit field.
    if (op inside {OP_NOP, OP_LDA, OP_STA, OP_MVI, OP_JMP, OP_JAL, OP_JT, OP_JF})
      dec.imm = {{10{instr[21]}}, instr[21:0]};
    else
      dec.imm = {{15{instr[16]}}, instr[16:0]};

    unique case (op)
      OP_NOP:  dec.cls = IC_NOP;
      OP_LDA:  begin dec.cls = IC_LD; dec.amode = AM_ABS; end
      OP_LDD:  begin dec.cls = IC_LD; dec.amode = AM_IND; end
      OP_STA:  begin dec.cls = IC_ST; dec.amode = AM_ABS; end
      OP_STD:  begin dec.cls = IC_ST; dec.amode = AM_IND; end
      OP_MVI:  begin dec.cls = IC_MV; dec.b_imm = 1'b1; end
      OP_JMP:  dec.cls = IC_JMP;
      OP_JAL:  dec.cls = IC_JAL;
      OP_JT:   dec.cls = IC_JT;
      OP_JF:   dec.cls = IC_JF;
      OP_EXT: begin
        if (xop <= 12'd14) begin
          dec.cls    = IC_ALU;
          dec.alu_op = alu_op_e'(xop[3:0]);
        end else begin
          unique case (xop)
            XOP_MV:   dec.cls = IC_MV;
            XOP_LDX:  begin dec.cls = IC_LD; dec.amode = AM_IDX; end
            XOP_STX:  begin dec.cls = IC_ST; dec.amode = AM_IDX; end
            XOP_RET:  dec.cls = IC_RET;
            XOP_TRAP: dec.cls = IC_TRAP;
            XOP_PUSH: dec.cls = IC_PUSH;
            XOP_POP:  dec.cls = IC_POP;
            XOP_NOT:  begin dec.cls = IC_ALU; dec.alu_op = ALU_NOT; end
            XOP_INT:  dec.cls = IC_INT;
            XOP_RETI: dec.cls = IC_RETI;
            XOP_SAVR: dec.cls = IC_SAVR;
            XOP_RESR: dec.cls = IC_RESR;
            XOP_SAVT: dec.cls = IC_SAVT;
            XOP_REST: dec.cls = IC_REST;
            default:  dec.cls = IC_ILLEGAL;
          endcase
        end
      end
      default: begin
        // D-format register-immediate ALU operations, opcodes 10..24.
        if (op >= 5'd10 && op <= 5'd24) begin
          dec.cls    = IC_ALU;
          dec.alu_op = alu_op_e'(4'(op - 5'd10));
          dec.b_imm  = 1'b1;
        end else begin
          dec.cls = IC_ILLEGAL;
        end
      end
    endcase
  end

endmodule
