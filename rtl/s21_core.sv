// s21_core: the S21 32-bit processor core.
//
// A multi-cycle implementation of the S21 instruction set: three-address
// register-to-register operations, ld/st with absolute, indirect and index
// addressing, jmp/jt/jf/jal/ret, mv, push/pop, trap, int/reti and the
// task-switch support savr/resr/savt/rest. The instruction set (formats,
// opcodes, meaning of each instruction, R[0] always zero, word addressing,
// interrupt vector at M[1000]) follows the architecture; the micro-
// architecture below is this design's own, since the architecture defines
// none.
//
// Control is a finite-state machine around one memory port:
//   FETCH   present PC to memory (or, if a hardware interrupt is requested,
//           save PC in RetAds and read the vector M[1000])
//   DECODE  latch the instruction, PC = PC + 1
//   EXEC    execute; ALU, mv, jumps, st, push, savt, rest, reti and trap
//           finish here
//   LOAD    write the word read by ld or pop into the register file
//   VEC     PC = M[1000] after a hardware or software interrupt
//   SAVR    one store per cycle for r0..r15 (16 cycles)
//   RESR    one load per cycle for r15..r0 (17 cycles, reads pipelined)
//   HALT    entered by trap 0; left only by reset
// So ALU, jump and store instructions take 3 cycles, ld and pop 4, savr 19
// and resr 20. "PC" in jal, int and interrupt entry is the address of the
// next instruction.
//
// Memory port: mem_addr/mem_we/mem_wdata are driven combinationally;
// mem_rdata must hold the word at the address given one cycle earlier.
// Traps: trap n pulses trap_valid for one cycle with trap_code = n and
// trap_value = R[30] (trap 1 prints it as an integer, trap 2 as a
// character, which is left to whoever watches these outputs); trap 0 also
// halts the core (halted = 1).
//
// Choices of this design where the architecture is silent: undefined
// opcodes execute as nop; push r1 r1 stores the incremented pointer and
// pop r1 r1 leaves the popped value minus one, as the step-by-step meaning
// of push/pop gives; savr stores, for the pointer register itself, the
// pointer value at that step of the sequence; resr does not load a popped
// word into the pointer register, which ends as R[sp] - 16. Reset is
// synchronous and active high and starts execution at address 0.
module s21_core
  import s21_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // memory
  output logic [XLEN-1:0] mem_addr,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_wdata,
  input  logic [XLEN-1:0] mem_rdata,
  // hardware interrupt
  input  logic            irq,
  output logic            irq_ack,
  // trap and status
  output logic            trap_valid,
  output logic [4:0]      trap_code,
  output logic [XLEN-1:0] trap_value,
  output logic            halted
);

  typedef enum logic [2:0] {
    S_FETCH, S_DECODE, S_EXEC, S_LOAD, S_VEC, S_SAVR, S_RESR, S_HALT
  } state_e;

  state_e          state, state_nx;
  logic [XLEN-1:0] pc, pc_nx;
  logic [XLEN-1:0] ir;
  logic [4:0]      cnt;
  logic [4:0]      ld_dest;
  logic            ld_dec;
  dec_t            d;

  // register file
  logic [4:0]      ra3;
  logic [XLEN-1:0] rv1, rv2, rv3;
  logic            rf_we;
  logic [4:0]      rf_wa;
  logic [XLEN-1:0] rf_wd;

  // ALU
  logic [XLEN-1:0] alu_b, alu_y;

  // interrupt unit
  logic            irq_req, hw_take, sw_int, reti, rest_we;
  logic [XLEN-1:0] retads;

  logic [XLEN-1:0] ea;

  s21_decoder u_dec (.instr(ir), .dec(d));

  s21_regfile u_rf (
    .clk, .rst,
    .ra1(d.r1), .rd1(rv1),
    .ra2(d.r2), .rd2(rv2),
    .ra3,       .rd3(rv3),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  assign alu_b = d.b_imm ? d.imm : rv3;
  s21_alu u_alu (.op(d.alu_op), .a(rv2), .b(alu_b), .y(alu_y));

  s21_intctl u_int (
    .clk, .rst, .irq, .irq_req, .irq_ack,
    .hw_take, .sw_int, .reti, .rest_we, .rest_data(rv1),
    .pc_in(pc), .retads, .in_service()
  );

  // Third read port: the loop register of savr, R[30] for trap, else r3.
  always_comb begin
    if (state == S_SAVR)      ra3 = cnt;
    else if (d.cls == IC_TRAP) ra3 = 5'd30;
    else                       ra3 = d.r3;
  end

  always_comb begin
    unique case (d.amode)
      AM_ABS:  ea = d.imm;
      AM_IND:  ea = d.imm + rv2;
      default: ea = rv2 + rv3;
    endcase
  end

  always_comb begin
    state_nx   = state;
    pc_nx      = pc;
    mem_addr   = pc;
    mem_we     = 1'b0;
    mem_wdata  = rv1;
    rf_we      = 1'b0;
    rf_wa      = d.r1;
    rf_wd      = alu_y;
    hw_take    = 1'b0;
    sw_int     = 1'b0;
    reti       = 1'b0;
    rest_we    = 1'b0;
    trap_valid = 1'b0;

    unique case (state)
      S_FETCH: begin
        if (irq_req) begin
          hw_take  = 1'b1;
          mem_addr = INT_VECTOR;
          state_nx = S_VEC;
        end else begin
          mem_addr = pc;
          state_nx = S_DECODE;
        end
      end

      S_DECODE: begin
        pc_nx    = pc + 1;
        state_nx = S_EXEC;
      end

      S_EXEC: begin
        state_nx = S_FETCH;
        unique case (d.cls)
          IC_ALU: begin
            rf_we = 1'b1;
            rf_wd = alu_y;
          end
          IC_MV: begin
            rf_we = 1'b1;
            rf_wd = d.b_imm ? d.imm : rv2;
          end
          IC_LD: begin
            mem_addr = ea;
            state_nx = S_LOAD;
          end
          IC_ST: begin
            mem_addr  = ea;
            mem_we    = 1'b1;
            mem_wdata = rv1;
          end
          IC_JMP: pc_nx = d.imm;
          IC_JT:  if (rv1 != '0) pc_nx = d.imm;
          IC_JF:  if (rv1 == '0) pc_nx = d.imm;
          IC_JAL: begin
            rf_we = 1'b1;
            rf_wd = pc;
            pc_nx = d.imm;
          end
          IC_RET: pc_nx = rv1;
          IC_TRAP: begin
            trap_valid = 1'b1;
            if (d.r1 == 5'd0) state_nx = S_HALT;
          end
          IC_PUSH: begin
            rf_we     = 1'b1;
            rf_wd     = rv1 + 1;
            mem_addr  = rv1 + 1;
            mem_we    = 1'b1;
            mem_wdata = (d.r2 == d.r1) ? rv1 + 1 : rv2;
          end
          IC_POP: begin
            rf_we    = 1'b1;
            rf_wd    = rv1 - 1;
            mem_addr = rv1;
            state_nx = S_LOAD;
          end
          IC_INT: begin
            sw_int   = 1'b1;
            mem_addr = INT_VECTOR;
            state_nx = S_VEC;
          end
          IC_RETI: begin
            reti  = 1'b1;
            pc_nx = retads;
          end
          IC_SAVR: state_nx = S_SAVR;
          IC_RESR: state_nx = S_RESR;
          IC_SAVT: begin
            rf_we = 1'b1;
            rf_wd = retads;
          end
          IC_REST: rest_we = 1'b1;
          default: ;  // nop and undefined opcodes
        endcase
      end

      S_LOAD: begin
        rf_we    = 1'b1;
        rf_wa    = ld_dest;
        rf_wd    = ld_dec ? mem_rdata - 1 : mem_rdata;
        state_nx = S_FETCH;
      end

      S_VEC: begin
        pc_nx    = mem_rdata;
        state_nx = S_FETCH;
      end

      S_SAVR: begin
        // Step cnt of "push r0..r15": R[sp]++ ; M[R[sp]] = R[cnt].
        mem_addr  = rv1 + XLEN'(cnt) + 1;
        mem_we    = 1'b1;
        mem_wdata = (cnt == d.r1) ? rv1 + XLEN'(cnt) + 1 : rv3;
        if (cnt == 5'd15) begin
          rf_we    = 1'b1;
          rf_wd    = rv1 + 16;
          state_nx = S_FETCH;
        end
      end

      S_RESR: begin
        // Read M[R[sp]-cnt] for cnt = 0..15; one cycle later write it to
        // R[16-cnt] (r15 first). The last cycle updates the pointer.
        mem_addr = rv1 - XLEN'(cnt);
        if (cnt == 5'd16) begin
          rf_we    = 1'b1;
          rf_wd    = rv1 - 16;
          state_nx = S_FETCH;
        end else if (cnt != 5'd0 && (5'd16 - cnt) != d.r1) begin
          rf_we = 1'b1;
          rf_wa = 5'd16 - cnt;
          rf_wd = mem_rdata;
        end
      end

      S_HALT: state_nx = S_HALT;

      default: state_nx = S_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_FETCH;
      pc      <= '0;
      ir      <= '0;
      cnt     <= '0;
      ld_dest <= '0;
      ld_dec  <= 1'b0;
    end else begin
      state <= state_nx;
      pc    <= pc_nx;
      if (state == S_DECODE) ir <= mem_rdata;
      if (state == S_SAVR || state == S_RESR) cnt <= cnt + 1;
      else                                    cnt <= '0;
      if (state == S_EXEC) begin
        ld_dest <= (d.cls == IC_POP) ? d.r2 : d.r1;
        ld_dec  <= (d.cls == IC_POP) && (d.r2 == d.r1);
      end
    end
  end

  assign trap_code  = d.r1;
  assign trap_value = rv3;
  assign halted     = (state == S_HALT);

endmodule
