// cr_pkg: types, constants and pure functions shared by the CISC-to-microinstruction
// decoder front end.
//
// The decoder translates a small x86-like CISC instruction set into RISC-like
// microinstructions with three translators of different strength: a simple one
// (S, one microinstruction), a general one (G, one or two) and a complex one
// (C, one to three). Instructions needing four or more microinstructions go to a
// sequencer on their own. A scheduler reorders instructions inside a basic block
// so that as many cycles as possible use all three translators.
//
// What follows the design description: the 1S+1G+1C translator set and its
// capabilities, the sequencer for four or more microinstructions, the five
// instruction-mix types, the four fields of a mapping/translation-table entry
// (address, code, translator number, D bit), predecode bits that carry the
// microinstruction count, and 3 predecode bits per instruction byte (12 bits per
// 32-bit word, the 3/8 growth of the cache data array).
//
// This design's own choices: the CISC instruction word is a fixed 32-bit toy
// encoding of x86-like instructions (opcode, two operand kinds, two 4-bit operand
// ids, 14-bit immediate), memory operands are direct 4-bit addresses, and the
// microinstruction templates produced by crack() are illustrative. Only explicit
// operands take part in dependence checks, as in the worked example the design
// follows (LODSB's implicit AL/SI are not checked).
package cr_pkg;

  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned PD_W    = 12;  // predecode bits per 32-bit word
  localparam int unsigned AW      = 3;   // arrangement window = translators
  localparam int unsigned NLANES  = 6;   // S:1 + G:2 + C:3 microinstruction lanes
  localparam int unsigned NRES    = 24;  // 8 registers + 16 memory locations

  // CISC opcodes of the toy x86-like instruction set
  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,  OP_MOV  = 6'd1,  OP_ADD   = 6'd2,  OP_SUB  = 6'd3,
    OP_AND   = 6'd4,  OP_OR   = 6'd5,  OP_XOR   = 6'd6,  OP_CMP  = 6'd7,
    OP_SHR   = 6'd8,  OP_SHL  = 6'd9,  OP_INC   = 6'd10, OP_DEC  = 6'd11,
    OP_PUSH  = 6'd12, OP_POP  = 6'd13, OP_JCC   = 6'd14, OP_JMP  = 6'd15,
    OP_LODSB = 6'd16, OP_STOSB = 6'd17, OP_MOVSB = 6'd18, OP_PUSHA = 6'd19,
    OP_POPA  = 6'd20
  } cisc_op_e;

  typedef enum logic [1:0] {K_NONE = 2'd0, K_REG = 2'd1, K_MEM = 2'd2, K_IMM = 2'd3} opnd_kind_e;

  // Register numbers (an 8/16/32-bit register and its parts share a number)
  localparam logic [3:0] R_AX = 4'd0, R_CX = 4'd1, R_DX = 4'd2, R_BX = 4'd3,
                         R_SP = 4'd4, R_BP = 4'd5, R_SI = 4'd6, R_DI = 4'd7,
                         R_T0 = 4'd8, R_T1 = 4'd9, R_ZERO = 4'd15;

  // 32-bit CISC instruction word. dst operand: dk/did, source operand: sk/sid.
  // Single-operand instructions use dst, except PUSH, which uses src.
  // JCC keeps its condition in did and its displacement in imm.
  typedef struct packed {
    cisc_op_e    opc;
    opnd_kind_e  dk;
    opnd_kind_e  sk;
    logic [3:0]  did;
    logic [3:0]  sid;
    logic [13:0] imm;
  } cisc_code_t;

  // Predecode bits stored beside each word in the instruction cache (12 bits)
  typedef struct packed {
    logic       valid;        // word holds the start of an instruction
    logic [3:0] ucnt;         // number of microinstructions
    logic       sets_flags;
    logic       reads_flags;
    logic       is_branch;    // ends a basic block
    logic       rd_dst;       // dst operand is also read
    logic       wr_dst;       // dst operand is written
    logic       mem_rd;       // an explicit memory operand is read
    logic       mem_wr;       // an explicit memory operand is written
  } predecode_t;

  // Translator number field
  typedef enum logic [1:0] {T_S = 2'd0, T_G = 2'd1, T_C = 2'd2, T_SEQ = 2'd3} tnum_e;

  // Instruction as it sits in the instruction queue
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    cisc_code_t        code;
    predecode_t        pd;
  } qentry_t;

  // Entry of the mapping table and of the translation table:
  // instruction address, instruction code (with its predecode bits),
  // translator number, D = first instruction of a dispatch group, and the
  // rename tag rn: the instruction was moved ahead of an instruction that reads or
  // writes the register it writes (anti or output dependence), so its destination
  // register needs a new tag before execution.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    cisc_code_t        code;
    predecode_t        pd;
    tnum_e             tnum;
    logic              d;
    logic              rn;
  } mentry_t;

  // Microinstruction operations
  typedef enum logic [3:0] {
    U_NOP = 4'd0, U_MOV = 4'd1, U_LD = 4'd2, U_ST = 4'd3, U_ADD = 4'd4, U_SUB = 4'd5,
    U_AND = 4'd6, U_OR = 4'd7, U_XOR = 4'd8, U_SHR = 4'd9, U_SHL = 4'd10, U_BR = 4'd11,
    U_JMP = 4'd12, U_MOVB = 4'd13, U_RDDF = 4'd14
  } uop_op_e;

  // Microinstruction. LD: dst <= M[src1+imm]. ST: M[src1+imm] <= src2.
  // ALU: dst <= src1 op (use_imm ? imm : src2). dst = R_ZERO discards the result.
  typedef struct packed {
    logic              valid;
    uop_op_e           op;
    logic [3:0]        dst;
    logic [3:0]        src1;
    logic [3:0]        src2;
    logic              use_imm;
    logic [15:0]       imm;
    logic              sets_flags;
    logic              reads_flags;
    logic [3:0]        idx;    // position inside the CISC instruction's sequence
    logic              last;   // last microinstruction of the CISC instruction
    logic [1:0]        slot;   // position of the CISC instruction in its group
    logic [ADDR_W-1:0] addr;   // address of the CISC instruction
    logic              rn;     // dst is the register tagged for renaming
  } uop_t;

  // Predecoder: microinstruction count and dependence-relevant properties
  function automatic predecode_t predecode(cisc_code_t c);
    predecode_t p;
    p = '0;
    p.valid = 1'b1;
    unique case (c.opc)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHR, OP_SHL: begin
        p.sets_flags = 1'b1; p.rd_dst = 1'b1; p.wr_dst = 1'b1;
        p.ucnt = (c.dk == K_MEM) ? 4'd3 : (c.sk == K_MEM) ? 4'd2 : 4'd1;
      end
      OP_INC, OP_DEC: begin
        p.sets_flags = 1'b1; p.rd_dst = 1'b1; p.wr_dst = 1'b1;
        p.ucnt = (c.dk == K_MEM) ? 4'd3 : 4'd1;
      end
      OP_CMP: begin
        p.sets_flags = 1'b1; p.rd_dst = 1'b1;
        p.ucnt = (c.dk == K_MEM || c.sk == K_MEM) ? 4'd2 : 4'd1;
      end
      OP_MOV: begin
        p.wr_dst = 1'b1;
        p.ucnt = (c.dk == K_MEM && c.sk inside {K_MEM, K_IMM}) ? 4'd2 : 4'd1;
      end
      OP_PUSH:  p.ucnt = (c.sk inside {K_MEM, K_IMM}) ? 4'd3 : 4'd2;
      OP_POP:   begin p.wr_dst = 1'b1; p.ucnt = (c.dk == K_MEM) ? 4'd3 : 4'd2; end
      OP_JCC:   begin p.reads_flags = 1'b1; p.is_branch = 1'b1; p.ucnt = 4'd1; end
      OP_JMP:   begin p.is_branch = 1'b1; p.ucnt = 4'd1; end
      OP_LODSB: p.ucnt = 4'd4;
      OP_STOSB: begin p.wr_dst = 1'b1; p.ucnt = 4'd3; end
      OP_MOVSB: begin p.wr_dst = 1'b1; p.ucnt = 4'd5; end
      OP_PUSHA: p.ucnt = 4'd9;
      OP_POPA:  p.ucnt = 4'd8;
      default:  p.ucnt = 4'd1;  // NOP and unused opcodes
    endcase
    p.mem_rd = (c.sk == K_MEM) || (c.dk == K_MEM && p.rd_dst);
    p.mem_wr = (c.dk == K_MEM) && p.wr_dst;
    return p;
  endfunction

  // Resources read / written by an instruction: bits 7:0 registers, 23:8 memory
  function automatic logic [NRES-1:0] opnd_bit(opnd_kind_e k, logic [3:0] id);
    logic [NRES-1:0] m;
    m = '0;
    if (k == K_REG) m[5'(id[2:0])] = 1'b1;
    else if (k == K_MEM) m[8 + int'(id)] = 1'b1;
    return m;
  endfunction

  function automatic logic [NRES-1:0] res_reads(qentry_t e);
    return opnd_bit(e.code.sk, e.code.sid) |
           (e.pd.rd_dst ? opnd_bit(e.code.dk, e.code.did) : '0);
  endfunction

  function automatic logic [NRES-1:0] res_writes(qentry_t e);
    return e.pd.wr_dst ? opnd_bit(e.code.dk, e.code.did) : '0;
  endfunction

  // Can a group with these counts be translated in one cycle by 1S+1G+1C?
  // n: instructions, n2: those needing >= 2, n3: those needing 3, n4: >= 4.
  function automatic logic group_fits(int n, int n2, int n3, int n4);
    if (n4 > 0) return (n == 1);
    return (n <= 3) && (n2 <= 2) && (n3 <= 1);
  endfunction

  // Instruction-mix type of the arrangement window before any rearrangement.
  // v: valid instructions in the window (1..3), u: their microinstruction counts.
  function automatic logic [2:0] mix_type(int v, logic [3:0] u0, logic [3:0] u1, logic [3:0] u2);
    int n2, n3;
    if (u0 >= 4) return 3'd4;
    if (v <= 1) return 3'd5;
    n2 = int'(u0 >= 2) + int'(u1 >= 2);
    n3 = int'(u0 == 3) + int'(u1 == 3);
    if (!group_fits(2, n2, n3, int'(u1 >= 4))) return 3'd1;
    if (v < 3) return 3'd2;
    n2 += int'(u2 >= 2);
    n3 += int'(u2 == 3);
    if (!group_fits(3, n2, n3, int'(u2 >= 4))) return 3'd2;
    return 3'd3;
  endfunction

  // Translator for one member of a feasible group: three-microinstruction
  // instructions take C; two take G, else C; one take S, else G, else C.
  // busy: translators already taken by earlier members {C,G,S}.
  function automatic tnum_e pick_translator(logic [3:0] u, logic [2:0] busy);
    if (u >= 4) return T_SEQ;
    if (u == 3) return T_C;
    if (u == 2) return busy[1] ? T_C : T_G;
    return !busy[0] ? T_S : !busy[1] ? T_G : T_C;
  endfunction

  // k-th microinstruction of a CISC instruction (valid for k < ucnt)
  function automatic uop_t crack(cisc_code_t c, logic [3:0] k);
    uop_t u;
    uop_op_e aop;
    logic [3:0] srcr;   // register holding the source operand value
    logic       srci;   // source is the immediate
    u = '0;
    u.src1 = R_ZERO; u.src2 = R_ZERO; u.dst = R_ZERO;
    u.idx = k;
    unique case (c.opc)
      OP_ADD, OP_INC: aop = U_ADD;
      OP_SUB, OP_DEC, OP_CMP: aop = U_SUB;
      OP_AND: aop = U_AND;
      OP_OR:  aop = U_OR;
      OP_XOR: aop = U_XOR;
      OP_SHR: aop = U_SHR;
      OP_SHL: aop = U_SHL;
      default: aop = U_NOP;
    endcase
    srci = (c.sk == K_IMM) || (c.opc inside {OP_INC, OP_DEC});
    srcr = (c.sk == K_REG) ? c.sid : R_T0;
    unique case (c.opc)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHR, OP_SHL, OP_INC, OP_DEC, OP_CMP: begin
        if (c.dk == K_MEM) begin
          // load, operate, store (CMP: load, compare)
          if (k == 0) begin u.op = U_LD; u.dst = R_T0; u.imm = 16'(c.did); end
          else if (k == 1) begin
            u.op = aop; u.src1 = R_T0; u.src2 = (c.sk == K_REG) ? c.sid : R_ZERO;
            u.use_imm = srci; u.imm = (c.opc inside {OP_INC, OP_DEC}) ? 16'd1 : 16'(c.imm);
            u.dst = (c.opc == OP_CMP) ? R_ZERO : R_T0; u.sets_flags = 1'b1;
          end else begin u.op = U_ST; u.src2 = R_T0; u.imm = 16'(c.did); end
        end else if (c.sk == K_MEM && k == 0) begin
          u.op = U_LD; u.dst = R_T0; u.imm = 16'(c.sid);
        end else begin
          u.op = aop; u.src1 = c.did; u.src2 = srci ? R_ZERO : srcr; u.use_imm = srci;
          u.imm = (c.opc inside {OP_INC, OP_DEC}) ? 16'd1 : 16'(c.imm);
          u.dst = (c.opc == OP_CMP) ? R_ZERO : c.did; u.sets_flags = 1'b1;
        end
      end
      OP_MOV: begin
        if (c.dk == K_REG) begin
          if (c.sk == K_MEM) begin u.op = U_LD; u.dst = c.did; u.imm = 16'(c.sid); end
          else begin u.op = U_MOV; u.dst = c.did; u.src2 = c.sid; u.use_imm = srci; u.imm = 16'(c.imm); end
        end else if (c.sk == K_REG) begin
          u.op = U_ST; u.src2 = c.sid; u.imm = 16'(c.did);
        end else if (k == 0) begin
          if (c.sk == K_MEM) begin u.op = U_LD; u.dst = R_T0; u.imm = 16'(c.sid); end
          else begin u.op = U_MOV; u.dst = R_T0; u.use_imm = 1'b1; u.imm = 16'(c.imm); end
        end else begin u.op = U_ST; u.src2 = R_T0; u.imm = 16'(c.did); end
      end
      OP_PUSH: begin
        // [value to T0,] SP -= 4, M[SP] <= value
        logic [3:0] kk;
        kk = (c.sk == K_REG) ? k + 4'd1 : k;
        if (kk == 0) begin
          if (c.sk == K_MEM) begin u.op = U_LD; u.dst = R_T0; u.imm = 16'(c.sid); end
          else begin u.op = U_MOV; u.dst = R_T0; u.use_imm = 1'b1; u.imm = 16'(c.imm); end
        end else if (kk == 1) begin
          u.op = U_SUB; u.dst = R_SP; u.src1 = R_SP; u.use_imm = 1'b1; u.imm = 16'd4;
        end else begin
          u.op = U_ST; u.src1 = R_SP; u.src2 = (c.sk == K_REG) ? c.sid : R_T0;
        end
      end
      OP_POP: begin
        if (k == 0) begin u.op = U_LD; u.src1 = R_SP; u.dst = (c.dk == K_REG) ? c.did : R_T0; end
        else if (k == 1) begin
          u.op = U_ADD; u.dst = R_SP; u.src1 = R_SP; u.use_imm = 1'b1; u.imm = 16'd4;
        end else begin u.op = U_ST; u.src2 = R_T0; u.imm = 16'(c.did); end
      end
      OP_JCC: begin u.op = U_BR; u.dst = c.did; u.imm = 16'(c.imm); u.reads_flags = 1'b1; end
      OP_JMP: begin u.op = U_JMP; u.imm = 16'(c.imm); end
      OP_LODSB: begin
        unique case (k)
          4'd0:    begin u.op = U_LD; u.dst = R_T0; u.src1 = R_SI; end
          4'd1:    begin u.op = U_MOVB; u.dst = R_AX; u.src1 = R_AX; u.src2 = R_T0; end
          4'd2:    begin u.op = U_RDDF; u.dst = R_T1; end
          default: begin u.op = U_ADD; u.dst = R_SI; u.src1 = R_SI; u.src2 = R_T1; end
        endcase
      end
      OP_STOSB: begin
        unique case (k)
          4'd0:    begin u.op = U_ST; u.src1 = R_DI; u.src2 = R_AX; end
          4'd1:    begin u.op = U_RDDF; u.dst = R_T1; end
          default: begin u.op = U_ADD; u.dst = R_DI; u.src1 = R_DI; u.src2 = R_T1; end
        endcase
      end
      OP_MOVSB: begin
        unique case (k)
          4'd0:    begin u.op = U_LD; u.dst = R_T0; u.src1 = R_SI; end
          4'd1:    begin u.op = U_ST; u.src1 = R_DI; u.src2 = R_T0; end
          4'd2:    begin u.op = U_RDDF; u.dst = R_T1; end
          4'd3:    begin u.op = U_ADD; u.dst = R_SI; u.src1 = R_SI; u.src2 = R_T1; end
          default: begin u.op = U_ADD; u.dst = R_DI; u.src1 = R_DI; u.src2 = R_T1; end
        endcase
      end
      OP_PUSHA: begin
        // eight stores below SP (AX first), then SP -= 32
        if (k < 8) begin
          u.op = U_ST; u.src1 = R_SP; u.src2 = {1'b0, k[2:0]};
          u.imm = 16'(-(4 * (int'(k) + 1)));
        end else begin
          u.op = U_SUB; u.dst = R_SP; u.src1 = R_SP; u.use_imm = 1'b1; u.imm = 16'd32;
        end
      end
      OP_POPA: begin
        // DI,SI,BP,(skip SP),BX,DX,CX,AX from SP+0.., then SP += 32
        if (k < 7) begin
          u.op = U_LD; u.src1 = R_SP;
          u.dst = (k < 3) ? 4'(7 - int'(k)) : 4'(6 - int'(k));
          u.imm = (k < 3) ? 16'(4 * int'(k)) : 16'(4 * (int'(k) + 1));
        end else begin
          u.op = U_ADD; u.dst = R_SP; u.src1 = R_SP; u.use_imm = 1'b1; u.imm = 16'd32;
        end
      end
      default: u.op = U_NOP;
    endcase
    return u;
  endfunction

endpackage
