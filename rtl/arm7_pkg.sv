// arm7_pkg: types and constants shared by the ARM7-like core.
//
// Holds the processor-mode encodings of the PSR mode field, the instruction
// type codes used by the decoder (the numeric codes 101..137 follow the
// instruction classification of the design; IT_NOP and IT_EXC are this
// design's own additions for a condition-failed slot and an exception-entry
// slot), the data-processing opcodes, shift kinds, the decoded-instruction
// record passed from the ID stage to the EX stage, and the mapping of an
// architectural register number in a given mode to a physical register of
// the banked register file.
package arm7_pkg;

  // PSR mode field M[4:0]
  typedef enum logic [4:0] {
    MODE_USR = 5'b10000,
    MODE_FIQ = 5'b10001,
    MODE_IRQ = 5'b10010,
    MODE_SVC = 5'b10011,
    MODE_ABT = 5'b10111,
    MODE_UND = 5'b11011,
    MODE_SYS = 5'b11111
  } mode_e;

  // Instruction types
  typedef enum logic [7:0] {
    IT_NOP             = 8'd100,
    IT_BX              = 8'd101,
    IT_MSR_REG         = 8'd102,
    IT_MSR_REG_FLG     = 8'd103,
    IT_MRS             = 8'd104,
    IT_SWP             = 8'd105,
    IT_MUL             = 8'd106,
    IT_MLA             = 8'd107,
    IT_MULL            = 8'd108,
    IT_MLAL            = 8'd109,
    IT_HLDR_REGOFF     = 8'd110,
    IT_HLDR_REGOFF_BR  = 8'd111,
    IT_HSTR_REGOFF     = 8'd112,
    IT_HLDR_IMMOFF     = 8'd113,
    IT_HLDR_IMMOFF_BR  = 8'd114,
    IT_HSTR_IMMOFF     = 8'd115,
    IT_DP_REG_SHIFT    = 8'd116,
    IT_DP_REG_SHIFT_BR = 8'd117,
    IT_DP_IMM_SHIFT    = 8'd118,
    IT_DP_IMM_SHIFT_BR = 8'd119,
    IT_MSR_IMM_FLG     = 8'd120,
    IT_DP_IMM          = 8'd121,
    IT_DP_IMM_BR       = 8'd122,
    IT_LDR_IMMOFF      = 8'd123,
    IT_LDR_IMMOFF_BR   = 8'd124,
    IT_STR_IMMOFF      = 8'd125,
    IT_LDR_REGOFF      = 8'd126,
    IT_LDR_REGOFF_BR   = 8'd127,
    IT_STR_REGOFF      = 8'd128,
    IT_UND             = 8'd129,
    IT_LDM_1R          = 8'd130,
    IT_LDM_1R_BR       = 8'd131,
    IT_STM_1R          = 8'd132,
    IT_LDM             = 8'd133,
    IT_LDM_BR          = 8'd134,
    IT_STM             = 8'd135,
    IT_B               = 8'd136,
    IT_SWI             = 8'd137,
    IT_EXC             = 8'd138
  } itype_e;

  // Data-processing opcodes, instruction bits [24:21]
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } aluop_e;

  typedef enum logic [1:0] {SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3} shift_e;

  // Exception kinds, in the order of the exception vector table
  typedef enum logic [2:0] {
    EXC_RESET = 3'd0, EXC_UND = 3'd1, EXC_SWI = 3'd2, EXC_PABT = 3'd3,
    EXC_DABT = 3'd4, EXC_IRQ = 3'd6, EXC_FIQ = 3'd7
  } exc_e;

  // Memory access size (MAS)
  typedef enum logic [1:0] {SZ_BYTE = 2'd0, SZ_HALF = 2'd1, SZ_WORD = 2'd2} size_e;

  // Source of the address register
  typedef enum logic [1:0] {AS_PCINC = 2'd0, AS_ALU = 2'd1, AS_LDMSTM = 2'd2, AS_INT = 2'd3} asel_e;

  // Decoded instruction, produced in ID and held in the ID/EX register
  typedef struct packed {
    itype_e      itype;
    aluop_e      opcode;
    logic        s;          // S bit (set flags / user-bank for LDM, STM)
    logic [3:0]  rn, rd, rs, rm;
    shift_e      shtype;
    logic [4:0]  shimm;      // immediate shift amount
    logic [31:0] imm;        // immediate operand, offset or branch offset, already extended
    logic [3:0]  rot;        // rotate field of a data-processing immediate
    logic        p, u, b, w, l;
    logic        hs, hh;     // halfword transfer S and H bits
    logic [15:0] reglist;
    logic        psr_r;      // MRS/MSR: 1 selects SPSR
    logic        msr_ctl;    // MSR writes the control field
    logic        link;       // BL
  } dec_t;

  // Physical register index of architectural register r in mode m.
  // 0-7 r0-r7, 8-14 r8-r14 (user/system), 15-21 r8-r14 fiq,
  // 22-23 svc, 24-25 abt, 26-27 irq, 28-29 und, 31 = r15 (not stored).
  function automatic logic [4:0] phys_idx(input logic [4:0] m, input logic [3:0] r);
    logic [4:0] idx;
    if (r == 4'd15)                       idx = 5'd31;
    else if (r < 4'd8)                    idx = {1'b0, r};
    else if (m == MODE_FIQ)               idx = 5'd15 + 5'(r - 4'd8);
    else if (r < 4'd13)                   idx = {1'b0, r};
    else begin
      unique case (m)
        MODE_SVC: idx = 5'd22 + 5'(r - 4'd13);
        MODE_ABT: idx = 5'd24 + 5'(r - 4'd13);
        MODE_IRQ: idx = 5'd26 + 5'(r - 4'd13);
        MODE_UND: idx = 5'd28 + 5'(r - 4'd13);
        default:  idx = {1'b0, r};
      endcase
    end
    return idx;
  endfunction

  // Condition test of Table "condition codes"; flags = {N,Z,C,V}
  function automatic logic cond_pass(input logic [3:0] cond, input logic [3:0] f);
    logic n, z, c, v;
    {n, z, c, v} = f;
    unique case (cond)
      4'h0: return z;
      4'h1: return !z;
      4'h2: return c;
      4'h3: return !c;
      4'h4: return n;
      4'h5: return !n;
      4'h6: return v;
      4'h7: return !v;
      4'h8: return c && !z;
      4'h9: return !c || z;
      4'hA: return n == v;
      4'hB: return n != v;
      4'hC: return !z && (n == v);
      4'hD: return z || (n != v);
      4'hE: return 1'b1;
      default: return 1'b0;   // NV: never
    endcase
  endfunction

endpackage
