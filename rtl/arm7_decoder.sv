// arm7_decoder: instruction decoder and condition test.
//
// Classifies a 32-bit ARM v4 instruction into one of the 37 instruction
// types of arm7_pkg::itype_e (the "_BR" types are those that write r15 and
// so end with a pipeline refill), and extracts the fields the EX stage
// needs: register numbers Rn, Rd, Rs, Rm (RdHi/RdLo of long multiplies sit
// in the Rn/Rd positions), data-processing opcode, shift type and amount,
// immediates (12-bit load/store offset, split 8-bit halfword offset,
// sign-extended word branch offset, 8-bit data-processing immediate with
// its rotate field), the P/U/B/W/L/S/H bits, the register list and the
// PSR-transfer controls. It also performs the condition test against the
// {N,Z,C,V} flags supplied: an instruction whose condition fails comes out
// as IT_NOP. Coprocessor instructions decode as undefined (there is no
// coprocessor), as do the architecturally undefined encodings. Thumb
// (BX to an odd address) is not supported: BX decodes normally and the
// core ignores bit 0 of the target. Combinational.
// The type list and the fields come from the design; the way each
// encoding is recognised follows the ARM v4 instruction formats.
// Most members of the decoded record are plain bit fields of the
// instruction (register numbers, shift fields, P/U/B/W/L bits, register
// list); only the type, the extended immediate and the condition result are
// computed here.
module arm7_decoder
  import arm7_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [3:0]  flags,
  output dec_t        dec,
  output logic        cond_ok
);

  logic [3:0] rd_f;
  logic       dp_writes;
  itype_e     t;
  int         nregs;

  always_comb begin
    rd_f      = instr[15:12];
    dp_writes = instr[24:23] != 2'b10;     // TST/TEQ/CMP/CMN write no Rd
    nregs     = 0;
    for (int i = 0; i < 16; i++) nregs += int'(instr[i]);

    unique case (instr[27:25])
      3'b000: begin
        if (instr[27:4] == 24'h12FFF1)
          t = IT_BX;
        else if (instr[27:22] == 6'b000000 && instr[7:4] == 4'b1001)
          t = instr[21] ? IT_MLA : IT_MUL;
        else if (instr[27:23] == 5'b00001 && instr[7:4] == 4'b1001)
          t = instr[21] ? IT_MLAL : IT_MULL;
        else if (instr[27:23] == 5'b00010 && instr[21:20] == 2'b00 && instr[11:4] == 8'h09)
          t = IT_SWP;
        else if (instr[7] && instr[4]) begin
          if (instr[6:5] == 2'b00)
            t = IT_UND;
          else if (instr[22])
            t = instr[20] ? (rd_f == 4'd15 ? IT_HLDR_IMMOFF_BR : IT_HLDR_IMMOFF) : IT_HSTR_IMMOFF;
          else
            t = instr[20] ? (rd_f == 4'd15 ? IT_HLDR_REGOFF_BR : IT_HLDR_REGOFF) : IT_HSTR_REGOFF;
        end
        else if (instr[24:23] == 2'b10 && !instr[20]) begin
          // PSR transfer space
          if (instr[21] == 1'b0 && instr[19:16] == 4'hF && instr[11:0] == 12'h0)
            t = IT_MRS;
          else if (instr[21] == 1'b1 && instr[15:4] == 12'hF00)
            t = instr[16] ? IT_MSR_REG : IT_MSR_REG_FLG;
          else
            t = IT_UND;
        end
        else if (instr[4])
          t = (dp_writes && rd_f == 4'd15) ? IT_DP_REG_SHIFT_BR : IT_DP_REG_SHIFT;
        else
          t = (dp_writes && rd_f == 4'd15) ? IT_DP_IMM_SHIFT_BR : IT_DP_IMM_SHIFT;
      end
      3'b001: begin
        if (instr[24:23] == 2'b10 && !instr[20])
          t = (instr[21] && instr[15:12] == 4'hF) ? IT_MSR_IMM_FLG : IT_UND;
        else
          t = (dp_writes && rd_f == 4'd15) ? IT_DP_IMM_BR : IT_DP_IMM;
      end
      3'b010:
        t = instr[20] ? (rd_f == 4'd15 ? IT_LDR_IMMOFF_BR : IT_LDR_IMMOFF) : IT_STR_IMMOFF;
      3'b011: begin
        if (instr[4]) t = IT_UND;
        else t = instr[20] ? (rd_f == 4'd15 ? IT_LDR_REGOFF_BR : IT_LDR_REGOFF) : IT_STR_REGOFF;
      end
      3'b100: begin
        if (nregs == 0) t = IT_UND;
        else if (instr[20]) begin
          if (nregs == 1) t = instr[15] ? IT_LDM_1R_BR : IT_LDM_1R;
          else            t = instr[15] ? IT_LDM_BR : IT_LDM;
        end else
          t = (nregs == 1) ? IT_STM_1R : IT_STM;
      end
      3'b101:  t = IT_B;
      3'b110:  t = IT_UND;
      default: t = instr[24] ? IT_SWI : IT_UND;
    endcase

    cond_ok = cond_pass(instr[31:28], flags);

    dec.itype   = cond_ok ? t : IT_NOP;
    dec.opcode  = aluop_e'(instr[24:21]);
    dec.s       = instr[20];
    dec.rn      = instr[19:16];
    dec.rd      = instr[15:12];
    dec.rs      = instr[11:8];
    dec.rm      = instr[3:0];
    dec.shtype  = shift_e'(instr[6:5]);
    dec.shimm   = instr[11:7];
    dec.rot     = instr[11:8];
    dec.p       = instr[24];
    dec.u       = instr[23];
    dec.b       = instr[22];
    dec.w       = instr[21];
    dec.l       = instr[20];
    dec.hs      = instr[6];
    dec.hh      = instr[5];
    dec.reglist = instr[15:0];
    dec.psr_r   = instr[22];
    dec.msr_ctl = instr[16];
    dec.link    = instr[24];
    unique case (instr[27:25])
      3'b000:  dec.imm = {24'h0, instr[11:8], instr[3:0]};      // halfword offset
      3'b001:  dec.imm = {24'h0, instr[7:0]};                   // rotated later
      3'b101:  dec.imm = {{6{instr[23]}}, instr[23:0], 2'b00};  // branch offset
      default: dec.imm = {20'h0, instr[11:0]};                  // load/store offset
    endcase
  end

endmodule
