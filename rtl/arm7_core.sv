// arm7_core: ARM7-like 32-bit RISC processor core (ARM v4 instruction set,
// ARM state only), the top of the design.
//
// Organisation. A three-stage pipeline, IF -> ID -> EX, on one von Neumann
// memory bus that carries instructions and data:
//   IF  the address register (arm7_addr_reg) drives a[31:0]; in a fetch
//       cycle (opc=1) the word on din is queued: in the IF/ID register, or
//       in a one-word fetch buffer behind it while IF/ID is still full.
//   ID  arm7_decoder classifies the instruction and tests its condition;
//       the register file is read (with the mode the instruction will run
//       in) through the forwarding unit, and the decoded record and
//       operands enter the ID/EX register when EX takes a new instruction.
//   EX  barrel shifter, ALU with its 64-bit adder and the 32x8 multiplier,
//       sequenced by the control FSMs below. Results are written back to
//       the register file in the cycle they are produced.
// Control. The EX stage is a main FSM (state X_NORMAL is the finish cycle
// of most instructions) with sub-FSMs:
//   load/store  X_LS_ADDR (address calculation, base write-back) then
//               X_LS_DATA (one memory cycle per transferred word; a store
//               finishes there, a load goes on to X_NORMAL, a load of r15
//               to the branch sub-FSM), swap X_LS_DATA -> X_SWP_WR -> X_NORMAL.
//   shift       X_SHIFT waits one cycle for the shift amount register, then
//               X_NORMAL, or the branch sub-FSM when Rd is r15.
//   branch      X_BR_CALC computes the new PC (or the exception vector),
//               flushes IF/ID, X_BR_REFILL fetches the target, X_NORMAL.
//   multiply    X_MUL while arm7_mul_fsm runs S1..S4/S_FINISH/MLA/LWRITE.
// So a data-processing instruction takes 1 cycle (2 with a register shift
// amount), a branch 3, LDR 3, STR 2, SWP 4, LDM n+2, STM n+1, multiply 2-7.
// While EX is busy, the pipeline holds and the bus serves data accesses;
// otherwise the bus fetches. The fetch buffer keeps the word fetched in a
// load or store's address cycle, so the next instruction follows the last
// data cycle without a gap; a word that finds both IF/ID and the buffer
// full is dropped and fetched again later. r15 reads as the instruction's
// address + 8 (+12 for a stored r15 or a register-specified shift), as the
// instruction set requires, independent of pipeline timing.
// Exceptions. arm7_exc_detect synchronises nFIQ/nIRQ (ISYNC low) and splits
// ABORT into prefetch and data abort. At an instruction boundary the core
// takes, in priority order, a pending data abort, FIQ, IRQ, then a prefetch
// abort of the next instruction, then SWI or undefined; entry runs as an
// exception slot (IT_EXC) through the branch sub-FSM: r14 and SPSR of the
// new mode are written, CPSR switches mode and masks IRQ (and FIQ for FIQ),
// and the vector is fetched. Reset enters supervisor mode at address 0.
// Bus timing. Every signal of the bus (a, nrw, mas, opc, dout) comes from a
// register and changes after the rising clock edge; din is sampled at the
// end of the same cycle (a zero-wait-state memory). ABORT applies to the
// access of the cycle in which it is high.
// What follows the published design: the block set, pipeline, FSM
// structure and state names, a fetch in every cycle not used for data (so
// a store is followed directly by the next instruction), multiplication timing, address-register sources, data alignment,
// exception detection and priorities, ARM state without Thumb and without
// coprocessor instructions. This design's own choices: the bus signal set
// and zero-wait timing, write-back in the producing cycle, the two-entry
// fetch queue with re-fetch of a word that finds it full, and base
// registers not restored on a data abort.
// Lint notes: fwd_hit, id_cond_ok and the address register's inc4 output
// are left unread in the core (they are observed by the testbench or used
// inside the sub-module); nreset also appears in the assertions' disable
// condition, which lint reports as a synchronous use.
module arm7_core
  import arm7_pkg::*;
(
  input  logic        clk,
  input  logic        nreset,     // active-low reset
  output logic [31:0] a,          // memory address
  input  logic [31:0] din,        // read data
  output logic [31:0] dout,       // write data (replicated for byte/halfword)
  output logic        nrw,        // 1: write, 0: read
  output size_e       mas,        // access size
  output logic        opc,        // 1: this access is an instruction fetch
  input  logic        mem_abort,  // memory abort for the current access
  input  logic        nfiq,       // fast interrupt request, active low
  input  logic        nirq,       // interrupt request, active low
  input  logic        isync       // 1: nFIQ/nIRQ already synchronous to clk
);

  typedef enum logic [3:0] {
    X_IDLE, X_NORMAL, X_SHIFT, X_BR_CALC, X_BR_REFILL,
    X_LS_ADDR, X_LS_DATA, X_SWP_WR, X_MUL
  } xstate_e;

  localparam int NRD = 5;   // ports 0-3: ID operands Rn, Rm, Rs, Rd; 4: EX (LDM/STM)

  // ---------------------------------------------------------------- state
  logic        ifid_v, ifid_pabt;
  logic [31:0] ifid_instr, ifid_pc;
  logic        pf_v, pf_pabt;          // fetch buffer behind IF/ID
  logic [31:0] pf_instr, pf_pc;

  logic        ex_v;
  dec_t        ex_dec;
  logic [31:0] ex_pc, ex_a, ex_b, ex_c, ex_d, ex_ret;
  exc_e        ex_exc;
  xstate_e     xs;

  logic [31:0] fpc;           // address of the next instruction to fetch
  logic        opc_q, nrw_q;
  size_e       mas_q;
  logic [31:0] wdata_q;
  logic [31:0] rdata_q;       // load data kept for r15 loads and swap
  logic [7:0]  shamt_q;
  logic [15:0] ls_list;       // LDM/STM registers still to transfer
  logic [63:0] acc_q;         // multiply accumulator (the adder's feedback register)
  logic [39:0] prod_q;        // partial product of the preceding cycle
  logic [1:0]  psh_q;         // its slice number (weight 2^(8*psh_q))
  logic        pv_q, pfirst_q; // prod_q is pending / it is the first slice
  logic        dabt_pend;
  logic        sgn_ld;        // signed load (read data selector)

  // ------------------------------------------------------------ datapath
  logic [31:0] cpsr, spsr_cur, cpsr_next;
  logic        cpsr_we, spsr_we;
  logic [31:0] cpsr_wdata, spsr_wdata;
  logic [4:0]  spsr_wmode;
  logic        w0_en, w1_en;
  logic [4:0]  w0_mode, w1_mode;
  logic [3:0]  w0_num, w1_num;
  logic [31:0] w0_data, w1_data;

  logic [NRD-1:0][4:0]  rd_mode, rd_idx;
  logic [NRD-1:0][3:0]  rd_num;
  logic [NRD-1:0][31:0] rd_data;
  logic [3:0][31:0]     id_op;
  logic [3:0]           fwd_hit;

  dec_t        id_dec;
  logic        id_cond_ok;

  logic [31:0] sh_val, sh_out;
  shift_e      sh_type;
  logic [7:0]  sh_amt;
  logic        sh_immf, sh_c;

  aluop_e      alu_op;
  logic [31:0] alu_a, alu_b, alu_res;
  logic [3:0]  alu_flags;
  logic [1:0]  mode64;
  logic [63:0] addend, sum64, acc_in;
  logic [39:0] prod;

  logic        m_start, m_busy, m_step, m_first, m_mbs, m_fin_st, m_mla, m_lw, m_finish;
  logic [1:0]  m_slice;
  logic [7:0]  m_byte;

  logic        pabt_d, dabt_d, fiq_d, irq_d;

  logic [31:0] rsel_out;
  size_e       ld_size;

  // address register control
  logic        ar_load;
  asel_e       ar_sel;
  logic [31:0] ar_alu, ar_vec, ar_inc4, pc_inc;

  // store-multiple: registers still to be written and the next one
  logic [15:0] st_list;
  logic [3:0]  st_reg;

  // ------------------------------------------------------ sub-modules
  arm7_regfile #(.NREAD(NRD)) u_rf (
    .clk, .nreset,
    .rd_mode, .rd_num, .rd_data, .rd_idx,
    .w0_en, .w0_mode, .w0_num, .w0_data,
    .w1_en, .w1_mode, .w1_num, .w1_data,
    .cpsr_we, .cpsr_wdata, .spsr_we, .spsr_wmode, .spsr_wdata,
    .cpsr, .spsr_cur
  );

  arm7_forward #(.NREAD(4)) u_fwd (
    .rd_idx  (rd_idx[3:0]),
    .rd_data (rd_data[3:0]),
    .w0_en, .w0_idx(phys_idx(w0_mode, w0_num)), .w0_data,
    .w1_en, .w1_idx(phys_idx(w1_mode, w1_num)), .w1_data,
    .fwd_data(id_op),
    .fwd_hit
  );

  arm7_decoder u_dec (
    .instr   (ifid_instr),
    .flags   (cpsr_next[31:28]),
    .dec     (id_dec),
    .cond_ok (id_cond_ok)
  );

  arm7_barrel_shifter u_bs (
    .val(sh_val), .shtype(sh_type), .amount(sh_amt), .imm_form(sh_immf),
    .cin(cpsr[29]), .result(sh_out), .cout(sh_c)
  );

  arm7_mul32x8 u_mul (
    .a(ex_b), .b(m_byte), .a_signed(ex_dec.b & ex_dec.itype inside {IT_MULL, IT_MLAL}),
    .b_signed(m_mbs), .p(prod)
  );

  arm7_alu u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .flags_in(cpsr[31:28]), .shc(sh_c),
    .mode64, .prod(prod_q), .prod_signed(ex_dec.b & ex_dec.itype inside {IT_MULL, IT_MLAL}),
    .prod_sh(psh_q), .addend, .acc(acc_in),
    .result(alu_res), .flags_out(alu_flags), .sum64
  );

  arm7_mul_fsm u_mfsm (
    .clk, .nreset, .start(m_start), .multiplier(id_op[2]),
    .is_signed(id_dec.b & id_dec.itype inside {IT_MULL, IT_MLAL}),
    .accumulate(id_dec.itype inside {IT_MLA, IT_MLAL}),
    .long_mul(id_dec.itype inside {IT_MULL, IT_MLAL}),
    .busy(m_busy), .step(m_step), .first(m_first), .slice(m_slice), .mbyte(m_byte),
    .mbyte_signed(m_mbs), .in_finish(m_fin_st), .in_mla(m_mla), .in_lwrite(m_lw),
    .finish(m_finish)
  );

  arm7_exc_detect u_exc (
    .clk, .nreset, .isync, .nfiq, .nirq, .mem_abort, .i_fetch_en(opc_q),
    .f_bit(cpsr[6]), .i_bit(cpsr[7]),
    .pabt(pabt_d), .dabt(dabt_d), .fiq(fiq_d), .irq(irq_d)
  );

  arm7_rdata_sel u_rsel (
    .din, .addr_lo(a[1:0]), .size(ld_size), .sign_ext(sgn_ld), .dout(rsel_out)
  );

  arm7_wdata_sel u_wsel (.wdata(wdata_q), .size(mas_q), .dout(dout));

  arm7_addr_reg u_ar (
    .clk, .nreset, .load(ar_load), .sel(ar_sel),
    .pc_inc, .alu(ar_alu), .vector(ar_vec), .a, .inc4(ar_inc4)
  );

  assign nrw = nrw_q;
  assign mas = mas_q;
  assign opc = opc_q;
  assign ld_size = mas_q;

  // ----------------------------------------------------------- helpers
  function automatic logic is_ls(input itype_e t);
    return t inside {IT_SWP, IT_HLDR_REGOFF, IT_HLDR_REGOFF_BR, IT_HSTR_REGOFF,
                     IT_HLDR_IMMOFF, IT_HLDR_IMMOFF_BR, IT_HSTR_IMMOFF,
                     IT_LDR_IMMOFF, IT_LDR_IMMOFF_BR, IT_STR_IMMOFF,
                     IT_LDR_REGOFF, IT_LDR_REGOFF_BR, IT_STR_REGOFF,
                     IT_LDM_1R, IT_LDM_1R_BR, IT_STM_1R, IT_LDM, IT_LDM_BR, IT_STM};
  endfunction

  function automatic logic is_bdt(input itype_e t);
    return t inside {IT_LDM_1R, IT_LDM_1R_BR, IT_STM_1R, IT_LDM, IT_LDM_BR, IT_STM};
  endfunction

  function automatic logic is_half(input itype_e t);
    return t inside {IT_HLDR_REGOFF, IT_HLDR_REGOFF_BR, IT_HSTR_REGOFF,
                     IT_HLDR_IMMOFF, IT_HLDR_IMMOFF_BR, IT_HSTR_IMMOFF};
  endfunction

  function automatic logic is_store(input itype_e t);
    return t inside {IT_HSTR_REGOFF, IT_HSTR_IMMOFF, IT_STR_IMMOFF, IT_STR_REGOFF,
                     IT_STM_1R, IT_STM};
  endfunction

  function automatic logic is_load_br(input itype_e t);
    return t inside {IT_HLDR_REGOFF_BR, IT_HLDR_IMMOFF_BR, IT_LDR_IMMOFF_BR,
                     IT_LDR_REGOFF_BR, IT_LDM_1R_BR, IT_LDM_BR};
  endfunction

  function automatic logic is_dp(input itype_e t);
    return t inside {IT_DP_REG_SHIFT, IT_DP_REG_SHIFT_BR, IT_DP_IMM_SHIFT,
                     IT_DP_IMM_SHIFT_BR, IT_DP_IMM, IT_DP_IMM_BR};
  endfunction

  function automatic logic is_dp_br(input itype_e t);
    return t inside {IT_DP_REG_SHIFT_BR, IT_DP_IMM_SHIFT_BR, IT_DP_IMM_BR};
  endfunction

  function automatic xstate_e first_state(input itype_e t);
    if (t inside {IT_DP_REG_SHIFT, IT_DP_REG_SHIFT_BR})           return X_SHIFT;
    if (t inside {IT_DP_IMM_SHIFT_BR, IT_DP_IMM_BR, IT_B, IT_BX,
                  IT_SWI, IT_UND, IT_EXC})                         return X_BR_CALC;
    if (is_ls(t))                                                  return X_LS_ADDR;
    if (t inside {IT_MUL, IT_MLA, IT_MULL, IT_MLAL})               return X_MUL;
    return X_NORMAL;
  endfunction

  function automatic logic [15:0] lowest_bit(input logic [15:0] v);
    return v & (~v + 16'd1);
  endfunction

  function automatic logic [3:0] bit_num(input logic [15:0] onehot);
    logic [3:0] n;
    n = 4'd0;
    for (int i = 0; i < 16; i++) if (onehot[i]) n = 4'(i);
    return n;
  endfunction

  function automatic logic [4:0] popcount16(input logic [15:0] v);
    logic [4:0] n;
    n = 5'd0;
    for (int i = 0; i < 16; i++) n += 5'(v[i]);
    return n;
  endfunction

  // ----------------------------------------------- ID stage register reads
  logic [4:0] mode_next;
  assign mode_next = cpsr_next[4:0];

  always_comb begin
    rd_num[0]  = ifid_instr[19:16];
    rd_num[1]  = ifid_instr[3:0];
    rd_num[2]  = ifid_instr[11:8];
    rd_num[3]  = ifid_instr[15:12];
    for (int i = 0; i < 4; i++) rd_mode[i] = mode_next;
    rd_num[4]  = st_reg;
    rd_mode[4] = (ex_dec.s && !ex_dec.l) ? MODE_USR : cpsr[4:0];
  end

  // operand value as seen by the instruction in ID (r15 reads as pc + 8/12)
  function automatic logic [31:0] id_operand(input int port);
    logic plus12;
    plus12 = (port == 3 && !ifid_instr[20] && ifid_instr[27:26] == 2'b01) ||   // STR r15
             (port == 3 && !ifid_instr[20] && ifid_instr[27:25] == 3'b000 &&
              ifid_instr[7] && ifid_instr[4]) ||                                // STRH r15
             (port != 3 && ifid_instr[27:25] == 3'b000 && ifid_instr[4] && !ifid_instr[7]);
    if (rd_num[port] == 4'd15) return ifid_pc + (plus12 ? 32'd12 : 32'd8);
    return id_op[port];
  endfunction

  // registers of an LDM/STM not yet transferred (including this cycle's)
  function automatic logic [15:0] ls_list_cur();
    return (xs == X_LS_ADDR) ? ex_dec.reglist : ls_list;
  endfunction

  // register whose value is put on the bus for the next STM cycle
  always_comb begin
    st_list = (xs == X_LS_ADDR) ? ex_dec.reglist : (ls_list & ~lowest_bit(ls_list));
    st_reg  = bit_num(lowest_bit(st_list));
  end

  // ------------------------------------------------- EX stage datapath
  logic [31:0] ls_off, ls_addr, ls_wb;
  logic [31:0] bdt_start, bdt_wb;
  logic [4:0]  bdt_n;
  logic [31:0] exc_vec;
  logic [4:0]  exc_mode;
  logic [15:0] cur_bit;
  logic [3:0]  cur_reg;
  logic [31:0] stm_val;

  always_comb begin
    // barrel shifter operand selection
    sh_val  = ex_b;
    sh_type = ex_dec.shtype;
    sh_amt  = {3'b000, ex_dec.shimm};
    sh_immf = 1'b1;
    if (ex_dec.itype inside {IT_DP_IMM, IT_DP_IMM_BR, IT_MSR_IMM_FLG}) begin
      sh_val  = ex_dec.imm;
      sh_type = SH_ROR;
      sh_amt  = {3'b000, ex_dec.rot, 1'b0};
      sh_immf = 1'b0;
    end else if (ex_dec.itype inside {IT_DP_REG_SHIFT, IT_DP_REG_SHIFT_BR}) begin
      sh_amt  = shamt_q;
      sh_immf = 1'b0;
    end
  end

  always_comb begin
    // load/store addresses
    if (is_half(ex_dec.itype))
      ls_off = ex_dec.itype inside {IT_HLDR_REGOFF, IT_HLDR_REGOFF_BR, IT_HSTR_REGOFF}
               ? ex_b : ex_dec.imm;
    else if (ex_dec.itype inside {IT_LDR_REGOFF, IT_LDR_REGOFF_BR, IT_STR_REGOFF})
      ls_off = sh_out;
    else
      ls_off = ex_dec.imm;
    bdt_n     = popcount16(ex_dec.reglist);
    bdt_start = ex_dec.u ? (ex_a + (ex_dec.p ? 32'd4 : 32'd0))
                         : (ex_a - {25'h0, bdt_n, 2'b00} + (ex_dec.p ? 32'd0 : 32'd4));
    bdt_wb    = ex_dec.u ? (ex_a + {25'h0, bdt_n, 2'b00}) : (ex_a - {25'h0, bdt_n, 2'b00});
    cur_bit   = lowest_bit(ls_list_cur());
    cur_reg   = bit_num(cur_bit);
    stm_val   = (st_reg == 4'd15) ? ex_pc + 32'd12 : rd_data[4];
  end

  always_comb begin
    // ALU operand selection
    alu_op = ex_dec.opcode;
    alu_a  = ex_a;
    alu_b  = sh_out;
    mode64 = 2'd0;
    addend = 64'h0;
    acc_in = acc_q;
    if (xs == X_LS_ADDR) begin
      alu_op = ex_dec.u ? OP_ADD : OP_SUB;
      alu_b  = ls_off;
    end else if (ex_dec.itype == IT_B) begin
      alu_op = OP_ADD;
      alu_a  = ex_pc + 32'd8;
      alu_b  = ex_dec.imm;
    end else if (xs == X_MUL) begin
      if (pv_q) begin
        mode64 = 2'd1;
        if (pfirst_q) acc_in = 64'h0;
      end else if (m_mla) begin
        mode64 = 2'd2;
        addend = (ex_dec.itype == IT_MLAL) ? {ex_a, ex_d} : {32'h0, ex_d};
      end
    end
    ls_addr = (ex_dec.p && ex_dec.itype != IT_SWP) ? alu_res : ex_a;
    ls_wb   = alu_res;
  end

  always_comb begin
    unique case (ex_exc)
      EXC_FIQ:  exc_mode = MODE_FIQ;
      EXC_IRQ:  exc_mode = MODE_IRQ;
      EXC_SWI:  exc_mode = MODE_SVC;
      EXC_UND:  exc_mode = MODE_UND;
      EXC_PABT, EXC_DABT: exc_mode = MODE_ABT;
      default:  exc_mode = MODE_SVC;
    endcase
    exc_vec = {27'h0, ex_exc, 2'b00};
  end

  // ------------------------------------------------------ EX control
  xstate_e     xs_n;
  logic        ex_done;      // last EX cycle of the current instruction
  logic        flush;        // discard IF/ID and the fetch of this cycle
  logic        data_next;    // next cycle is a data access
  logic        nrw_n, sgn_n;
  size_e       mas_n;
  logic [31:0] wdata_n;
  logic [31:0] br_target;
  logic        br_to_vec;
  logic [31:0] psr_val, psr_mask;

  always_comb begin
    xs_n       = xs;
    ex_done    = 1'b0;
    flush      = 1'b0;
    data_next  = 1'b0;
    nrw_n      = 1'b0;
    mas_n      = SZ_WORD;
    sgn_n      = 1'b0;
    wdata_n    = wdata_q;
    ar_alu     = alu_res;
    br_target  = alu_res;
    br_to_vec  = 1'b0;
    w0_en = 1'b0; w0_mode = cpsr[4:0]; w0_num = ex_dec.rd; w0_data = alu_res;
    w1_en = 1'b0; w1_mode = cpsr[4:0]; w1_num = ex_dec.rn; w1_data = ls_wb;
    cpsr_we    = 1'b0;
    cpsr_wdata = cpsr;
    spsr_we    = 1'b0;
    spsr_wmode = cpsr[4:0];
    spsr_wdata = cpsr;
    psr_val    = 32'h0;
    psr_mask   = 32'h0;

    if (ex_v) unique case (xs)
      X_NORMAL: begin
        ex_done = 1'b1;
        if (is_dp(ex_dec.itype) && !is_dp_br(ex_dec.itype)) begin
          w0_en = ex_dec.opcode[3:2] != 2'b10;
          if (ex_dec.s) begin
            cpsr_we    = 1'b1;
            cpsr_wdata = {alu_flags, cpsr[27:0]};
          end
        end else if (ex_dec.itype == IT_MRS) begin
          w0_en   = 1'b1;
          w0_data = ex_dec.psr_r ? spsr_cur : cpsr;
        end else if (ex_dec.itype inside {IT_MSR_REG, IT_MSR_REG_FLG, IT_MSR_IMM_FLG}) begin
          psr_val  = (ex_dec.itype == IT_MSR_IMM_FLG) ? sh_out : ex_b;
          psr_mask = 32'hF000_0000;
          if (ex_dec.msr_ctl && (ex_dec.psr_r || cpsr[4:0] != MODE_USR))
            psr_mask = psr_mask | 32'h0000_00DF;   // control field, T bit kept
          if (ex_dec.psr_r) begin
            spsr_we    = 1'b1;
            spsr_wdata = (spsr_cur & ~psr_mask) | (psr_val & psr_mask);
          end else begin
            cpsr_we    = 1'b1;
            cpsr_wdata = (cpsr & ~psr_mask) | (psr_val & psr_mask);
          end
        end else if (ex_dec.itype == IT_SWP) begin
          w0_en   = !dabt_pend;
          w0_data = rdata_q;
        end
      end

      X_SHIFT: xs_n = is_dp_br(ex_dec.itype) ? X_BR_CALC : X_NORMAL;

      X_BR_CALC: begin
        flush = 1'b1;
        xs_n  = X_BR_REFILL;
        if (ex_dec.itype inside {IT_EXC, IT_SWI, IT_UND}) begin
          br_to_vec  = 1'b1;
          br_target  = exc_vec;
          w0_en      = 1'b1;
          w0_mode    = exc_mode;
          w0_num     = 4'd14;
          w0_data    = ex_ret;
          spsr_we    = 1'b1;
          spsr_wmode = exc_mode;
          spsr_wdata = cpsr;
          cpsr_we    = 1'b1;
          cpsr_wdata = {cpsr[31:8], 1'b1,
                        cpsr[6] | (ex_exc inside {EXC_FIQ, EXC_RESET}), 1'b0, exc_mode};
        end else if (ex_dec.itype == IT_B) begin
          w0_en   = ex_dec.link;
          w0_num  = 4'd14;
          w0_data = ex_pc + 32'd4;
        end else if (ex_dec.itype == IT_BX) begin
          br_target = {ex_b[31:1], 1'b0};
        end else if (is_load_br(ex_dec.itype)) begin
          br_target = {rdata_q[31:2], 2'b00};
          if (is_bdt(ex_dec.itype) && ex_dec.s) begin
            cpsr_we    = 1'b1;
            cpsr_wdata = spsr_cur;
          end
        end else begin
          // data processing with Rd = r15
          br_target = {alu_res[31:2], 2'b00};
          if (ex_dec.s) begin
            cpsr_we    = 1'b1;
            cpsr_wdata = spsr_cur;
          end
        end
        ar_alu = br_target;
      end

      X_BR_REFILL: xs_n = X_NORMAL;

      X_LS_ADDR: begin
        data_next = 1'b1;
        xs_n      = X_LS_DATA;
        if (is_bdt(ex_dec.itype)) begin
          ar_alu  = bdt_start;
          w1_en   = ex_dec.w;
          w1_data = bdt_wb;
          nrw_n   = !ex_dec.l;
          wdata_n = stm_val;
        end else begin
          ar_alu  = ls_addr;
          w1_en   = (!ex_dec.p || ex_dec.w) && ex_dec.itype != IT_SWP;
          nrw_n   = is_store(ex_dec.itype);
          wdata_n = ex_d;
          if (is_half(ex_dec.itype)) begin
            mas_n = ex_dec.hh ? SZ_HALF : SZ_BYTE;
            sgn_n = ex_dec.hs;
          end else if (ex_dec.b) begin
            mas_n = SZ_BYTE;
          end
        end
      end

      X_LS_DATA: begin
        if (is_bdt(ex_dec.itype)) begin
          if (ex_dec.l) begin
            w0_en   = !dabt_pend && !dabt_d && cur_reg != 4'd15;
            w0_num  = cur_reg;
            w0_data = din;
            if (ex_dec.s && !ex_dec.reglist[15]) w0_mode = MODE_USR;
          end
          if ((ls_list & ~cur_bit) != 16'h0) begin
            data_next = 1'b1;
            nrw_n     = !ex_dec.l;
            wdata_n   = stm_val;
          end else if (!ex_dec.l) begin
            ex_done = 1'b1;
          end else begin
            xs_n = (is_load_br(ex_dec.itype) && !dabt_pend && !dabt_d) ? X_BR_CALC : X_NORMAL;
          end
        end else if (ex_dec.itype == IT_SWP) begin
          data_next = 1'b1;
          nrw_n     = 1'b1;
          mas_n     = mas_q;
          wdata_n   = ex_b;
          xs_n      = X_SWP_WR;
        end else if (is_store(ex_dec.itype)) begin
          ex_done = 1'b1;
        end else begin
          w0_en   = !dabt_d && ex_dec.rd != 4'd15;
          w0_data = rsel_out;
          xs_n    = (is_load_br(ex_dec.itype) && !dabt_d) ? X_BR_CALC : X_NORMAL;
        end
      end

      X_SWP_WR: xs_n = X_NORMAL;

      X_MUL: begin
        if (m_fin_st && !(ex_dec.itype inside {IT_MLA, IT_MULL, IT_MLAL})) begin
          w0_en   = 1'b1;
          w0_num  = ex_dec.rn;
          w0_data = sum64[31:0];
        end
        if (m_mla && ex_dec.itype == IT_MLA) begin
          w0_en   = 1'b1;
          w0_num  = ex_dec.rn;
          w0_data = sum64[31:0];
        end
        if (m_lw) begin
          w0_en   = 1'b1;
          w0_num  = ex_dec.rd;
          w0_data = acc_q[31:0];
          w1_en   = 1'b1;
          w1_num  = ex_dec.rn;
          w1_data = acc_q[63:32];
        end
        if (m_finish) begin
          ex_done = 1'b1;
          if (ex_dec.s) begin
            cpsr_we = 1'b1;
            if (m_lw)
              cpsr_wdata = {acc_q[63], acc_q == 64'h0, cpsr[29:0]};
            else
              cpsr_wdata = {w0_data[31], w0_data == 32'h0, cpsr[29:0]};
          end
        end
      end

      default: ex_done = 1'b1;
    endcase
    else ex_done = 1'b1;

    cpsr_next = cpsr_we ? cpsr_wdata : cpsr;
  end

  // --------------------------------------------- pipeline advance, fetch
  logic        take_new;     // EX takes a new slot this cycle
  logic        fetch_ok;     // the word fetched this cycle is queued
  logic        ifid_free;    // IF/ID is empty or moves into EX this cycle
  logic        id_to_ex;     // IF/ID moves into EX
  logic        exc_take;
  exc_e        exc_kind;
  logic [31:0] exc_ret, next_pc;

  always_comb begin
    take_new = ex_done && !flush;
    next_pc  = ifid_v ? ifid_pc : fpc;
    exc_take = 1'b0;
    exc_kind = EXC_RESET;
    exc_ret  = next_pc + 32'd4;
    id_to_ex = 1'b0;
    if (take_new) begin
      if (dabt_pend || (dabt_d && ex_v)) begin
        exc_take = 1'b1; exc_kind = EXC_DABT; exc_ret = ex_pc + 32'd8;
      end else if (fiq_d) begin
        exc_take = 1'b1; exc_kind = EXC_FIQ;
      end else if (irq_d) begin
        exc_take = 1'b1; exc_kind = EXC_IRQ;
      end else if (ifid_v) begin
        id_to_ex = 1'b1;
        if (ifid_pabt) begin
          exc_take = 1'b1; exc_kind = EXC_PABT; exc_ret = ifid_pc + 32'd4;
        end
      end
    end
    ifid_free = !ifid_v || id_to_ex;
    fetch_ok  = opc_q && !flush && (ifid_free || !pf_v);
    m_start  = id_to_ex && !exc_take &&
               id_dec.itype inside {IT_MUL, IT_MLA, IT_MULL, IT_MLAL};

    // next bus access
    pc_inc  = fetch_ok ? fpc + 32'd4 : fpc;
    ar_load = 1'b1;
    ar_sel  = AS_PCINC;
    ar_vec  = exc_vec;
    if (data_next) begin
      ar_sel  = (ex_v && xs == X_LS_DATA && is_bdt(ex_dec.itype)) ? AS_LDMSTM : AS_ALU;
      ar_load = !(ex_v && xs == X_LS_DATA && ex_dec.itype == IT_SWP);
    end else if (flush) begin
      ar_sel = br_to_vec ? AS_INT : AS_ALU;
    end
  end

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      ifid_v     <= 1'b0;
      ifid_pabt  <= 1'b0;
      ifid_instr <= 32'h0;
      ifid_pc    <= 32'h0;
      pf_v       <= 1'b0;
      pf_pabt    <= 1'b0;
      pf_instr   <= 32'h0;
      pf_pc      <= 32'h0;
      ex_v       <= 1'b0;
      ex_dec     <= '0;
      ex_pc      <= 32'h0;
      ex_a       <= 32'h0;
      ex_b       <= 32'h0;
      ex_c       <= 32'h0;
      ex_d       <= 32'h0;
      ex_ret     <= 32'h0;
      ex_exc     <= EXC_RESET;
      xs         <= X_IDLE;
      fpc        <= 32'h0;
      opc_q      <= 1'b1;
      nrw_q      <= 1'b0;
      mas_q      <= SZ_WORD;
      wdata_q    <= 32'h0;
      rdata_q    <= 32'h0;
      shamt_q    <= 8'h0;
      ls_list    <= 16'h0;
      acc_q      <= 64'h0;
      prod_q     <= 40'h0;
      psh_q      <= 2'd0;
      pv_q       <= 1'b0;
      pfirst_q   <= 1'b0;
      dabt_pend  <= 1'b0;
      sgn_ld     <= 1'b0;
    end else begin
      // bus control for the next cycle
      opc_q   <= !data_next;
      nrw_q   <= data_next ? nrw_n : 1'b0;
      mas_q   <= data_next ? mas_n : SZ_WORD;
      sgn_ld  <= sgn_n;
      wdata_q <= wdata_n;

      // fetch pointer
      if (flush)         fpc <= br_target;
      else if (fetch_ok) fpc <= fpc + 32'd4;

      // IF/ID and the fetch buffer, a two-entry queue (IF/ID is the head)
      if (flush) begin
        ifid_v <= 1'b0;
        pf_v   <= 1'b0;
      end else if (ifid_free) begin
        if (pf_v) begin
          ifid_v     <= 1'b1;
          ifid_instr <= pf_instr;
          ifid_pc    <= pf_pc;
          ifid_pabt  <= pf_pabt;
          pf_v       <= fetch_ok;
        end else begin
          ifid_v <= fetch_ok;
          if (fetch_ok) begin
            ifid_instr <= din;
            ifid_pc    <= fpc;
            ifid_pabt  <= pabt_d;
          end
        end
      end else if (fetch_ok) begin
        pf_v <= 1'b1;
      end
      if (!flush && fetch_ok && (pf_v || !ifid_free)) begin
        pf_instr <= din;
        pf_pc    <= fpc;
        pf_pabt  <= pabt_d;
      end

      // data abort of the instruction in EX
      if (take_new)                     dabt_pend <= 1'b0;
      else if (ex_v && !opc_q && dabt_d) dabt_pend <= 1'b1;

      // EX stage sub-FSM registers
      if (ex_v && xs == X_SHIFT) shamt_q <= ex_c[7:0];
      if (ex_v && xs inside {X_LS_ADDR, X_LS_DATA}) begin
        ls_list <= (xs == X_LS_ADDR) ? ex_dec.reglist : (ls_list & ~cur_bit);
        if (xs == X_LS_DATA && !nrw_q) rdata_q <= rsel_out;
      end
      if (ex_v && xs == X_MUL && (pv_q || m_mla)) acc_q <= sum64;
      pv_q     <= ex_v && xs == X_MUL && m_step;
      pfirst_q <= m_first;
      if (m_step) begin
        prod_q <= prod;
        psh_q  <= m_slice;
      end

      // ID/EX
      if (take_new) begin
        if (exc_take) begin
          ex_v         <= 1'b1;
          ex_dec       <= '0;
          ex_dec.itype <= IT_EXC;
          ex_exc       <= exc_kind;
          ex_ret       <= exc_ret;
          ex_pc        <= next_pc;
          xs           <= X_BR_CALC;
        end else if (id_to_ex) begin
          ex_v   <= 1'b1;
          ex_dec <= id_dec;
          ex_pc  <= ifid_pc;
          ex_a   <= id_operand(0);
          ex_b   <= id_operand(1);
          ex_c   <= id_operand(2);
          ex_d   <= id_operand(3);
          ex_ret <= ifid_pc + 32'd4;
          ex_exc <= (id_dec.itype == IT_SWI) ? EXC_SWI : EXC_UND;
          xs     <= first_state(id_dec.itype);
        end else begin
          ex_v <= 1'b0;
          xs   <= X_IDLE;
        end
      end else begin
        xs <= xs_n;
      end
    end
  end

  // ---------------------------------------------------------- assertions
  // The fetch buffer only holds a word while IF/ID holds an older one.
  a_queue_order: assert property (@(posedge clk) disable iff (!nreset) pf_v |-> ifid_v);
  // A store is never issued as an instruction fetch.
  a_fetch_is_read: assert property (@(posedge clk) disable iff (!nreset) opc_q |-> !nrw_q);
  // The multiplier sequencer runs only while a multiply is in EX.
  a_mul_in_ex: assert property (@(posedge clk) disable iff (!nreset) m_busy |-> (ex_v && xs == X_MUL));

endmodule
