// tb_arm7_core: end-to-end test of the processor core at its default size.
//
// Assembles a test program in SystemVerilog functions (no external files),
// loads it into a behavioural memory and runs the core until the program
// writes the done address. The program exercises every instruction class
// (data processing with immediate, immediate-shift and register-shift
// operands, condition codes, MRS/MSR, MUL/MLA/UMULL/SMULL/SMLAL, LDR/STR
// word and byte with pre/post indexing and write-back, LDRH/STRH/LDRSB/LDRSH,
// unaligned LDR, LDM/STM, SWP, B/BL/BX, a loop) and every exception (SWI,
// undefined, data abort, prefetch abort, IRQ, FIQ). Each result is stored to
// a result area and compared with a value worked out by hand. The testbench
// also counts the mechanisms of the core (forwarding, register-shift wait,
// branch refill, condition-failed slots, multiply early end and the full
// 7-cycle multiply, LDM/STM bursts, swap, fetch-buffer fills, dropped
// fetches and each exception kind) and fails any that never happened,
// checks that no store leaves an idle EX cycle behind it and that EX is
// never idle once the first instruction has entered it, and checks the EX-stage cycle
// count of each instruction class against the design's timing.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_core;
  import arm7_pkg::*;

  logic clk = 1'b0, nreset = 1'b1;

  // Reset falls before the first clock edge, so the core's bus registers are
  // cleared asynchronously and the memory never sees their power-up values.
  initial #1 nreset = 1'b0;
  logic [31:0] a, din, dout;
  logic nrw, opc, mem_abort, nfiq, nirq, isync;
  size_e mas;

  int checks = 0, failures = 0, cycle = 0;

  arm7_core dut (.*);
  arm7_mem_model #(.WORDS(8192)) mem (.clk, .a, .wdata(dout), .nrw, .mas, .rdata(din));

  always #5 clk = ~clk;

  // ------------------------------------------------------------ assembler
  localparam logic [3:0] AL = 4'hE, MI = 4'h4, PL = 4'h5, NE = 4'h1;
  logic [31:0] prog [int];
  int unsigned pc_asm;
  int unsigned pabt_addr, irq_trig_pc;

  function automatic void emit(input logic [31:0] w);
    prog[pc_asm] = w;
    pc_asm += 4;
  endfunction
  function automatic logic [31:0] dpi(input logic [3:0] c, input aluop_e op, input logic s,
                                      input int rn, input int rd, input int rot, input int imm8);
    return {c, 3'b001, op, s, 4'(rn), 4'(rd), 4'(rot), 8'(imm8)};
  endfunction
  function automatic logic [31:0] dpr(input aluop_e op, input logic s, input int rn, input int rd,
                                      input int rm, input shift_e st = SH_LSL, input int sh = 0);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 5'(sh), st, 1'b0, 4'(rm)};
  endfunction
  function automatic logic [31:0] dprs(input aluop_e op, input logic s, input int rn, input int rd,
                                       input int rm, input shift_e st, input int rs);
    return {AL, 3'b000, op, s, 4'(rn), 4'(rd), 4'(rs), 1'b0, st, 1'b1, 4'(rm)};
  endfunction
  // single data transfer, immediate offset
  function automatic logic [31:0] sdt(input logic l, input logic b, input logic p, input logic u,
                                      input logic w, input int rn, input int rd, input int off);
    return {AL, 3'b010, p, u, b, w, l, 4'(rn), 4'(rd), 12'(off)};
  endfunction
  function automatic logic [31:0] sdtr(input logic l, input int rn, input int rd, input int rm,
                                       input int sh);
    return {AL, 3'b011, 1'b1, 1'b1, 1'b0, 1'b0, l, 4'(rn), 4'(rd), 5'(sh), SH_LSL, 1'b0, 4'(rm)};
  endfunction
  function automatic logic [31:0] hdt(input logic l, input logic s, input logic h, input int rn,
                                      input int rd, input int off);
    return {AL, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, l, 4'(rn), 4'(rd), 4'(off >> 4), 1'b1, s, h, 1'b1,
            4'(off)};
  endfunction
  function automatic logic [31:0] bdt(input logic l, input logic p, input logic u, input logic w,
                                      input int rn, input logic [15:0] list);
    return {AL, 3'b100, p, u, 1'b0, w, l, 4'(rn), list};
  endfunction
  function automatic logic [31:0] br(input logic [3:0] c, input logic link, input int unsigned from,
                                     input int unsigned to);
    int off;
    off = (int'(to) - int'(from) - 8) / 4;
    return {c, 3'b101, link, 24'(off)};
  endfunction
  function automatic logic [31:0] mul(input logic acc, input int rd, input int rn, input int rs,
                                      input int rm);
    return {AL, 6'b000000, acc, 1'b0, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] mull(input logic sgn, input logic acc, input int hi, input int lo,
                                       input int rs, input int rm);
    return {AL, 5'b00001, sgn, acc, 1'b0, 4'(hi), 4'(lo), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] swp(input int rn, input int rd, input int rm);
    return {AL, 5'b00010, 1'b0, 2'b00, 4'(rn), 4'(rd), 8'h09, 4'(rm)};
  endfunction
  function automatic logic [31:0] mrs(input int rd);
    return {AL, 5'b00010, 1'b0, 2'b00, 4'hF, 4'(rd), 12'h000};
  endfunction
  function automatic logic [31:0] msr_imm(input logic ctl, input int rot, input int imm8);
    return {AL, 5'b00110, 1'b0, 2'b10, 3'b100, ctl, 4'hF, 4'(rot), 8'(imm8)};
  endfunction

  // store a register to the result area, post-increment r12
  logic [31:0] expect_q [$];
  function automatic void st(input int r, input logic [31:0] exp);
    emit(sdt(1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 12, r, 4));
    expect_q.push_back(exp);
  endfunction
  localparam logic [31:0] NOPI = 32'hE1A00000;   // MOV r0, r0

  int unsigned swi_pc;

  task automatic build();
    int unsigned t;
    // exception vectors
    pc_asm = 0;
    emit(br(AL, 1'b0, 0, 32'h100));
    emit(dpr(OP_MOV, 1'b1, 0, 15, 14));              // und:  MOVS pc, lr
    emit(dpr(OP_MOV, 1'b1, 0, 15, 14));              // swi
    emit(dpr(OP_MOV, 1'b1, 0, 15, 14));              // pabt: skip the instruction
    emit(dpi(AL, OP_SUB, 1'b1, 14, 15, 0, 4));       // dabt: SUBS pc, lr, #4
    emit(NOPI);
    emit(dpi(AL, OP_SUB, 1'b1, 14, 15, 0, 4));       // irq
    emit(dpi(AL, OP_SUB, 1'b1, 14, 15, 0, 4));       // fiq
    pc_asm = 32'h100;
    emit(dpi(AL, OP_MOV, 0, 0, 12, 10, 1));          // r12 = 0x1000
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 5));
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 7));
    emit(dpr(OP_ADD, 0, 0, 2, 1));                   st(2, 12);
    emit(dpr(OP_SUB, 1, 0, 3, 1));                   st(3, 32'hFFFF_FFFE);
    emit(dpi(MI, OP_MOV, 0, 0, 4, 0, 1));
    emit(dpi(PL, OP_MOV, 0, 0, 4, 0, 2));            st(4, 1);
    emit(dpi(AL, OP_RSB, 0, 0, 5, 0, 100));          st(5, 95);
    emit(dpr(OP_MOV, 0, 0, 6, 1, SH_LSL, 4));        st(6, 112);
    emit(dpi(AL, OP_MOV, 0, 0, 7, 0, 3));
    emit(dprs(OP_MOV, 0, 0, 8, 1, SH_LSL, 7));       st(8, 56);
    emit(dpi(AL, OP_MVN, 0, 0, 9, 0, 0));
    emit(dpi(AL, OP_ADD, 1, 9, 10, 0, 1));
    emit(dpr(OP_ADC, 0, 0, 11, 0));                  st(11, 11);
    st(10, 0);
    emit(dpr(OP_MOV, 0, 0, 6, 9, SH_LSR, 28));       st(6, 32'hF);
    emit(dpi(AL, OP_MOV, 0, 0, 6, 1, 2));
    emit(dpr(OP_MOV, 0, 0, 7, 6, SH_ASR, 4));        st(7, 32'hF800_0000);
    emit(dpr(OP_MOV, 0, 0, 7, 0, SH_ROR, 1));        st(7, 32'h8000_0002);
    emit(dpr(OP_EOR, 0, 0, 7, 1));                   st(7, 2);
    emit(dpi(AL, OP_BIC, 0, 9, 7, 0, 8'hFF));        st(7, 32'hFFFF_FF00);
    emit(dpi(AL, OP_ORR, 0, 0, 7, 0, 8'h30));        st(7, 32'h35);
    // multiplies
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 8'h12));
    emit(dpi(AL, OP_ORR, 0, 0, 0, 12, 8'h34));       // r0 = 0x3412 (two multiplier bytes)
    emit(dpi(AL, OP_MOV, 0, 0, 8, 0, 8'h56));
    emit(dpi(AL, OP_ORR, 0, 8, 8, 8, 8'h78));        // r8 = 0x780056 (three bytes)
    emit(mul(0, 2, 0, 0, 8));                        st(2, 32'(64'h780056 * 64'h3412));
    emit(mul(1, 3, 2, 8, 2));                        // uses r2 straight from the multiply
    st(3, 32'(64'h780056 * 64'h3412 * 64'h780056 + 64'h780056 * 64'h3412));
    emit(mull(0, 0, 5, 4, 8, 0));
    st(4, 32'(64'h780056 * 64'h3412)); st(5, 32'((64'h780056 * 64'h3412) >> 32));
    emit(dpi(AL, OP_MOV, 0, 0, 0, 12, 1));           // r0 = 0x100
    emit(mul(0, 2, 0, 1, 0));                        st(2, 32'h700);
    emit(mul(1, 3, 0, 1, 1));                        st(3, 32'h131);
    emit(mull(0, 0, 5, 4, 9, 9));                    st(4, 1); st(5, 32'hFFFF_FFFE);
    emit(mull(1, 1, 5, 4, 9, 1));                    st(4, 32'hFFFF_FFFA); st(5, 32'hFFFF_FFFD);
    emit(mull(1, 0, 7, 6, 1, 9));                    st(6, 32'hFFFF_FFF9); st(7, 32'hFFFF_FFFF);
    // loads and stores
    emit(dpi(AL, OP_MOV, 0, 0, 11, 12, 8'h14));      // r11 = 0x1400
    emit(sdt(0, 0, 1, 1, 0, 11, 9, 0));              // STR r9, [r11]
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 8'h12));
    emit(sdt(0, 1, 1, 1, 0, 11, 0, 1));              // STRB r0, [r11, #1]
    emit(dpi(AL, OP_MOV, 0, 0, 0, 9, 2));            // r0 = 0x8000
    emit(dpi(AL, OP_ORR, 0, 0, 0, 0, 8'h34));
    emit(hdt(0, 0, 1, 11, 0, 2));                    // STRH r0, [r11, #2]
    emit(sdt(1, 0, 1, 1, 0, 11, 1, 0));              st(1, 32'h8034_12FF);
    emit(sdt(1, 1, 1, 1, 0, 11, 2, 1));
    emit(dpi(AL, OP_ADD, 0, 2, 2, 0, 1));            st(2, 32'h13);
    emit(hdt(1, 1, 0, 11, 3, 3));                    st(3, 32'hFFFF_FF80);
    emit(hdt(1, 0, 1, 11, 4, 2));                    st(4, 32'h8034);
    emit(hdt(1, 1, 1, 11, 5, 2));                    st(5, 32'hFFFF_8034);
    emit(sdt(1, 0, 1, 1, 0, 11, 6, 1));              st(6, 32'hFF80_3412);
    emit(dpi(AL, OP_MOV, 0, 0, 7, 0, 4));
    emit(sdtr(0, 11, 1, 7, 1));                      // STR r1, [r11, r7, LSL #1]
    emit(sdt(1, 0, 1, 1, 0, 11, 8, 8));              st(8, 32'h8034_12FF);
    emit(sdt(1, 0, 1, 1, 1, 11, 8, 8));              st(11, 32'h1408);
    emit(sdt(1, 0, 0, 0, 0, 11, 8, 8));              st(11, 32'h1400);
    // block transfers
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 1));
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 2));
    emit(dpi(AL, OP_MOV, 0, 0, 2, 0, 3));
    emit(dpi(AL, OP_MOV, 0, 0, 3, 0, 4));
    emit(bdt(0, 0, 1, 1, 11, 16'h000F));             st(11, 32'h1410);
    emit(bdt(1, 1, 0, 1, 11, 16'h00F0));
    emit(dpr(OP_ADD, 0, 4, 4, 7));                   st(4, 5); st(5, 2); st(11, 32'h1400);
    // swap
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 8'h55));
    emit(swp(11, 1, 0));
    emit(sdt(1, 0, 1, 1, 0, 11, 2, 0));              st(1, 1); st(2, 32'h55);
    // loop: r1 = 10 + 9 + ... + 1
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 10));
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 0));
    t = pc_asm;
    emit(dpr(OP_ADD, 0, 1, 1, 0));
    emit(dpi(AL, OP_SUB, 1, 0, 0, 0, 1));
    emit(br(NE, 1'b0, pc_asm, t));                   st(1, 55);
    // BL to a subroutine and back
    t = pc_asm;
    emit(br(AL, 1'b1, t, t + 12));
    emit(br(AL, 1'b0, t + 4, t + 20));
    emit(NOPI);
    emit(dpi(AL, OP_ADD, 0, 1, 2, 0, 1));
    emit(dpr(OP_MOV, 0, 0, 15, 14));
    st(2, 56);
    // BX
    emit(dpi(AL, OP_ADD, 0, 15, 3, 0, 8));           // r3 = this + 16
    emit({AL, 24'h12FFF1, 4'd3});
    emit(dpi(AL, OP_MOV, 0, 0, 4, 0, 1));
    emit(dpi(AL, OP_MOV, 0, 0, 4, 0, 1));
    emit(dpi(AL, OP_MOV, 0, 0, 4, 0, 2));            st(4, 2);
    // PSR transfers
    emit(mrs(0));                                    st(0, 32'h6000_00D3);
    emit(msr_imm(1'b1, 0, 8'h13));                   // CPSR_c = svc, interrupts on
    emit(msr_imm(1'b0, 2, 8'hF));                    // CPSR_f = NZCV
    emit(mrs(0));                                    st(0, 32'hF000_0013);
    // software interrupt and undefined instruction
    swi_pc = pc_asm;
    emit({AL, 4'hF, 24'h0});
    emit(dpr(OP_MOV, 0, 0, 0, 14));                  st(0, swi_pc + 4);
    emit(32'hE7F000F0);
    emit(mrs(0));                                    st(0, 32'hF000_0013);
    // data abort: the load is dropped, the handler resumes after it
    emit(dpi(AL, OP_MOV, 0, 0, 7, 0, 8'h11));
    emit(dpi(AL, OP_MOV, 0, 0, 6, 2, 8'hA));         // r6 = 0xA0000000
    emit(sdt(1, 0, 1, 1, 0, 6, 7, 0));
    st(7, 32'h11);
    // prefetch abort: the marked instruction is skipped
    emit(dpi(AL, OP_MOV, 0, 0, 8, 0, 8'h22));
    pabt_addr = pc_asm;
    emit(dpi(AL, OP_MOV, 0, 0, 8, 0, 8'h99));
    st(8, 32'h22);
    // IRQ then FIQ, requested by stores to 0x2004 / 0x2008
    emit(dpi(AL, OP_MOV, 0, 0, 10, 12, 8'h20));      // r10 = 0x2000
    emit(sdt(0, 0, 1, 1, 0, 10, 0, 4));
    emit(dpi(AL, OP_MOV, 0, 0, 9, 0, 1));
    for (int i = 0; i < 6; i++) emit(dpi(AL, OP_ADD, 0, 9, 9, 0, 1));
    st(9, 7);
    emit(sdt(0, 0, 1, 1, 0, 10, 0, 8));
    emit(dpi(AL, OP_MOV, 0, 0, 9, 0, 1));
    for (int i = 0; i < 6; i++) emit(dpi(AL, OP_ADD, 0, 9, 9, 0, 1));
    st(9, 7);
    emit(mrs(0));                                    st(0, 32'hF000_0013);
    // done
    emit(sdt(0, 0, 1, 1, 0, 10, 0, 0));
    t = pc_asm;
    emit(br(AL, 1'b0, t, t));
  endtask

  // ----------------------------------------------------- environment
  logic done_seen = 1'b0;
  int   irq_seen = 0, fiq_seen = 0;

  assign mem_abort = (a[31:28] == 4'hA) || (opc && a == pabt_addr);
  assign isync = 1'b0;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (nreset && nrw && a == 32'h2000) done_seen <= 1'b1;
    if (nreset && nrw && a == 32'h2004) nirq <= 1'b0;
    if (nreset && nrw && a == 32'h2008) nfiq <= 1'b0;
    if (opc && a == 32'h18 && !nirq) begin nirq <= 1'b1; irq_seen <= irq_seen + 1; end
    if (opc && a == 32'h1C && !nfiq) begin nfiq <= 1'b1; fiq_seen <= fiq_seen + 1; end
  end

  // ------------------------------------------------ mechanism counters
  int n_fwd, n_shift, n_refill, n_nop, n_mul_short, n_mul7, n_burst, n_swp, n_drop, n_stall;
  int n_pf, n_st_fin, n_st_gap, n_idle;
  logic st_fin, started;
  int n_exc [8];
  int mul_run, icyc;
  int last_cyc [256];

  always_ff @(posedge clk) if (nreset) begin
    if (dut.id_to_ex && !dut.exc_take && |dut.fwd_hit) n_fwd <= n_fwd + 1;
    if (dut.ex_v && dut.xs == dut.X_SHIFT)     n_shift  <= n_shift + 1;
    if (dut.ex_v && dut.xs == dut.X_BR_REFILL) n_refill <= n_refill + 1;
    if (dut.ex_v && dut.ex_dec.itype == IT_NOP) n_nop <= n_nop + 1;
    if (dut.ex_v && dut.xs == dut.X_SWP_WR)    n_swp    <= n_swp + 1;
    if (dut.ex_v && dut.xs == dut.X_LS_DATA && dut.is_bdt(dut.ex_dec.itype)) n_burst <= n_burst + 1;
    if (dut.opc_q && !dut.fetch_ok && !dut.flush) n_drop <= n_drop + 1;
    if (dut.fetch_ok && !dut.ifid_free) n_pf <= n_pf + 1;
    // a store's last data cycle must be followed directly by the next slot
    st_fin <= dut.ex_v && dut.xs == dut.X_LS_DATA && dut.nrw_q && dut.take_new;
    if (dut.ex_v) started <= 1'b1;
    else if (started) n_idle <= n_idle + 1;
    if (st_fin) begin
      n_st_fin <= n_st_fin + 1;
      if (!dut.ex_v) n_st_gap <= n_st_gap + 1;
    end
    if (dut.ex_v && !dut.ex_done) n_stall <= n_stall + 1;
    if (dut.ex_v && dut.xs == dut.X_BR_CALC &&
        dut.ex_dec.itype inside {IT_EXC, IT_SWI, IT_UND}) n_exc[dut.ex_exc] <= n_exc[dut.ex_exc] + 1;
    // multiply length
    if (dut.ex_v && dut.xs == dut.X_MUL) begin
      if (dut.m_finish) begin
        if (mul_run + 1 == 7) n_mul7 <= n_mul7 + 1;
        if (dut.ex_dec.itype inside {IT_MUL, IT_MULL} && mul_run + 1 < 6) n_mul_short <= n_mul_short + 1;
        mul_run <= 0;
      end else mul_run <= mul_run + 1;
    end
    // EX cycles per instruction
    if (dut.ex_v) begin
      if (dut.take_new) begin
        last_cyc[dut.ex_dec.itype] <= icyc + 1;
        icyc <= 0;
      end else icyc <= icyc + 1;
    end else icyc <= 0;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic happened(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  // ------------------------------------------------------------ main
  initial begin
    nfiq = 1'b1; nirq = 1'b1;
    n_fwd = 0; n_shift = 0; n_refill = 0; n_nop = 0; n_mul_short = 0; n_mul7 = 0;
    n_burst = 0; n_swp = 0; n_drop = 0; n_stall = 0;
    n_pf = 0; n_st_fin = 0; n_st_gap = 0; n_idle = 0; st_fin = 1'b0; started = 1'b0; mul_run = 0; icyc = 0;
    foreach (n_exc[i]) n_exc[i] = 0;
    foreach (last_cyc[i]) last_cyc[i] = 0;
    for (int i = 0; i < 8192; i++) mem.mem[i] = 32'h0;
    build();
    foreach (prog[k]) mem.mem[k / 4] = prog[k];
    repeat (3) @(posedge clk);
    nreset = 1'b1;
    wait (done_seen);
    repeat (2) @(posedge clk);
    $display("program finished after %0d cycles", cycle);
    foreach (expect_q[i]) check($sformatf("result %0d", i), mem.mem[(32'h1000 >> 2) + i], expect_q[i]);
    check("swapped memory word", mem.mem[32'h1400 >> 2], 32'h55);
    // timing of the instruction classes
    check("cycles data processing",     32'(last_cyc[IT_DP_IMM]), 1);
    check("cycles register shift",      32'(last_cyc[IT_DP_REG_SHIFT]), 2);
    check("cycles branch",              32'(last_cyc[IT_B]), 3);
    check("cycles LDR",                 32'(last_cyc[IT_LDR_IMMOFF]), 3);
    check("cycles STR",                 32'(last_cyc[IT_STR_IMMOFF]), 2);
    check("cycles SWP",                 32'(last_cyc[IT_SWP]), 4);
    check("cycles LDM 4 registers",     32'(last_cyc[IT_LDM]), 6);
    check("cycles STM 4 registers",     32'(last_cyc[IT_STM]), 5);
    check("cycles SMLAL, full multiplier", 32'(last_cyc[IT_MLAL]), 7);
    check("cycles MUL, one multiplier byte", 32'(last_cyc[IT_MUL]), 2);
    check("IRQ handled once", 32'(irq_seen), 1);
    check("FIQ handled once", 32'(fiq_seen), 1);
    happened("operand forwarding",        n_fwd);
    happened("register-shift wait",       n_shift);
    happened("branch refill",             n_refill);
    happened("condition-failed NOP",      n_nop);
    happened("multiply early end",        n_mul_short);
    happened("7-cycle multiply",          n_mul7);
    happened("LDM/STM burst cycles",      n_burst);
    happened("swap write cycle",          n_swp);
    happened("dropped (re-fetched) word", n_drop);
    happened("EX stall cycles",           n_stall);
    happened("fetch buffer filled",       n_pf);
    happened("store finished",            n_st_fin);
    check("idle cycles right after a store", 32'(n_st_gap), 0);
    check("idle EX cycles after the first instruction", 32'(n_idle), 0);
    happened("exception SWI",             n_exc[EXC_SWI]);
    happened("exception undefined",       n_exc[EXC_UND]);
    happened("exception data abort",      n_exc[EXC_DABT]);
    happened("exception prefetch abort",  n_exc[EXC_PABT]);
    happened("exception IRQ",             n_exc[EXC_IRQ]);
    happened("exception FIQ",             n_exc[EXC_FIQ]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
