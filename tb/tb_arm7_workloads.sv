// tb_arm7_workloads: runs the inner kernels of seven embedded benchmarks on
// the full core at its default size and checks their results.
//
//   bitcount  counts the set bits of NWORDS random words. It clears the
//             lowest set bit of each word in a loop (x &= x - 1) until the
//             word is zero.
//   CRC32     computes the reflected CRC-32 (polynomial 0xEDB88320, initial
//             value and final XOR all ones) over the same 4*NWORDS bytes,
//             one bit at a time: MOVS crc, crc, LSR #1 then EORCS crc, poly.
//   search    counts the positions where a 3-letter lower-case pattern
//             occurs in a 256-byte text of mixed-case letters, comparing
//             case-insensitively (each text byte is ORed with 0x20) with a
//             naive byte-by-byte loop of LDRB, CMP and an early exit.
//   SHA-1     runs the SHA-1 compression function on one random 512-bit
//             block: the message schedule is expanded in memory (W[16..79])
//             and the 80 rounds run as four 20-round loops, one per round
//             function. The initial hash words and round constants are read
//             from a table with LDM/LDR, and the new hash is written with STM.
//   Dijkstra  finds the shortest distances from node 0 in a complete graph
//             of NNODE nodes with random edge weights (an adjacency matrix
//             of words): NNODE rounds of picking the nearest unvisited node
//             (CMPEQ/MOVLO) and relaxing its row (CMPEQ/STRLO).
//   DCT       the 8x8 forward DCT at the heart of a JPEG encoder, in
//             integers: Y = C * X * C^T for a random level-shifted block X
//             (-128..127) and C[u][x] = round(64 a(u) cos((2x+1) u pi / 16)).
//             It runs one loop nest twice; the loop computes
//             out[j][i] = sum_k A[i][k] B[j][k] with MLA, so the first pass
//             gives (X C^T)^T and the second, from C and that, gives Y^T.
//             There is no rescaling between the passes (values stay well
//             inside 32 bits) and no quantisation or entropy coding.
//   IDCT      the inverse DCT of a JPEG decoder on that result: Y is scaled
//             down by an arithmetic shift right of 12 (Ys), then the same
//             loop nest gives Cs = C^T Ys from Ys^T and C^T, and C^T Ys C
//             from C^T and Cs; the result is about 4096 times the block X.
//
// The programs are assembled by SystemVerilog functions into one program
// that runs the kernels in turn; each stores its result to a result area,
// and the program ends by writing the done address. The data are drawn with
// $urandom, and the expected results are computed in this testbench from
// the same data. The kernels stress different parts of the core:
//   bitcount  branches
//   CRC32     conditional execution and flag-setting shifts
//   search    byte loads and early-exit branches
//   SHA-1     rotates and load/store traffic
//   Dijkstra  conditional compares and conditional stores
//   DCT/IDCT  multiply-accumulate
// Together they are a small stand-in for the full benchmark programs, which
// need a larger memory and an operating system for file input; this bench
// models neither. Interface: no ports; the core is connected to the
// zero-wait memory model, with interrupts and aborts held inactive. Timing:
// the cycles of each kernel are printed, and a watchdog bounds the run. The
// kernels and their sizes are this bench's own choice.
module tb_arm7_workloads;
  import arm7_pkg::*;

  localparam int NWORDS = 64;
  localparam logic [31:0] DATA = 32'h4000, RES = 32'h3000, DONE = 32'h2000;
  localparam logic [31:0] TEXT = 32'h5000, PAT = 32'h3100;
  localparam int NTEXT = 256, NPAT = 3;
  localparam logic [31:0] SHA_W = 32'h6000, SHA_T = 32'h3200;   // schedule, H/K table
  localparam logic [31:0] DJ_DIST = 32'h3300, DJ_VIS = 32'h3340, DJ_MAT = 32'h7000;
  localparam int NNODE = 8;                                      // row = 32 bytes
  localparam logic [31:0] DCT_X = 32'h7100, DCT_C = 32'h7200, DCT_T = 32'h7300, DCT_Y = 32'h7400;
  localparam logic [31:0] DCT_CT = 32'h7500, DCT_M = 32'h7600, DCT_R = 32'h7700, DCT_S = 32'h7800;
  localparam logic [31:0] SHA_H [5] = '{32'h6745_2301, 32'hEFCD_AB89, 32'h98BA_DCFE,
                                        32'h1032_5476, 32'hC3D2_E1F0};
  localparam logic [31:0] SHA_K [4] = '{32'h5A82_7999, 32'h6ED9_EBA1, 32'h8F1B_BCDC,
                                        32'hCA62_C1D6};

  logic clk = 1'b0, nreset = 1'b1;

  // Reset falls before the first clock edge, so the core's bus registers are
  // cleared asynchronously and the memory never sees their power-up values.
  initial #1 nreset = 1'b0;
  logic [31:0] a, din, dout;
  logic nrw, opc, mem_abort, nfiq, nirq, isync;
  size_e mas;
  int checks = 0, failures = 0, cycle = 0;

  arm7_core dut (.*);
  arm7_mem_model mem (.clk, .a, .wdata(dout), .nrw, .mas, .rdata(din));

  always #5 clk = ~clk;

  // ------------------------------------------------------------ assembler
  localparam logic [3:0] EQ = 4'h0, NE = 4'h1, CS = 4'h2, CC = 4'h3, AL = 4'hE;
  logic [31:0] prog [int];
  int unsigned pc_asm;

  function automatic void emit(input logic [31:0] w);
    prog[pc_asm] = w;
    pc_asm += 4;
  endfunction
  function automatic logic [31:0] dpi(input logic [3:0] c, input aluop_e op, input logic s,
                                      input int rn, input int rd, input int rot, input int imm8);
    return {c, 3'b001, op, s, 4'(rn), 4'(rd), 4'(rot), 8'(imm8)};
  endfunction
  function automatic logic [31:0] dpr(input logic [3:0] c, input aluop_e op, input logic s,
                                      input int rn, input int rd, input int rm,
                                      input shift_e sht = SH_LSL, input int sh = 0);
    return {c, 3'b000, op, s, 4'(rn), 4'(rd), 5'(sh), sht, 1'b0, 4'(rm)};
  endfunction
  // load/store with immediate offset; post-indexed when p = 0
  function automatic logic [31:0] sdt(input logic l, input logic b, input logic p, input int rn,
                                      input int rd, input int off);
    return {AL, 3'b010, p, 1'b1, b, 1'b0, l, 4'(rn), 4'(rd), 12'(off)};
  endfunction
  // block transfer, increment after
  function automatic logic [31:0] ldm_stm(input logic l, input int rn, input logic [15:0] list);
    return {AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b0, l, 4'(rn), list};
  endfunction
  // MLA rd, rm, rs, rn
  function automatic logic [31:0] mla(input int rd, input int rm, input int rs, input int rn);
    return {AL, 7'b0000001, 1'b0, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic logic [31:0] br(input logic [3:0] c, input int unsigned from,
                                     input int unsigned to);
    return {c, 4'b1010, 24'((int'(to) - int'(from) - 8) / 4)};
  endfunction

  task automatic build();
    int unsigned l1, l2, l3, l4, l5, l6, l7, l8, l9, l10, l11, p_beq, p_bne;
    logic [7:0]  dct_a [4], dct_b [4], dct_o [4];
    pc_asm = 0;
    // r10 = result area, r11 = data
    emit(dpi(AL, OP_MOV, 0, 0, 10, 10, 8'h03));          // 0x3000
    emit(dpi(AL, OP_MOV, 0, 0, 11, 10, 8'h04));          // 0x4000
    // ---- bitcount
    emit(dpr(AL, OP_MOV, 0, 0, 0, 11));                  // r0 = data pointer
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, NWORDS));           // r1 = words left
    emit(dpi(AL, OP_MOV, 0, 0, 2, 0, 0));                // r2 = bit total
    l1 = pc_asm;
    emit(sdt(1, 0, 0, 0, 3, 4));                         // LDR r3, [r0], #4
    l2 = pc_asm;
    emit(dpi(AL, OP_CMP, 1, 3, 0, 0, 0));
    p_beq = pc_asm; emit(32'h0);                         // BEQ l3 (patched)
    emit(dpi(AL, OP_SUB, 0, 3, 4, 0, 1));                // r4 = x - 1
    emit(dpr(AL, OP_AND, 0, 3, 3, 4));                   // x &= x - 1
    emit(dpi(AL, OP_ADD, 0, 2, 2, 0, 1));
    emit(br(AL, pc_asm, l2));
    l3 = pc_asm;
    prog[p_beq] = br(EQ, p_beq, l3);
    emit(dpi(AL, OP_SUB, 1, 1, 1, 0, 1));
    emit(br(NE, pc_asm, l1));
    emit(sdt(0, 0, 1, 10, 2, 0));                        // STR r2, [r10]
    // ---- CRC32
    emit(dpr(AL, OP_MOV, 0, 0, 0, 11));
    emit(dpi(AL, OP_MOV, 0, 0, 1, 12, 4 * NWORDS / 256)); // bytes left, 4*NWORDS = 256
    emit(dpi(AL, OP_MVN, 0, 0, 3, 0, 0));                // crc = ~0
    emit(dpi(AL, OP_MOV, 0, 0, 4, 4, 8'hED));            // poly = 0xEDB88320
    emit(dpi(AL, OP_ORR, 0, 4, 4, 8, 8'hB8));
    emit(dpi(AL, OP_ORR, 0, 4, 4, 12, 8'h83));
    emit(dpi(AL, OP_ORR, 0, 4, 4, 0, 8'h20));
    l4 = pc_asm;
    emit(sdt(1, 1, 0, 0, 5, 1));                         // LDRB r5, [r0], #1
    emit(dpr(AL, OP_EOR, 0, 3, 3, 5));
    emit(dpi(AL, OP_MOV, 0, 0, 6, 0, 8));
    l5 = pc_asm;
    emit(dpr(AL, OP_MOV, 1, 0, 3, 3, SH_LSR, 1));        // MOVS r3, r3, LSR #1
    emit(dpr(CS, OP_EOR, 0, 3, 3, 4));                   // EORCS r3, r3, r4
    emit(dpi(AL, OP_SUB, 1, 6, 6, 0, 1));
    emit(br(NE, pc_asm, l5));
    emit(dpi(AL, OP_SUB, 1, 1, 1, 0, 1));
    emit(br(NE, pc_asm, l4));
    emit(dpr(AL, OP_MVN, 0, 0, 3, 3));
    emit(sdt(0, 0, 1, 10, 3, 4));                        // STR r3, [r10, #4]
    // ---- search
    emit(dpi(AL, OP_MOV, 0, 0, 0, 10, 8'h05));           // r0 = TEXT, start position
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, NTEXT - NPAT + 1)); // r1 = positions left
    emit(dpi(AL, OP_MOV, 0, 0, 2, 0, 0));                // r2 = matches
    l6 = pc_asm;
    emit(dpr(AL, OP_MOV, 0, 0, 3, 0));                   // r3 = text cursor
    emit(dpi(AL, OP_ADD, 0, 10, 4, 12, 8'h01));          // r4 = PAT
    emit(dpi(AL, OP_MOV, 0, 0, 5, 0, NPAT));             // r5 = pattern bytes left
    l7 = pc_asm;
    emit(sdt(1, 1, 0, 3, 6, 1));                         // LDRB r6, [r3], #1
    emit(dpi(AL, OP_ORR, 0, 6, 6, 0, 8'h20));            // fold to lower case
    emit(sdt(1, 1, 0, 4, 7, 1));                         // LDRB r7, [r4], #1
    emit(dpr(AL, OP_CMP, 1, 6, 0, 7));
    p_bne = pc_asm; emit(32'h0);                         // BNE next (patched)
    emit(dpi(AL, OP_SUB, 1, 5, 5, 0, 1));
    emit(br(NE, pc_asm, l7));
    emit(dpi(AL, OP_ADD, 0, 2, 2, 0, 1));
    prog[p_bne] = br(NE, p_bne, pc_asm);
    emit(dpi(AL, OP_ADD, 0, 0, 0, 0, 1));
    emit(dpi(AL, OP_SUB, 1, 1, 1, 0, 1));
    emit(br(NE, pc_asm, l6));
    emit(sdt(0, 0, 1, 10, 2, 8));                        // STR r2, [r10, #8]
    // ---- SHA-1: r0..r4 = a..e, r5 = K, r6 = W cursor, r7 = count, r12 = table
    emit(dpi(AL, OP_MOV, 0, 0, 12, 12, 8'h32));          // r12 = SHA_T
    emit(dpi(AL, OP_MOV, 0, 0, 6, 10, 8'h06));           // r6 = SHA_W
    emit(dpi(AL, OP_MOV, 0, 0, 7, 0, 64));               // schedule W[16..79]
    l8 = pc_asm;                                         // r6 points at W[t-16]
    emit(sdt(1, 0, 1, 6, 8, 0));                         // W[t-16]
    emit(sdt(1, 0, 1, 6, 9, 8));                         // W[t-14]
    emit(dpr(AL, OP_EOR, 0, 8, 8, 9));
    emit(sdt(1, 0, 1, 6, 9, 32));                        // W[t-8]
    emit(dpr(AL, OP_EOR, 0, 8, 8, 9));
    emit(sdt(1, 0, 1, 6, 9, 52));                        // W[t-3]
    emit(dpr(AL, OP_EOR, 0, 8, 8, 9));
    emit(dpr(AL, OP_MOV, 0, 0, 8, 8, SH_ROR, 31));       // rotate left by 1
    emit(sdt(0, 0, 1, 6, 8, 64));                        // W[t]
    emit(dpi(AL, OP_ADD, 0, 6, 6, 0, 4));
    emit(dpi(AL, OP_SUB, 1, 7, 7, 0, 1));
    emit(br(NE, pc_asm, l8));
    emit(ldm_stm(1, 12, 16'h001F));                      // LDMIA r12, {r0-r4}
    emit(dpi(AL, OP_MOV, 0, 0, 6, 10, 8'h06));
    for (int q = 0; q < 4; q++) begin
      int unsigned lq;
      emit(sdt(1, 0, 1, 12, 5, 20 + 4 * q));             // K of this quarter
      emit(dpi(AL, OP_MOV, 0, 0, 7, 0, 20));
      lq = pc_asm;
      if (q == 0) begin                                  // f = (b & c) | (~b & d)
        emit(dpr(AL, OP_AND, 0, 1, 9, 2));
        emit(dpr(AL, OP_BIC, 0, 3, 8, 1));
        emit(dpr(AL, OP_ORR, 0, 9, 9, 8));
      end else if (q == 2) begin                         // f = majority(b, c, d)
        emit(dpr(AL, OP_AND, 0, 1, 9, 2));
        emit(dpr(AL, OP_ORR, 0, 1, 8, 2));
        emit(dpr(AL, OP_AND, 0, 8, 8, 3));
        emit(dpr(AL, OP_ORR, 0, 9, 9, 8));
      end else begin                                     // f = b ^ c ^ d
        emit(dpr(AL, OP_EOR, 0, 1, 9, 2));
        emit(dpr(AL, OP_EOR, 0, 9, 9, 3));
      end
      emit(dpr(AL, OP_ADD, 0, 9, 9, 4));                 // + e
      emit(dpr(AL, OP_ADD, 0, 9, 9, 5));                 // + K
      emit(sdt(1, 0, 0, 6, 8, 4));                       // LDR r8, [r6], #4
      emit(dpr(AL, OP_ADD, 0, 9, 9, 8));                 // + W[t]
      emit(dpr(AL, OP_ADD, 0, 9, 9, 0, SH_ROR, 27));     // + (a rotated left by 5)
      emit(dpr(AL, OP_MOV, 0, 0, 4, 3));                 // e = d
      emit(dpr(AL, OP_MOV, 0, 0, 3, 2));                 // d = c
      emit(dpr(AL, OP_MOV, 0, 0, 2, 1, SH_ROR, 2));      // c = b rotated left by 30
      emit(dpr(AL, OP_MOV, 0, 0, 1, 0));                 // b = a
      emit(dpr(AL, OP_MOV, 0, 0, 0, 9));                 // a = new value
      emit(dpi(AL, OP_SUB, 1, 7, 7, 0, 1));
      emit(br(NE, pc_asm, lq));
    end
    for (int r = 0; r < 5; r++) begin                    // add the initial hash
      emit(sdt(1, 0, 1, 12, 8, 4 * r));
      emit(dpr(AL, OP_ADD, 0, r, r, 8));
    end
    emit(dpi(AL, OP_ADD, 0, 10, 11, 0, 8'h10));          // r11 = RES + 0x10
    emit(ldm_stm(0, 11, 16'h001F));                      // STMIA r11, {r0-r4}
    // ---- Dijkstra: r3 = dist, r4 = visited, r1 = u, r2 = dist[u], r11 = rounds
    emit(dpi(AL, OP_MOV, 0, 0, 3, 12, 8'h33));           // r3 = DJ_DIST
    emit(dpi(AL, OP_ADD, 0, 3, 4, 0, 8'h40));            // r4 = DJ_VIS
    emit(dpi(AL, OP_MOV, 0, 0, 11, 0, NNODE));
    l9 = pc_asm;
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 0));                // i = 0
    emit(dpi(AL, OP_MVN, 0, 0, 2, 0, 0));                // min = all ones
    emit(dpr(AL, OP_MOV, 0, 0, 7, 3));
    emit(dpr(AL, OP_MOV, 0, 0, 8, 4));
    l10 = pc_asm;
    emit(sdt(1, 0, 0, 8, 9, 4));                         // visited[i]
    emit(sdt(1, 0, 0, 7, 6, 4));                         // dist[i]
    emit(dpi(AL, OP_CMP, 1, 9, 0, 0, 0));
    emit(dpr(EQ, OP_CMP, 1, 6, 0, 2));                   // unvisited: dist[i] < min?
    emit(dpr(CC, OP_MOV, 0, 0, 2, 6));
    emit(dpr(CC, OP_MOV, 0, 0, 1, 0));
    emit(dpi(AL, OP_ADD, 0, 0, 0, 0, 1));
    emit(dpi(AL, OP_CMP, 1, 0, 0, 0, NNODE));
    emit(br(NE, pc_asm, l10));
    emit(dpr(AL, OP_ADD, 0, 4, 7, 1, SH_LSL, 2));        // visited[u] = 1
    emit(dpi(AL, OP_MOV, 0, 0, 9, 0, 1));
    emit(sdt(0, 0, 1, 7, 9, 0));
    emit(dpi(AL, OP_MOV, 0, 0, 5, 12, 8'h70));           // r5 = row u of DJ_MAT
    emit(dpr(AL, OP_ADD, 0, 5, 5, 1, SH_LSL, 5));
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 0));
    emit(dpr(AL, OP_MOV, 0, 0, 7, 3));
    emit(dpr(AL, OP_MOV, 0, 0, 8, 4));
    l11 = pc_asm;
    emit(sdt(1, 0, 0, 8, 9, 4));                         // visited[v]
    emit(sdt(1, 0, 0, 5, 6, 4));                         // w[u][v]
    emit(dpr(AL, OP_ADD, 0, 6, 6, 2));                   // dist[u] + w
    emit(sdt(1, 0, 1, 7, 12, 0));                        // dist[v]
    emit(dpi(AL, OP_CMP, 1, 9, 0, 0, 0));
    emit(dpr(EQ, OP_CMP, 1, 6, 0, 12));
    emit({CC, 28'(sdt(0, 0, 1, 7, 6, 0))});              // STRLO r6, [r7]
    emit(dpi(AL, OP_ADD, 0, 7, 7, 0, 4));
    emit(dpi(AL, OP_ADD, 0, 0, 0, 0, 1));
    emit(dpi(AL, OP_CMP, 1, 0, 0, 0, NNODE));
    emit(br(NE, pc_asm, l11));
    emit(dpi(AL, OP_SUB, 1, 11, 11, 0, 1));
    emit(br(NE, pc_asm, l9));
    emit(sdt(0, 0, 1, 10, 11, 12));                      // end marker, RES + 12
    // ---- DCT: two passes of out[j][i] = sum_k A[i][k] * B[j][k]
    // passes 0, 1: forward DCT; 2, 3: inverse DCT of the scaled result
    dct_a = '{8'h71, 8'h72, 8'h78, 8'h75};               // X, C, Ys^T, C^T
    dct_b = '{8'h72, 8'h73, 8'h75, 8'h76};               // C, (X C^T)^T, C^T, C^T Ys
    dct_o = '{8'h73, 8'h74, 8'h76, 8'h77};
    for (int ps = 0; ps < 4; ps++) begin
      int unsigned li, lj, lk, ls;
      if (ps == 2) begin                                 // Ys = Y >>> 12
        emit(dpi(AL, OP_MOV, 0, 0, 0, 12, 8'h74));
        emit(dpi(AL, OP_MOV, 0, 0, 3, 12, 8'h78));
        emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 64));
        ls = pc_asm;
        emit(sdt(1, 0, 0, 0, 2, 4));
        emit(dpr(AL, OP_MOV, 0, 0, 2, 2, SH_ASR, 12));
        emit(sdt(0, 0, 0, 3, 2, 4));
        emit(dpi(AL, OP_SUB, 1, 1, 1, 0, 1));
        emit(br(NE, pc_asm, ls));
        emit(sdt(0, 0, 1, 10, 11, 16 + 4 * 5));          // marker RES + 0x24
      end
      emit(dpi(AL, OP_MOV, 0, 0, 0, 12, dct_a[ps]));     // r0 = row i of A
      emit(dpi(AL, OP_MOV, 0, 0, 14, 12, dct_o[ps]));    // r14 = out + 4 i
      emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 8));
      li = pc_asm;
      emit(dpi(AL, OP_MOV, 0, 0, 3, 12, dct_b[ps]));     // r3 = row j of B
      emit(dpr(AL, OP_MOV, 0, 0, 13, 14));               // r13 = out + 32 j + 4 i
      emit(dpi(AL, OP_MOV, 0, 0, 4, 0, 8));
      lj = pc_asm;
      emit(dpi(AL, OP_MOV, 0, 0, 5, 0, 0));              // sum = 0
      emit(dpr(AL, OP_MOV, 0, 0, 7, 0));
      emit(dpr(AL, OP_MOV, 0, 0, 8, 3));
      emit(dpi(AL, OP_MOV, 0, 0, 6, 0, 8));
      lk = pc_asm;
      emit(sdt(1, 0, 0, 7, 9, 4));                       // A[i][k]
      emit(sdt(1, 0, 0, 8, 12, 4));                      // B[j][k]
      emit(mla(5, 9, 12, 5));
      emit(dpi(AL, OP_SUB, 1, 6, 6, 0, 1));
      emit(br(NE, pc_asm, lk));
      emit(sdt(0, 0, 0, 13, 5, 32));                     // STR r5, [r13], #32
      emit(dpr(AL, OP_MOV, 0, 0, 3, 8));                 // next row of B
      emit(dpi(AL, OP_SUB, 1, 4, 4, 0, 1));
      emit(br(NE, pc_asm, lj));
      emit(dpr(AL, OP_MOV, 0, 0, 0, 7));                 // next row of A
      emit(dpi(AL, OP_ADD, 0, 14, 14, 0, 4));
      emit(dpi(AL, OP_SUB, 1, 1, 1, 0, 1));
      emit(br(NE, pc_asm, li));
    end
    // ---- done
    emit(dpi(AL, OP_MOV, 0, 0, 9, 10, 8'h02));           // 0x2000
    emit(sdt(0, 0, 1, 9, 9, 0));
    emit(br(AL, pc_asm, pc_asm));
  endtask

  // ----------------------------------------------------- environment
  assign mem_abort = 1'b0;
  assign isync     = 1'b1;
  assign nfiq      = 1'b1;
  assign nirq      = 1'b1;

  logic done_seen = 1'b0;
  int   t_bc = 0, t_crc = 0, t_srch = 0, t_sha = 0, t_dj = 0, t_dct = 0;
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (nreset && nrw && a == DONE) done_seen <= 1'b1;
    if (nreset && nrw && a == RES && t_bc == 0) t_bc <= cycle;
    if (nreset && nrw && a == RES + 4 && t_crc == 0) t_crc <= cycle;
    if (nreset && nrw && a == RES + 8 && t_srch == 0) t_srch <= cycle;
    if (nreset && nrw && a == RES + 32'h10 && t_sha == 0) t_sha <= cycle;
    if (nreset && nrw && a == RES + 32'hC && t_dj == 0) t_dj <= cycle;
    if (nreset && nrw && a == RES + 32'h24 && t_dct == 0) t_dct <= cycle;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] ref_bits, ref_crc, ref_hits, w;
    logic [7:0]  txt [NTEXT];
    logic [7:0]  pat [NPAT];
    bit          hit;
    logic [31:0] sw [80];
    logic [31:0] sa, sb, sc, sd, se, sf, sk, st;
    logic [31:0] dw [NNODE][NNODE];
    logic [31:0] dd [NNODE];
    bit          dv [NNODE];
    int          du;
    logic [31:0] dx [8][8], dc [8][8], dt [8][8], dy [8][8];
    logic [31:0] ys [8][8], dm [8][8], dr [8][8];
    int          dct_bad;
    for (int i = 0; i < 8192; i++) mem.mem[i] = 32'h0;
    build();
    foreach (prog[k]) mem.mem[k / 4] = prog[k];
    ref_bits = 0;
    ref_crc  = 32'hFFFF_FFFF;
    for (int i = 0; i < NWORDS; i++) begin
      w = $urandom;
      if (i == 0) w = 32'h0;
      if (i == 1) w = 32'hFFFF_FFFF;
      mem.mem[(DATA >> 2) + i] = w;
      ref_bits += 32'($countones(w));
      for (int b = 0; b < 4; b++) begin
        ref_crc ^= {24'h0, w[8*b +: 8]};
        for (int k = 0; k < 8; k++) ref_crc = ref_crc[0] ? (ref_crc >> 1) ^ 32'hEDB8_8320 : ref_crc >> 1;
      end
    end
    ref_crc = ~ref_crc;
    // text of a, A, b, B and a pattern over {a, b}, so that matches occur
    for (int i = 0; i < NPAT; i++) begin
      pat[i] = ($urandom % 2) ? 8'h62 : 8'h61;
      mem.mem[(PAT >> 2) + i / 4][8 * (i % 4) +: 8] = pat[i];
    end
    for (int i = 0; i < NTEXT; i++) begin
      txt[i] = 8'h41 + 8'($urandom % 2) + (($urandom % 2) ? 8'h20 : 8'h00);
      mem.mem[(TEXT >> 2) + i / 4][8 * (i % 4) +: 8] = txt[i];
    end
    ref_hits = 0;
    for (int i = 0; i <= NTEXT - NPAT; i++) begin
      hit = 1'b1;
      for (int j = 0; j < NPAT; j++) if ((txt[i + j] | 8'h20) != pat[j]) hit = 1'b0;
      if (hit) ref_hits++;
    end
    // SHA-1 block, table, and the reference compression
    for (int i = 0; i < 5; i++) mem.mem[(SHA_T >> 2) + i] = SHA_H[i];
    for (int i = 0; i < 4; i++) mem.mem[(SHA_T >> 2) + 5 + i] = SHA_K[i];
    for (int t = 0; t < 80; t++) begin
      if (t < 16) begin
        sw[t] = $urandom;
        mem.mem[(SHA_W >> 2) + t] = sw[t];
      end else begin
        st    = sw[t - 3] ^ sw[t - 8] ^ sw[t - 14] ^ sw[t - 16];
        sw[t] = {st[30:0], st[31]};
      end
    end
    // graph: random weights 1..255, zero diagonal; distances start unknown
    for (int u = 0; u < NNODE; u++) begin
      for (int v = 0; v < NNODE; v++) begin
        dw[u][v] = (u == v) ? 32'd0 : 32'd1 + 32'($urandom % 255);
        mem.mem[(DJ_MAT >> 2) + NNODE * u + v] = dw[u][v];
      end
      dd[u] = (u == 0) ? 32'd0 : 32'h7FFF_FFFF;
      dv[u] = 1'b0;
      mem.mem[(DJ_DIST >> 2) + u] = dd[u];
      mem.mem[(DJ_VIS >> 2) + u]  = 32'd0;
    end
    for (int k = 0; k < NNODE; k++) begin
      du = -1;
      for (int i = 0; i < NNODE; i++)
        if (!dv[i] && (du < 0 || dd[i] < dd[du])) du = i;
      dv[du] = 1'b1;
      for (int v = 0; v < NNODE; v++)
        if (!dv[v] && dd[du] + dw[du][v] < dd[v]) dd[v] = dd[du] + dw[du][v];
    end
    // DCT block and coefficients, and the reference product
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) begin
        dc[u][x] = 32'($rtoi((u == 0 ? 64.0 / $sqrt(8.0) : 32.0) *
                             $cos((2 * x + 1) * u * 3.14159265358979 / 16.0) +
                             ($cos((2 * x + 1) * u * 3.14159265358979 / 16.0) < 0 ? -0.5 : 0.5)));
        dx[u][x] = 32'(int'($urandom % 256) - 128);
        mem.mem[(DCT_C >> 2) + 8 * u + x]  = dc[u][x];
        mem.mem[(DCT_CT >> 2) + 8 * x + u] = dc[u][x];
        mem.mem[(DCT_X >> 2) + 8 * u + x] = dx[u][x];
      end
    for (int r = 0; r < 8; r++)
      for (int v = 0; v < 8; v++) begin
        dt[r][v] = 0;
        for (int x = 0; x < 8; x++) dt[r][v] += dx[r][x] * dc[v][x];
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        dy[u][v] = 0;
        for (int r = 0; r < 8; r++) dy[u][v] += dc[u][r] * dt[r][v];
        ys[u][v] = $signed(dy[u][v]) >>> 12;
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        dm[i][j] = 0;
        for (int k = 0; k < 8; k++) dm[i][j] += dc[k][i] * ys[k][j];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        dr[i][j] = 0;
        for (int k = 0; k < 8; k++) dr[i][j] += dm[i][k] * dc[k][j];
      end
    {sa, sb, sc, sd, se} = {SHA_H[0], SHA_H[1], SHA_H[2], SHA_H[3], SHA_H[4]};
    for (int t = 0; t < 80; t++) begin
      if (t < 20)      sf = (sb & sc) | (~sb & sd);
      else if (t < 40) sf = sb ^ sc ^ sd;
      else if (t < 60) sf = (sb & sc) | (sb & sd) | (sc & sd);
      else             sf = sb ^ sc ^ sd;
      sk = SHA_K[t / 20];
      st = {sa[26:0], sa[31:27]} + sf + se + sk + sw[t];
      se = sd;
      sd = sc;
      sc = {sb[1:0], sb[31:2]};
      sb = sa;
      sa = st;
    end
    repeat (3) @(posedge clk);
    nreset = 1'b1;
    wait (done_seen);
    repeat (2) @(posedge clk);
    $display("bitcount: %0d bits in %0d words, %0d cycles", mem.mem[RES >> 2], NWORDS, t_bc);
    $display("CRC32: %h over %0d bytes, %0d cycles", mem.mem[(RES >> 2) + 1], 4 * NWORDS, t_crc - t_bc);
    $display("search: %0d matches in %0d bytes, %0d cycles", mem.mem[(RES >> 2) + 2], NTEXT, t_srch - t_crc);
    $display("SHA-1: one 512-bit block, %0d cycles", t_sha - t_srch);
    $display("Dijkstra: %0d nodes, %0d cycles", NNODE, t_dj - t_sha);
    $display("DCT: one 8x8 block, DC term %0d, %0d cycles", $signed(mem.mem[DCT_Y >> 2]), t_dct - t_dj);
    $display("IDCT: one 8x8 block, X[0][0] = %0d, rebuilt %0d / 4096, %0d cycles",
             $signed(dx[0][0]), $signed(mem.mem[DCT_R >> 2]), cycle - t_dct);
    check("bitcount result", mem.mem[RES >> 2], ref_bits);
    check("CRC32 result", mem.mem[(RES >> 2) + 1], ref_crc);
    check("search result", mem.mem[(RES >> 2) + 2], ref_hits);
    check("SHA-1 H0", mem.mem[(RES >> 2) + 4], SHA_H[0] + sa);
    check("SHA-1 H1", mem.mem[(RES >> 2) + 5], SHA_H[1] + sb);
    check("SHA-1 H2", mem.mem[(RES >> 2) + 6], SHA_H[2] + sc);
    check("SHA-1 H3", mem.mem[(RES >> 2) + 7], SHA_H[3] + sd);
    check("SHA-1 H4", mem.mem[(RES >> 2) + 8], SHA_H[4] + se);
    for (int v = 0; v < NNODE; v++)
      check($sformatf("Dijkstra distance to node %0d", v), mem.mem[(DJ_DIST >> 2) + v], dd[v]);
    dct_bad = 0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++)
        if (mem.mem[(DCT_Y >> 2) + 8 * v + u] !== dy[u][v]) dct_bad++;
    check("DCT coefficients wrong (of 64)", 32'(dct_bad), 0);
    dct_bad = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (mem.mem[(DCT_R >> 2) + 8 * i + j] !== dr[i][j]) dct_bad++;
    check("IDCT samples wrong (of 64)", 32'(dct_bad), 0);
    check("DCT coefficient C[1][0]", dc[1][0], 32'd31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
