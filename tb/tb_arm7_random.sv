// tb_arm7_random: random-instruction test of the full core against an
// instruction-level reference model written in this testbench.
//
// A program of NINSTR random instructions is generated with $urandom. It
// draws from:
//   - all 16 data-processing opcodes with random condition codes and S bits,
//     and all three operand forms (rotated immediate, immediate shift,
//     register-specified shift)
//   - MUL, MLA, UMULL, UMLAL, SMULL, SMLAL
//   - word and byte loads and stores at random offsets from a fixed base
// The stream is constrained the same way a constrained random pattern
// generator would be: no r15 operands or destinations, r13 kept as the data
// base, and the ARM v4 restrictions on multiply registers. It never produces
// undefined instructions.
// Before the random part, r0-r12 are loaded with random values. After it,
// the registers and the CPSR flags are stored to memory. The testbench then
// runs the same instruction list through its own sequential model and
// compares every register, the flags and the whole data area.
// Cycle timing is not modelled here; tb_arm7_core checks it.
module tb_arm7_random;
  import arm7_pkg::*;

  localparam int NINSTR = 400;
  localparam logic [31:0] DBASE = 32'h3000, RES = 32'h1000, DONE = 32'h2000;

  logic clk = 1'b0, nreset = 1'b1;

  // Reset falls before the first clock edge, so the core's bus registers are
  // cleared asynchronously and the memory never sees their power-up values.
  initial #1 nreset = 1'b0;
  logic [31:0] a, din, dout;
  logic nrw, opc, mem_abort, nfiq, nirq, isync;
  size_e mas;
  int checks = 0, failures = 0;

  arm7_core dut (.*);
  arm7_mem_model mem (.clk, .a, .wdata(dout), .nrw, .mas, .rdata(din));

  always #5 clk = ~clk;
  assign mem_abort = 1'b0;
  assign isync = 1'b1;
  assign nfiq = 1'b1;
  assign nirq = 1'b1;

  localparam logic [3:0] AL = 4'hE;
  logic [31:0] prog [$];

  // ------------------------------------------------------ reference model
  logic [31:0] r [16];
  logic        fn, fz, fc, fv;
  logic [7:0]  dmem [logic [31:0]];

  function automatic logic passes(input logic [3:0] c);
    case (c)
      4'h0: return fz;          4'h1: return !fz;
      4'h2: return fc;          4'h3: return !fc;
      4'h4: return fn;          4'h5: return !fn;
      4'h6: return fv;          4'h7: return !fv;
      4'h8: return fc && !fz;   4'h9: return !fc || fz;
      4'hA: return fn == fv;    4'hB: return fn != fv;
      4'hC: return !fz && fn == fv;
      4'hD: return fz || fn != fv;
      default: return 1'b1;
    endcase
  endfunction

  // operand 2 with shifter carry
  function automatic logic [32:0] op2(input logic [31:0] i);
    logic [31:0] v, res;
    int n, t;
    logic co;
    if (i[25]) begin
      n = 2 * int'(i[11:8]);
      res = (n == 0) ? 32'(i[7:0]) : (32'(i[7:0]) >> n) | (32'(i[7:0]) << (32 - n));
      return {(n == 0) ? fc : res[31], res};
    end
    v = r[i[3:0]];
    t = int'(i[6:5]);
    if (i[4]) begin
      n = int'(r[i[11:8]][7:0]);
      if (n == 0) return {fc, v};
    end else begin
      n = int'(i[11:7]);
      if (n == 0) begin
        if (t == 0) return {fc, v};
        if (t == 3) return {v[0], fc, v[31:1]};   // RRX
        n = 32;
      end
    end
    case (t)
      0: begin res = (n >= 32) ? 32'h0 : v << n; co = (n > 32) ? 1'b0 : v[32 - n]; end
      1: begin res = (n >= 32) ? 32'h0 : v >> n; co = (n > 32) ? 1'b0 : v[n - 1]; end
      2: begin
        res = (n >= 32) ? {32{v[31]}} : 32'($signed(v) >>> n);
        co  = (n >= 32) ? v[31] : v[n - 1];
      end
      default: begin
        n = n % 32;
        res = (n == 0) ? v : (v >> n) | (v << (32 - n));
        co  = res[31];
      end
    endcase
    return {co, res};
  endfunction

  function automatic logic [7:0] rdb(input logic [31:0] ad);
    return dmem.exists(ad) ? dmem[ad] : 8'h0;
  endfunction

  task automatic model_exec(input logic [31:0] i);
    logic [32:0] s2, sum;
    logic [31:0] x, y, res, ad;
    logic [63:0] p;
    logic        c, v, arith, wr;
    if (!passes(i[31:28])) return;
    if (i[27:26] == 2'b01) begin                        // LDR/STR, pre-indexed, up
      ad = r[i[19:16]] + 32'(i[11:0]);
      if (i[20]) begin
        if (i[22]) r[i[15:12]] = {24'h0, rdb(ad)};
        else begin
          x = {rdb(ad + 3), rdb(ad + 2), rdb(ad + 1), rdb(ad)};
          r[i[15:12]] = x;
        end
      end else begin
        if (i[22]) dmem[ad] = r[i[15:12]][7:0];
        else for (int k = 0; k < 4; k++) dmem[ad + k] = r[i[15:12]][8*k +: 8];
      end
      return;
    end
    if (i[27:24] == 4'b0000 && i[7:4] == 4'b1001) begin   // multiplies
      if (!i[23]) begin
        res = r[i[3:0]] * r[i[11:8]] + (i[21] ? r[i[15:12]] : 32'h0);
        r[i[19:16]] = res;
        if (i[20]) begin fn = res[31]; fz = res == 0; end
      end else begin
        if (i[22]) p = 64'($signed({{32{r[i[3:0]][31]}}, r[i[3:0]]}) * $signed({{32{r[i[11:8]][31]}}, r[i[11:8]]}));
        else       p = {32'h0, r[i[3:0]]} * {32'h0, r[i[11:8]]};
        if (i[21]) p += {r[i[19:16]], r[i[15:12]]};
        r[i[15:12]] = p[31:0];
        r[i[19:16]] = p[63:32];
        if (i[20]) begin fn = p[63]; fz = p == 0; end
      end
      return;
    end
    // data processing
    s2 = op2(i);
    x = r[i[19:16]];
    y = s2[31:0];
    arith = 1'b1;
    case (i[24:21])
      4'h2, 4'hA: sum = {1'b0, x} + {1'b0, ~y} + 33'd1;
      4'h3:       sum = {1'b0, y} + {1'b0, ~x} + 33'd1;
      4'h4, 4'hB: sum = {1'b0, x} + {1'b0, y};
      4'h5:       sum = {1'b0, x} + {1'b0, y} + 33'(fc);
      4'h6:       sum = {1'b0, x} + {1'b0, ~y} + 33'(fc);
      4'h7:       sum = {1'b0, y} + {1'b0, ~x} + 33'(fc);
      default:    begin arith = 1'b0; sum = '0; end
    endcase
    if (arith) begin
      res = sum[31:0];
      c = sum[32];
      case (i[24:21])
        4'h4, 4'h5, 4'hB: v = (x[31] == y[31]) && (res[31] != x[31]);
        4'h3, 4'h7:       v = (x[31] == y[31]) ? 1'b0 : (res[31] != y[31]);
        default:          v = (x[31] != y[31]) && (res[31] != x[31]);
      endcase
    end else begin
      case (i[24:21])
        4'h0, 4'h8: res = x & y;
        4'h1, 4'h9: res = x ^ y;
        4'hC:       res = x | y;
        4'hD:       res = y;
        4'hE:       res = x & ~y;
        default:    res = ~y;
      endcase
      c = s2[32];
      v = fv;
    end
    wr = !(i[24:23] == 2'b10);
    if (wr) r[i[15:12]] = res;
    if (i[20]) begin fn = res[31]; fz = res == 0; fc = c; fv = v; end
  endtask

  // ------------------------------------------------------ generator
  function automatic int rreg();        // any of r0-r12
    return $urandom_range(0, 12);
  endfunction

  function automatic logic [31:0] gen();
    logic [3:0] c;
    int k, rd, rn, rs, rm, hi, lo;
    c = ($urandom_range(0, 2) == 0) ? 4'($urandom_range(0, 14)) : AL;
    k = $urandom_range(0, 9);
    if (k < 6) begin
      logic [31:0] w;
      w = {c, 3'b000, 4'($urandom), 1'($urandom), 4'(rreg()), 4'(rreg()), 12'h0};
      case ($urandom_range(0, 2))
        0: w[25:0] = {1'b1, w[24:12], 4'($urandom), 8'($urandom)};
        1: w[11:0] = {5'($urandom), 2'($urandom), 1'b0, 4'(rreg())};
        default: w[11:0] = {4'(rreg()), 1'b0, 2'($urandom), 1'b1, 4'(rreg())};
      endcase
      // TST/TEQ/CMP/CMN must set flags, or they would decode as PSR transfers
      if (w[24:23] == 2'b10) w[20] = 1'b1;
      return w;
    end else if (k < 8) begin
      rm = rreg();
      if ($urandom_range(0, 1) == 0) begin
        do rd = rreg(); while (rd == rm);
        return {c, 6'b000000, 1'($urandom), 1'($urandom), 4'(rd), 4'(rreg()), 4'(rreg()), 4'b1001, 4'(rm)};
      end
      do begin hi = rreg(); lo = rreg(); end while (hi == lo || hi == rm || lo == rm);
      return {c, 5'b00001, 1'($urandom), 1'($urandom), 1'($urandom), 4'(hi), 4'(lo), 4'(rreg()), 4'b1001, 4'(rm)};
    end else begin
      logic b;
      b = 1'($urandom);
      return {c, 3'b010, 1'b1, 1'b1, b, 1'b0, 1'($urandom), 4'd13, 4'(rreg()),
              12'(b ? $urandom_range(0, 255) : 4 * $urandom_range(0, 63))};
    end
  endfunction

  // ------------------------------------------------------------ main
  initial begin
    logic [31:0] w, init [13];
    for (int i = 0; i < 8192; i++) mem.mem[i] = 32'h0;
    // data area and initial register values
    for (int i = 0; i < 64; i++) begin
      w = $urandom;
      mem.mem[(DBASE >> 2) + i] = w;
      for (int k = 0; k < 4; k++) dmem[DBASE + 32'(4 * i + k)] = w[8*k +: 8];
    end
    prog.push_back({AL, 8'h3A, 4'h0, 4'hD, 4'hA, 8'h03});        // MOV r13, #0x3000
    for (int i = 0; i < 13; i++) begin
      init[i] = $urandom;
      if (i == 1) init[i] = 32'h8000_0000;
      if (i == 2) init[i] = 32'h0000_0000;
      mem.mem[((DBASE + 32'h100) >> 2) + i] = init[i];
      prog.push_back({AL, 8'h59, 4'hD, 4'(i), 12'(32'h100 + 4 * i)}); // LDR ri, [r13, #..]
    end
    for (int n = 0; n < NINSTR; n++) prog.push_back(gen());
    // dump: MOV r13, #0x1000; STR r0-r12; MRS r0, CPSR; STR r0; done
    prog.push_back({AL, 8'h3A, 4'h0, 4'hD, 4'hA, 8'h01});
    for (int i = 0; i < 13; i++) prog.push_back({AL, 8'h58, 4'hD, 4'(i), 12'(4 * i)});
    prog.push_back({AL, 8'h10, 4'hF, 4'h0, 12'h000});
    prog.push_back({AL, 8'h58, 4'hD, 4'h0, 12'(4 * 13)});
    prog.push_back({AL, 8'h3A, 4'h0, 4'hD, 4'hA, 8'h02});        // MOV r13, #0x2000
    prog.push_back({AL, 8'h58, 4'hD, 4'hD, 12'h0});
    prog.push_back({AL, 8'hEA, 24'hFFFFFE});                      // B .
    foreach (prog[k]) mem.mem[k] = prog[k];

    // reference run
    foreach (r[i]) r[i] = 32'h0;
    for (int i = 0; i < 13; i++) r[i] = init[i];
    r[13] = DBASE;
    fn = 0; fz = 0; fc = 0; fv = 0;
    for (int k = 14; k < 14 + NINSTR; k++) model_exec(prog[k]);

    repeat (3) @(posedge clk);
    nreset = 1'b1;
    wait (nreset && nrw && a == DONE);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 13; i++) begin
      checks++;
      if (mem.mem[(RES >> 2) + i] !== r[i]) begin
        failures++;
        $display("FAIL r%0d: core %h model %h", i, mem.mem[(RES >> 2) + i], r[i]);
      end
    end
    checks++;
    if (mem.mem[(RES >> 2) + 13][31:28] !== {fn, fz, fc, fv}) begin
      failures++;
      $display("FAIL flags: core %b model %b", mem.mem[(RES >> 2) + 13][31:28], {fn, fz, fc, fv});
    end
    for (int i = 0; i < 64; i++) begin
      w = {rdb(DBASE + 32'(4 * i + 3)), rdb(DBASE + 32'(4 * i + 2)), rdb(DBASE + 32'(4 * i + 1)),
           rdb(DBASE + 32'(4 * i))};
      checks++;
      if (mem.mem[(DBASE >> 2) + i] !== w) begin
        failures++;
        $display("FAIL data word %0d: core %h model %h", i, mem.mem[(DBASE >> 2) + i], w);
      end
    end
    $display("%0d random instructions", NINSTR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
