// tb_arm7_decoder: random 32-bit words are classified by a reference
// written as a priority list of bit patterns (casez) and compared with the
// decoder's instruction type, condition result, extracted fields and
// immediate. Directed words cover one example of each instruction type.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_decoder;
  import arm7_pkg::*;
  logic [31:0] instr;
  logic [3:0]  flags;
  dec_t        dec;
  logic        cond_ok;
  int checks = 0, failures = 0;
  int seen [256];

  arm7_decoder dut (.*);

  function automatic logic ref_cond(input logic [3:0] c, input logic [3:0] f);
    logic n, z, cc, v;
    {n, z, cc, v} = f;
    case (c)
      4'h0: return z;          4'h1: return !z;
      4'h2: return cc;         4'h3: return !cc;
      4'h4: return n;          4'h5: return !n;
      4'h6: return v;          4'h7: return !v;
      4'h8: return cc && !z;   4'h9: return !cc || z;
      4'hA: return n == v;     4'hB: return n != v;
      4'hC: return !z && n == v;
      4'hD: return z || n != v;
      4'hE: return 1'b1;
      default: return 1'b0;    // NV: treated as never
    endcase
  endfunction

  function automatic itype_e ref_type(input logic [31:0] i);
    logic pcd;
    int   n;
    pcd = i[15:12] == 4'hF;
    n = $countones(i[15:0]);
    casez (i[27:0])
      28'b0001_0010_1111_1111_1111_0001_????: return IT_BX;
      28'b0000_00??_????_????_????_1001_????: return i[21] ? IT_MLA : IT_MUL;
      28'b0000_1???_????_????_????_1001_????: return i[21] ? IT_MLAL : IT_MULL;
      28'b0001_0?00_????_????_0000_1001_????: return IT_SWP;
      28'b000?_????_????_????_????_1001_????: return IT_UND;
      28'b000?_?1?1_????_????_????_1??1_????: return pcd ? IT_HLDR_IMMOFF_BR : IT_HLDR_IMMOFF;
      28'b000?_?1?0_????_????_????_1??1_????: return IT_HSTR_IMMOFF;
      28'b000?_?0?1_????_????_????_1??1_????: return pcd ? IT_HLDR_REGOFF_BR : IT_HLDR_REGOFF;
      28'b000?_?0?0_????_????_????_1??1_????: return IT_HSTR_REGOFF;
      28'b0001_0?00_1111_????_0000_0000_0000: return IT_MRS;
      28'b0001_0?10_???1_1111_0000_0000_????: return IT_MSR_REG;
      28'b0001_0?10_???0_1111_0000_0000_????: return IT_MSR_REG_FLG;
      28'b0001_0??0_????_????_????_????_????: return IT_UND;
      28'b0000_????_????_????_????_???1_????,
      28'b0001_1???_????_????_????_???1_????,
      28'b0001_0??1_????_????_????_???1_????:
        return (pcd && !(i[24:23] == 2'b10)) ? IT_DP_REG_SHIFT_BR : IT_DP_REG_SHIFT;
      28'b000?_????_????_????_????_????_????:
        return (pcd && !(i[24:23] == 2'b10)) ? IT_DP_IMM_SHIFT_BR : IT_DP_IMM_SHIFT;
      28'b0011_0?10_????_1111_????_????_????: return IT_MSR_IMM_FLG;
      28'b0011_0??0_????_????_????_????_????: return IT_UND;
      28'b001?_????_????_????_????_????_????:
        return (pcd && !(i[24:23] == 2'b10)) ? IT_DP_IMM_BR : IT_DP_IMM;
      28'b010?_???1_????_????_????_????_????: return pcd ? IT_LDR_IMMOFF_BR : IT_LDR_IMMOFF;
      28'b010?_???0_????_????_????_????_????: return IT_STR_IMMOFF;
      28'b011?_????_????_????_????_???1_????: return IT_UND;
      28'b011?_???1_????_????_????_????_????: return pcd ? IT_LDR_REGOFF_BR : IT_LDR_REGOFF;
      28'b011?_???0_????_????_????_????_????: return IT_STR_REGOFF;
      28'b100?_????_????_????_????_????_????: begin
        if (n == 0) return IT_UND;
        if (i[20]) return (n == 1) ? (i[15] ? IT_LDM_1R_BR : IT_LDM_1R) : (i[15] ? IT_LDM_BR : IT_LDM);
        return (n == 1) ? IT_STM_1R : IT_STM;
      end
      28'b101?_????_????_????_????_????_????: return IT_B;
      28'b1111_????_????_????_????_????_????: return IT_SWI;
      default: return IT_UND;
    endcase
  endfunction

  task automatic one(input logic [31:0] i, input logic [3:0] f);
    itype_e      e;
    logic [31:0] im;
    logic        c;
    instr = i; flags = f;
    #1;
    c = ref_cond(i[31:28], f);
    e = c ? ref_type(i) : IT_NOP;
    case (i[27:25])
      3'b000:  im = {24'h0, i[11:8], i[3:0]};
      3'b001:  im = {24'h0, i[7:0]};
      3'b101:  im = 32'($signed(i[23:0])) << 2;
      default: im = {20'h0, i[11:0]};
    endcase
    seen[int'(dec.itype)]++;
    checks++;
    if (dec.itype !== e || cond_ok !== c || dec.imm !== im || dec.rn !== i[19:16] ||
        dec.rd !== i[15:12] || dec.rm !== i[3:0] || dec.rs !== i[11:8] ||
        dec.reglist !== i[15:0] || dec.opcode !== aluop_e'(i[24:21]) || dec.s !== i[20]) begin
      failures++;
      $display("FAIL instr=%h flags=%b: type %0d exp %0d cond %b exp %b imm %h exp %h", i, f,
               dec.itype, e, cond_ok, c, dec.imm, im);
    end
  endtask

  localparam logic [31:0] DIRECTED [39] = '{
    32'hE12FFF11, 32'hE0010392, 32'hE0214392, 32'hE0810392, 32'hE0A10392, 32'hE1021093,
    32'hE19100B2, 32'hE19F00B2, 32'hE18100B2, 32'hE1D100B2, 32'hE1DF00B2, 32'hE1C100B2,
    32'hE0810312, 32'hE08F0312, 32'hE0810102, 32'hE08F0102, 32'hE328F20F, 32'hE2810001,
    32'hE28FF001, 32'hE5910004, 32'hE591F004, 32'hE5810004, 32'hE7910002, 32'hE791F002,
    32'hE7810002, 32'hE6000010, 32'hE8910001, 32'hE8918000, 32'hE8810001, 32'hE8910003,
    32'hE8918003, 32'hE8810003, 32'hEBFFFFFE, 32'hEF000000, 32'hE10F0000, 32'hE129F000,
    32'hE128F000, 32'h00810002, 32'hE1510002
  };

  initial begin
    foreach (seen[k]) seen[k] = 0;
    foreach (DIRECTED[k]) one(DIRECTED[k], 4'b0000);
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) one({4'(c), 28'h2810001}, 4'(f));
    repeat (20000) begin
      logic [31:0] w;
      w = $urandom;
      if ($urandom_range(0, 1) == 1) w[31:28] = 4'hE;
      one(w, 4'($urandom));
    end
    for (int t = 100; t <= 137; t++) begin
      checks++;
      if (seen[t] == 0) begin failures++; $display("FAIL type %0d never produced", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
