// tb_arm7_alu: checks every data-processing opcode of the ALU, with its
// N/Z/C/V flags, against a reference computed with 33-bit arithmetic, and
// the 64-bit multiply-accumulate path (shifted partial products, addend).
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_alu;
  import arm7_pkg::*;
  aluop_e op;
  logic [31:0] a, b, result;
  logic [3:0]  flags_in, flags_out;
  logic        shc, prod_signed;
  logic [1:0]  mode64, prod_sh;
  logic [39:0] prod;
  logic [63:0] addend, acc, sum64;
  int checks = 0, failures = 0;

  arm7_alu dut (.*);

  task automatic one_dp(input aluop_e o, input logic [31:0] x, input logic [31:0] y,
                        input logic [3:0] f, input logic sc);
    logic [32:0] s;
    logic [31:0] r;
    logic c, v, ar;
    op = o; a = x; b = y; flags_in = f; shc = sc; mode64 = 0; prod = '0; prod_signed = 0;
    prod_sh = 0; addend = '0; acc = '0;
    #1;
    ar = 1; v = 0; s = '0;
    case (o)
      OP_ADD, OP_CMN: s = {1'b0, x} + {1'b0, y};
      OP_ADC:         s = {1'b0, x} + {1'b0, y} + 33'(f[1]);
      OP_SUB, OP_CMP: s = {1'b0, x} + {1'b0, ~y} + 33'd1;
      OP_SBC:         s = {1'b0, x} + {1'b0, ~y} + 33'(f[1]);
      OP_RSB:         s = {1'b0, y} + {1'b0, ~x} + 33'd1;
      OP_RSC:         s = {1'b0, y} + {1'b0, ~x} + 33'(f[1]);
      default:        ar = 0;
    endcase
    if (ar) begin
      r = s[31:0]; c = s[32];
      case (o)
        OP_ADD, OP_CMN, OP_ADC: v = (x[31] == y[31]) && (r[31] != x[31]);
        OP_SUB, OP_CMP, OP_SBC: v = (x[31] != y[31]) && (r[31] != x[31]);
        default:                v = (y[31] != x[31]) && (r[31] != y[31]);
      endcase
    end else begin
      case (o)
        OP_AND, OP_TST: r = x & y;
        OP_EOR, OP_TEQ: r = x ^ y;
        OP_ORR:         r = x | y;
        OP_BIC:         r = x & ~y;
        OP_MVN:         r = ~y;
        default:        r = y;
      endcase
      c = sc; v = f[0];
    end
    checks++;
    if (result !== r || flags_out !== {r[31], r == 0, c, v}) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h: got %h %b exp %h %b", o.name(), x, y, result, flags_out, r,
               {r[31], r == 0, c, v});
    end
  endtask

  task automatic one_mul(input logic [39:0] p, input logic sg, input logic [1:0] sh,
                         input logic [63:0] ac);
    logic [63:0] e;
    mode64 = 1; prod = p; prod_signed = sg; prod_sh = sh; acc = ac; op = OP_ADD;
    #1;
    e = ac + ((sg ? {{24{p[39]}}, p} : {24'h0, p}) << (8 * sh));
    checks++;
    if (sum64 !== e) begin
      failures++;
      $display("FAIL mul p=%h sh=%0d: got %h exp %h", p, sh, sum64, e);
    end
  endtask

  initial begin
    for (int o = 0; o < 16; o++) begin
      one_dp(aluop_e'(o), 32'h7FFF_FFFF, 32'h0000_0001, 4'b0010, 1'b1);
      one_dp(aluop_e'(o), 32'h0, 32'h0, 4'b0000, 1'b0);
      one_dp(aluop_e'(o), 32'h8000_0000, 32'h8000_0000, 4'b0011, 1'b0);
      repeat (400) one_dp(aluop_e'(o), $urandom, $urandom, 4'($urandom), 1'($urandom));
    end
    repeat (300) one_mul({$urandom, 8'($urandom)}, 1'($urandom), 2'($urandom), {$urandom, $urandom});
    mode64 = 2; addend = 64'h0000_0001_FFFF_FFFF; acc = 64'h1; #1;
    checks++;
    if (sum64 !== 64'h0000_0002_0000_0000) begin failures++; $display("FAIL addend path"); end
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
