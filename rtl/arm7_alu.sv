// arm7_alu: arithmetic/logic unit of the EX stage.
//
// Three parts, as in the EX-stage datapath of the design:
//  * a reverse-inverse multiplexer that swaps the operands (RSB, RSC) and/or
//    inverts the subtrahend (SUB, SBC, RSB, RSC, CMP);
//  * a 32-bit logic unit (AND, EOR, ORR, BIC, MOV, MVN, TST, TEQ);
//  * a 64-bit adder. Arithmetic instructions use only its high 32-bit half,
//    the low half being filled with zeros, and carry-in enters at bit 32.
//    For multiplication the operand multiplexers instead feed it a 40-bit
//    partial product (sign- or zero-extended and shifted left by 8*prod_sh)
//    or a 64-bit addend (accumulate), plus the running 64-bit accumulator.
// Outputs: the 32-bit result and N, Z, C, V for data-processing
// instructions (logical operations take C from the shifter, keep V), and
// sum64 for the multiply path. Combinational; the accumulator register
// itself lives in the core.
//
// The reverse-inverse multiplexer, logic unit and 64-bit adder with ALU
// operands in its upper half follow the published design; so does adding
// the partial product of the preceding cycle (the core registers it). The
// separate addend mode for accumulation is this design's choice.
module arm7_alu
  import arm7_pkg::*;
(
  input  aluop_e      op,
  input  logic [31:0] a,          // Src_a (Rn)
  input  logic [31:0] b,          // barrel-shifter output
  input  logic [3:0]  flags_in,   // {N,Z,C,V}
  input  logic        shc,        // shifter carry-out
  input  logic [1:0]  mode64,     // 0: ALU, 1: acc + product, 2: acc + addend
  input  logic [39:0] prod,
  input  logic        prod_signed,
  input  logic [1:0]  prod_sh,
  input  logic [63:0] addend,
  input  logic [63:0] acc,
  output logic [31:0] result,
  output logic [3:0]  flags_out,
  output logic [63:0] sum64
);

  logic [31:0] ra, rb;     // rev-inv mux outputs
  logic        cin;
  logic        arith;
  logic [63:0] add_a, add_b;
  logic [64:0] sum;
  logic [31:0] logic_r;
  logic [63:0] prod_ext;
  logic        cf, vf;

  // reverse-inverse multiplexer
  always_comb begin
    arith = 1'b1;
    ra    = a;
    rb    = b;
    cin   = 1'b0;
    unique case (op)
      OP_SUB, OP_CMP: begin rb = ~b; cin = 1'b1; end
      OP_RSB:         begin ra = b; rb = ~a; cin = 1'b1; end
      OP_ADD, OP_CMN: cin = 1'b0;
      OP_ADC:         cin = flags_in[1];
      OP_SBC:         begin rb = ~b; cin = flags_in[1]; end
      OP_RSC:         begin ra = b; rb = ~a; cin = flags_in[1]; end
      default:        arith = 1'b0;
    endcase
  end

  // logic unit
  always_comb begin
    unique case (op)
      OP_AND, OP_TST: logic_r = a & b;
      OP_EOR, OP_TEQ: logic_r = a ^ b;
      OP_ORR:         logic_r = a | b;
      OP_BIC:         logic_r = a & ~b;
      OP_MVN:         logic_r = ~b;
      default:        logic_r = b;       // MOV
    endcase
  end

  // 64-bit adder with its operand multiplexers (Mux_a, Mux_b)
  always_comb begin
    prod_ext = prod_signed ? {{24{prod[39]}}, prod} : {24'h0, prod};
    unique case (mode64)
      2'd1:    begin add_a = prod_ext << (8 * prod_sh); add_b = acc; end
      2'd2:    begin add_a = addend;                    add_b = acc; end
      default: begin add_a = {ra, 32'h0};               add_b = {rb, 32'h0}; end
    endcase
    sum   = {1'b0, add_a} + {1'b0, add_b} + {32'h0, (mode64 == 2'd0) & cin, 32'h0};
    sum64 = sum[63:0];
  end

  always_comb begin
    if (arith) begin
      result = sum[63:32];
      cf     = sum[64];
      vf     = (ra[31] == rb[31]) && (result[31] != ra[31]);
    end else begin
      result = logic_r;
      cf     = shc;
      vf     = flags_in[0];
    end
    flags_out = {result[31], result == 32'h0, cf, vf};
  end

endmodule
