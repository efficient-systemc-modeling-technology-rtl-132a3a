// arm7_addr_reg: address register with its 4-to-1 source multiplexer.
//
// Holds the address driven on the memory bus a[31:0] for the current cycle.
// Each cycle in which load=1 it takes the next address from one of four
// sources: the PC incrementer (sequential instruction fetch), the ALU
// (computed load/store address or branch target), the LDM/STM sequencer
// (here the register's own value plus 4, produced by the incrementer output
// inc4) and the interrupt/exception vector. With load=0 it holds. Reset
// (nreset low, asynchronous) loads 0, the reset vector. The four sources
// and the single register follow the design; the reset value and the
// hold input are this design's choices.
//
// The four sources follow the published design; the reset value 0 and
// forming the LDM/STM source as the register's own value + 4 are this
// design's choices.
module arm7_addr_reg
  import arm7_pkg::*;
(
  input  logic        clk,
  input  logic        nreset,
  input  logic        load,
  input  asel_e       sel,
  input  logic [31:0] pc_inc,
  input  logic [31:0] alu,
  input  logic [31:0] vector,
  output logic [31:0] a,
  output logic [31:0] inc4
);

  logic [31:0] next_a;

  assign inc4 = a + 32'd4;

  always_comb begin
    unique case (sel)
      AS_PCINC:  next_a = pc_inc;
      AS_ALU:    next_a = alu;
      AS_LDMSTM: next_a = inc4;
      default:   next_a = vector;
    endcase
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)   a <= 32'h0;
    else if (load) a <= next_a;
  end

endmodule
