// arm7_mem_model: behavioural single-port memory for the core's testbenches.
//
// WORDS 32-bit words, little-endian, zero wait states: rdata shows the word
// at a[..:2] combinationally; on a rising clock edge with nrw=1 the byte
// lanes selected by mas and a[1:0] take wdata (which the core replicates
// over the lanes for byte and halfword stores). Addresses wrap modulo the
// memory size. Testbenches preload it through the mem array.
//
// The memory is outside the published design; its zero-wait timing and
// little-endian byte lanes are this design's choices.
module arm7_mem_model
  import arm7_pkg::*;
#(
  parameter int unsigned WORDS = 8192
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] wdata,
  input  logic        nrw,
  input  size_e       mas,
  output logic [31:0] rdata
);

  logic [31:0] mem [WORDS];
  logic [$clog2(WORDS)-1:0] idx;
  logic [3:0] be;

  assign idx   = a[$clog2(WORDS)+1:2];
  assign rdata = mem[idx];

  always_comb begin
    unique case (mas)
      SZ_BYTE: be = 4'b0001 << a[1:0];
      SZ_HALF: be = a[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  always_ff @(posedge clk) begin
    if (nrw) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[idx][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

endmodule
