// arm7_mul32x8: the 32x8 multiplier of the EX stage.
//
// Multiplies the 32-bit multiplicand by one 8-bit slice of the multiplier
// and returns a 40-bit partial product; a full 32x32 multiplication takes up
// to four such steps, sequenced by the multiplication sub-FSM and summed in
// the 64-bit adder. a_signed and b_signed treat the operands as two's
// complement (used by signed long multiplies, where the top slice is
// signed); p is then a signed 40-bit value, otherwise unsigned. Every
// combination used fits in 40 bits. Combinational. The 32x8 size and the
// 40-bit product come from the design; the signed handling is this
// design's choice.
//
// The 32x8 multiplier with a 40-bit product follows the published design;
// the signed-operand handling and the single combinational multiply are
// this design's choices.
module arm7_mul32x8 (
  input  logic [31:0] a,
  input  logic [7:0]  b,
  input  logic        a_signed,
  input  logic        b_signed,
  output logic [39:0] p
);

  logic signed [32:0] a_ext;
  logic signed [8:0]  b_ext;

  always_comb begin
    a_ext = {a_signed & a[31], a};
    b_ext = {b_signed & b[7], b};
    p     = 40'(a_ext * b_ext);
  end

endmodule
