// arm7_rdata_sel: read data selector (load alignment).
//
// Takes the 32-bit word returned by memory and the low address bits of the
// access and moves the addressed byte or halfword down to bit 0, zero- or
// sign-extending it to 32 bits. A word read from an address that is not
// word aligned is rotated so that the addressed byte lands in bits 7:0 (the
// ARM v4 rule for unaligned LDR; this part is this design's addition to the
// byte/halfword alignment the design describes). Little-endian.
// Combinational.
//
// Byte/halfword alignment with zero or sign extension follows the published
// design; little-endian order and rotating unaligned words (ARM v4) are
// this design's choices.
module arm7_rdata_sel
  import arm7_pkg::*;
(
  input  logic [31:0] din,
  input  logic [1:0]  addr_lo,
  input  size_e       size,
  input  logic        sign_ext,
  output logic [31:0] dout
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;
  logic [63:0] dbl;

  always_comb begin
    byte_v = din[8*addr_lo +: 8];
    half_v = addr_lo[1] ? din[31:16] : din[15:0];
    dbl    = {din, din};
    unique case (size)
      SZ_BYTE: dout = {{24{sign_ext & byte_v[7]}}, byte_v};
      SZ_HALF: dout = {{16{sign_ext & half_v[15]}}, half_v};
      default: dout = dbl[8*addr_lo +: 32];
    endcase
  end

endmodule
