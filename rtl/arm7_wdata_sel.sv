// arm7_wdata_sel: write data selector (store replication).
//
// Drives the 32-bit data bus for a store. A halfword store copies the low
// halfword into the high halfword; a byte store copies the low byte into all
// four byte lanes, so the memory can take the data from whichever lane the
// address selects. A word is passed unchanged. Combinational; follows the
// design's description of the write selector.
module arm7_wdata_sel
  import arm7_pkg::*;
(
  input  logic [31:0] wdata,
  input  size_e       size,
  output logic [31:0] dout
);

  always_comb begin
    unique case (size)
      SZ_BYTE: dout = {4{wdata[7:0]}};
      SZ_HALF: dout = {2{wdata[15:0]}};
      default: dout = wdata;
    endcase
  end

endmodule
