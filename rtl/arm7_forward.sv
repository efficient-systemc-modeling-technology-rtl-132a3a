// arm7_forward: forwarding unit.
//
// The instruction leaving ID reads its operands from the register file in
// the same cycle in which the instruction in EX may still be writing its
// results. For each of the NREAD read ports this unit compares the physical
// register index being read with the indices written this cycle by the two
// EX write ports and, on a match, substitutes the data being written, so
// the next instruction gets EX results without waiting. Write port 0 has
// priority over port 1 when both hit the same register. Index 31 (r15) is
// never forwarded: the core supplies the PC value itself. Combinational.
// That a forwarding unit passes EX output to the next instruction comes from
// the design; the port count and the priority are this design's choices.
module arm7_forward #(
  parameter int unsigned NREAD = 4
) (
  input  logic [NREAD-1:0][4:0]  rd_idx,
  input  logic [NREAD-1:0][31:0] rd_data,
  input  logic                   w0_en,
  input  logic [4:0]             w0_idx,
  input  logic [31:0]            w0_data,
  input  logic                   w1_en,
  input  logic [4:0]             w1_idx,
  input  logic [31:0]            w1_data,
  output logic [NREAD-1:0][31:0] fwd_data,
  output logic [NREAD-1:0]       fwd_hit
);

  always_comb begin
    for (int i = 0; i < NREAD; i++) begin
      fwd_data[i] = rd_data[i];
      fwd_hit[i]  = 1'b0;
      if (rd_idx[i] != 5'd31) begin
        if (w0_en && w0_idx == rd_idx[i]) begin
          fwd_data[i] = w0_data;
          fwd_hit[i]  = 1'b1;
        end else if (w1_en && w1_idx == rd_idx[i]) begin
          fwd_data[i] = w1_data;
          fwd_hit[i]  = 1'b1;
        end
      end
    end
  end

endmodule
