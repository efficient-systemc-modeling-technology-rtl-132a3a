// arm7_barrel_shifter: 32-bit barrel shifter of the EX stage.
//
// Shifts or rotates the second operand (Src_b) before it reaches the ALU:
// logical shift left, logical shift right, arithmetic shift right and rotate
// right, by an immediate amount or by the bottom byte of a register. It also
// produces the shifter carry-out that logical instructions copy into C.
// Immediate form (imm_form=1) uses the instruction-set encodings LSR #0 =
// LSR #32, ASR #0 = ASR #32 and ROR #0 = RRX (rotate right through carry);
// with LSL #0 the value and carry pass unchanged. Register form (imm_form=0)
// takes an 8-bit amount: 0 leaves value and carry unchanged, amounts of 32
// and above follow the architectural rules. The rotated 8-bit immediate of a
// data-processing instruction is produced with ROR in register form.
// Purely combinational. Which shift kinds exist comes from the design; the
// special-case rules are those of the ARM v4 instruction set.
//
// The four shift kinds on the second operand follow the published design;
// the funnel-shift structure is this design's choice and the special cases
// (amount 0, 32 and above, RRX) follow the ARM v4 architecture.
module arm7_barrel_shifter
  import arm7_pkg::*;
(
  input  logic [31:0] val,
  input  shift_e      shtype,
  input  logic [7:0]  amount,
  input  logic        imm_form,
  input  logic        cin,
  output logic [31:0] result,
  output logic        cout
);

  logic [63:0] dbl;
  logic [4:0]  n;

  always_comb begin
    result = val;
    cout   = cin;
    dbl    = {val, val};
    n      = amount[4:0];
    if (imm_form) begin
      unique case (shtype)
        SH_LSL: if (n != 0) begin
          result = val << n;
          cout   = val[32 - n];
        end
        SH_LSR: if (n == 0) begin
          result = '0;
          cout   = val[31];
        end else begin
          result = val >> n;
          cout   = val[n - 1];
        end
        SH_ASR: if (n == 0) begin
          result = {32{val[31]}};
          cout   = val[31];
        end else begin
          result = 32'($signed(val) >>> n);
          cout   = val[n - 1];
        end
        SH_ROR: if (n == 0) begin
          result = {cin, val[31:1]};
          cout   = val[0];
        end else begin
          result = dbl[{1'b0, n} +: 32];
          cout   = val[n - 1];
        end
      endcase
    end else if (amount != 8'd0) begin
      unique case (shtype)
        SH_LSL: if (amount < 8'd32) begin
          result = val << n;
          cout   = val[32 - n];
        end else begin
          result = '0;
          cout   = (amount == 8'd32) ? val[0] : 1'b0;
        end
        SH_LSR: if (amount < 8'd32) begin
          result = val >> n;
          cout   = val[n - 1];
        end else begin
          result = '0;
          cout   = (amount == 8'd32) ? val[31] : 1'b0;
        end
        SH_ASR: if (amount < 8'd32) begin
          result = 32'($signed(val) >>> n);
          cout   = val[n - 1];
        end else begin
          result = {32{val[31]}};
          cout   = val[31];
        end
        SH_ROR: if (n == 0) begin
          result = val;
          cout   = val[31];
        end else begin
          result = dbl[{1'b0, n} +: 32];
          cout   = val[n - 1];
        end
      endcase
    end
  end

endmodule
