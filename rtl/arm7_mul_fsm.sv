// arm7_mul_fsm: multiplication sub-FSM (7-stage).
//
// Sequences a multiply instruction through the EX stage. start is pulsed in
// the cycle the multiply enters EX, together with the multiplier operand
// (Rs), which is latched. The states are:
//   S1..S4   one per 8-bit slice of the multiplier. In each, the 32x8
//            multiplier forms a 40-bit partial product of the multiplicand
//            and the lowest slice (mbyte, weight 2^(8*slice)) and the 64-bit
//            adder accumulates it; the multiplier register then shifts
//            right by 8. The sequence ends early once the remaining
//            multiplier bits are all zero; a negative multiplier of a
//            signed long multiply always takes all four slices, the last
//            one signed (mbyte_signed).
//   S_FINISH product complete. Finishes here if there is neither an
//            accumulation nor a 64-bit result to write.
//   MLA      adds the accumulate operand (one more cycle); finishes here
//            for a 32-bit result.
//   LWRITE   writes the 64-bit result to two registers; finishes.
// start is accepted when idle or in the finish cycle of a previous multiply.
// So a multiply takes 2 cycles at least and 7 (long multiply-accumulate
// with a full 32-bit multiplier) at most. finish is high in the last cycle.
// The states and cycle counts are those of the design; the early-end rule
// for signed operands is this design's choice.
//
// The seven states and the early exits to S_FINISH follow the published
// design; the exit test (unused multiplier bits all zero), the signed top
// slice of a signed long multiply and restarting in the finish cycle are
// this design's choices.
module arm7_mul_fsm (
  input  logic        clk,
  input  logic        nreset,
  input  logic        start,
  input  logic [31:0] multiplier,
  input  logic        is_signed,   // signed long multiply
  input  logic        accumulate,
  input  logic        long_mul,
  output logic        busy,
  output logic        step,        // S1..S4: add a partial product
  output logic        first,       // S1: accumulator starts from zero
  output logic [1:0]  slice,
  output logic [7:0]  mbyte,
  output logic        mbyte_signed,
  output logic        in_finish,
  output logic        in_mla,
  output logic        in_lwrite,
  output logic        finish
);

  typedef enum logic [2:0] {
    MS_IDLE, MS_S1, MS_S2, MS_S3, MS_S4, MS_FINISH, MS_MLA, MS_LWRITE
  } mstate_e;

  mstate_e     state, state_n;
  logic [31:0] mreg;
  logic        sgn_q, acc_q, long_q;
  logic        rest_zero;

  assign step      = state inside {MS_S1, MS_S2, MS_S3, MS_S4};
  assign first     = state == MS_S1;
  assign in_finish = state == MS_FINISH;
  assign in_mla    = state == MS_MLA;
  assign in_lwrite = state == MS_LWRITE;
  assign busy      = state != MS_IDLE;
  assign mbyte     = mreg[7:0];
  assign mbyte_signed = sgn_q && state == MS_S4;
  assign rest_zero = mreg[31:8] == 24'h0 && !(sgn_q && mreg[31]);

  always_comb begin
    unique case (state)
      MS_S1:   slice = 2'd0;
      MS_S2:   slice = 2'd1;
      MS_S3:   slice = 2'd2;
      default: slice = 2'd3;
    endcase
  end

  always_comb begin
    state_n = state;
    finish  = 1'b0;
    unique case (state)
      MS_IDLE:   if (start) state_n = MS_S1;
      MS_S1:     state_n = rest_zero ? MS_FINISH : MS_S2;
      MS_S2:     state_n = rest_zero ? MS_FINISH : MS_S3;
      MS_S3:     state_n = rest_zero ? MS_FINISH : MS_S4;
      MS_S4:     state_n = MS_FINISH;
      MS_FINISH: begin
        if (acc_q)       state_n = MS_MLA;
        else if (long_q) state_n = MS_LWRITE;
        else begin
          state_n = MS_IDLE;
          finish  = 1'b1;
        end
      end
      MS_MLA: begin
        if (long_q) state_n = MS_LWRITE;
        else begin
          state_n = MS_IDLE;
          finish  = 1'b1;
        end
      end
      MS_LWRITE: begin
        state_n = MS_IDLE;
        finish  = 1'b1;
      end
      default: state_n = MS_IDLE;
    endcase
    // a new multiply may enter EX in the finish cycle of the previous one
    if (start) state_n = MS_S1;
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state  <= MS_IDLE;
      mreg   <= '0;
      sgn_q  <= 1'b0;
      acc_q  <= 1'b0;
      long_q <= 1'b0;
    end else begin
      state <= state_n;
      if (start) begin
        mreg   <= multiplier;
        sgn_q  <= is_signed;
        acc_q  <= accumulate;
        long_q <= long_mul;
      end else if (step) begin
        // arithmetic shift keeps the sign of a signed multiplier
        mreg <= {{8{sgn_q & mreg[31]}}, mreg[31:8]};
      end
    end
  end

endmodule
