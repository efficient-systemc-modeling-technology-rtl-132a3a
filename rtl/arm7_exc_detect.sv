// arm7_exc_detect: interrupt synchroniser and exception detector.
//
// nFIQ and nIRQ are active-low interrupt requests. When ISYNC is low they
// are treated as asynchronous and pass through one register stage (one
// cycle of delay) before they can affect the processor; with ISYNC high
// they are used directly. After synchronisation:
//  * ABORT (mem_abort) high during a cycle whose access is an instruction fetch
//    (i_fetch_en high) is a prefetch abort, otherwise a data abort;
//  * a low nfiq_sync is an FIQ event, which becomes an FIQ exception only
//    when the F bit of CPSR is clear; IRQ likewise with the I bit.
// Outputs are combinational from the current inputs and the synchroniser
// state; the core latches the aborts and takes FIQ/IRQ at an instruction
// boundary. The detection flow follows the design; the single-flop
// synchroniser depth follows its "one cycle delay" statement.
module arm7_exc_detect (
  input  logic clk,
  input  logic nreset,
  input  logic isync,
  input  logic nfiq,
  input  logic nirq,
  input  logic mem_abort,
  input  logic i_fetch_en,
  input  logic f_bit,
  input  logic i_bit,
  output logic pabt,
  output logic dabt,
  output logic fiq,
  output logic irq
);

  logic nfiq_q, nirq_q;
  logic nfiq_sync, nirq_sync;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      nfiq_q <= 1'b1;
      nirq_q <= 1'b1;
    end else begin
      nfiq_q <= nfiq;
      nirq_q <= nirq;
    end
  end

  assign nfiq_sync = isync ? nfiq : nfiq_q;
  assign nirq_sync = isync ? nirq : nirq_q;

  assign pabt = mem_abort &  i_fetch_en;
  assign dabt = mem_abort & ~i_fetch_en;
  assign fiq  = ~nfiq_sync & ~f_bit;
  assign irq  = ~nirq_sync & ~i_bit;

endmodule
