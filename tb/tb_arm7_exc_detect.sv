// tb_arm7_exc_detect: abort classification by fetch/data cycle, interrupt
// masking by the F and I bits, and the one-cycle delay of the interrupt
// lines when the synchroniser is selected (isync low).
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_exc_detect;
  logic clk = 0, nreset = 0;
  logic isync, nfiq, nirq, mem_abort, i_fetch_en, f_bit, i_bit;
  logic pabt, dabt, fiq, irq;
  logic nfiq_d, nirq_d;
  int checks = 0, failures = 0;

  arm7_exc_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    isync = 1; nfiq = 1; nirq = 1; mem_abort = 0; i_fetch_en = 0; f_bit = 0; i_bit = 0;
    nfiq_d = 1; nirq_d = 1;
    #12 nreset = 1;
    repeat (3000) begin
      @(negedge clk);
      isync = 1'($urandom); mem_abort = 1'($urandom); i_fetch_en = 1'($urandom);
      f_bit = 1'($urandom); i_bit = 1'($urandom);
      nfiq = 1'($urandom); nirq = 1'($urandom);
      #1;
      checks++;
      if (pabt !== (mem_abort && i_fetch_en) || dabt !== (mem_abort && !i_fetch_en) ||
          fiq !== (!(isync ? nfiq : nfiq_d) && !f_bit) ||
          irq !== (!(isync ? nirq : nirq_d) && !i_bit)) begin
        failures++;
        $display("FAIL isync=%b ab=%b if=%b F=%b I=%b nfiq=%b nirq=%b: %b%b%b%b", isync, mem_abort,
                 i_fetch_en, f_bit, i_bit, nfiq, nirq, pabt, dabt, fiq, irq);
      end
      @(posedge clk);
      nfiq_d = nfiq; nirq_d = nirq;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
