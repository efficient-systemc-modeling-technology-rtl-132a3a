// tb_arm7_addr_reg: loads the address register from each of its four
// sources, checks hold when load is low, the +4 output used by block
// transfers, and the asynchronous reset.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_addr_reg;
  import arm7_pkg::*;
  logic        clk = 0, nreset = 0, load;
  asel_e       sel;
  logic [31:0] pc_inc, alu, vector, a, inc4, model;
  int checks = 0, failures = 0;

  arm7_addr_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    load = 0; sel = AS_PCINC; pc_inc = '0; alu = '0; vector = '0; model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (a !== 32'h0) begin failures++; $display("FAIL reset value %h", a); end
    nreset = 1;
    repeat (2000) begin
      @(negedge clk);
      load = 1'($urandom); sel = asel_e'($urandom_range(0, 3));
      pc_inc = $urandom; alu = $urandom; vector = {27'h0, 3'($urandom), 2'b00};
      if (load)
        case (sel)
          AS_PCINC:  model = pc_inc;
          AS_ALU:    model = alu;
          AS_LDMSTM: model = model + 32'd4;
          default:   model = vector;
        endcase
      @(posedge clk);
      #1;
      checks++;
      if (a !== model || inc4 !== model + 32'd4) begin
        failures++;
        $display("FAIL sel=%0d load=%b: a=%h inc4=%h exp %h", sel, load, a, inc4, model);
      end
    end
    #2 nreset = 0;
    #1;
    checks++;
    if (a !== 32'h0) begin failures++; $display("FAIL async reset %h", a); end
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
