// tb_arm7_mul_fsm: starts random multiplies and checks (a) the number of
// 8-bit slices taken (early end when the remaining multiplier bits are
// zero, always four for a negative signed-long multiplier), (b) the extra
// accumulate and long-write cycles, and (c) that the slices issued, each
// weighted by 2^(8*slice), rebuild the exact 64-bit product.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_mul_fsm;
  logic        clk = 0, nreset = 0;
  logic        start, is_signed, accumulate, long_mul;
  logic [31:0] multiplier;
  logic        busy, step, first, in_finish, in_mla, in_lwrite, finish, mbyte_signed;
  logic [1:0]  slice;
  logic [7:0]  mbyte;
  int checks = 0, failures = 0;

  arm7_mul_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic run_one(input logic [31:0] m, input logic sg, input logic ac, input logic lg);
    int steps, cycles, exp_steps, n_mla, n_lw;
    longint prod, mcand, exp_prod;
    mcand = longint'($signed($urandom));
    @(negedge clk);
    start = 1; multiplier = m; is_signed = sg; accumulate = ac; long_mul = lg;
    @(negedge clk);
    start = 0; multiplier = $urandom;
    steps = 0; cycles = 0; prod = 0; n_mla = 0; n_lw = 0;
    forever begin
      cycles++;
      checks++;
      if (first !== (cycles == 1)) begin failures++; $display("FAIL first flag"); end
      if (step) begin
        longint pb;
        steps++;
        pb = mbyte_signed ? longint'($signed(mbyte)) : longint'(mbyte);
        prod += (mcand * pb) <<< (8 * int'(slice));
        checks++;
        if (int'(slice) != steps - 1) begin failures++; $display("FAIL slice %0d", slice); end
      end
      if (in_mla) n_mla++;
      if (in_lwrite) n_lw++;
      if (finish) break;
      if (cycles > 20) begin failures++; $display("FAIL no finish"); break; end
      @(negedge clk);
    end
    if (sg && m[31])                exp_steps = 4;
    else if (m[31:8] == 24'h0)      exp_steps = 1;
    else if (m[31:16] == 16'h0)     exp_steps = 2;
    else if (m[31:24] == 8'h0)      exp_steps = 3;
    else                            exp_steps = 4;
    exp_prod = mcand * (sg ? longint'($signed(m)) : longint'(m));
    checks++;
    if (steps != exp_steps || cycles != exp_steps + 1 + int'(ac) + int'(lg) || n_mla != int'(ac) ||
        n_lw != int'(lg)) begin
      failures++;
      $display("FAIL m=%h sg=%b ac=%b lg=%b: steps %0d cycles %0d", m, sg, ac, lg, steps, cycles);
    end
    checks++;
    if (prod != exp_prod) begin
      failures++;
      $display("FAIL product m=%h: got %h exp %h", m, prod, exp_prod);
    end
  endtask

  initial begin
    start = 0; multiplier = '0; is_signed = 0; accumulate = 0; long_mul = 0;
    #12 nreset = 1;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    run_one(32'h0000_0005, 0, 0, 0);
    run_one(32'h0000_1234, 0, 1, 0);
    run_one(32'h0012_3456, 1, 0, 1);
    run_one(32'hFFFF_FFFF, 1, 1, 1);
    run_one(32'hFFFF_FFFF, 0, 0, 1);
    repeat (1000) begin
      logic [31:0] m;
      m = $urandom >> (8 * $urandom_range(0, 3));
      if ($urandom_range(0, 3) == 0) m = ~m;
      run_one(m, 1'($urandom), 1'($urandom), 1'($urandom));
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
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
