// tb_arm7_barrel_shifter: random and corner-case test of the barrel shifter
// against a reference written with 64-bit arithmetic, for both the
// immediate and the register forms of every shift kind.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_barrel_shifter;
  import arm7_pkg::*;
  logic [31:0] val, result;
  shift_e      shtype;
  logic [7:0]  amount;
  logic        imm_form, cin, cout;
  int checks = 0, failures = 0;

  arm7_barrel_shifter dut (.*);

  // reference: shift by an effective amount n (0..255), ARM rules
  function automatic logic [32:0] ref_shift(input logic [31:0] v, input shift_e t, input int n,
                                            input logic imm, input logic c);
    logic [63:0] w;
    logic [31:0] r;
    logic        co;
    r = v; co = c;
    if (imm) begin
      if (t == SH_LSR && n == 0) n = 32;
      if (t == SH_ASR && n == 0) n = 32;
      if (t == SH_ROR && n == 0) return {v[0], c, v[31:1]};
    end
    if (n == 0) return {c, v};
    case (t)
      SH_LSL: begin w = {32'h0, v} << n; r = w[31:0]; co = (n <= 32) ? w[32] : 1'b0; end
      SH_LSR: begin w = {v, 32'h0} >> n; r = w[63:32]; co = (n <= 32) ? w[31] : 1'b0; end
      SH_ASR: begin
        w = 64'($signed({v, 32'h0}) >>> ((n > 32) ? 32 : n));
        r = w[63:32]; co = w[31];
        if (n >= 32) begin r = {32{v[31]}}; co = v[31]; end
      end
      default: begin
        r = (v >> (n % 32)) | (v << ((32 - n % 32) % 32));
        co = r[31];
      end
    endcase
    return {co, r};
  endfunction

  task automatic one(input logic [31:0] v, input shift_e t, input logic [7:0] n, input logic imm,
                     input logic c);
    logic [32:0] e;
    val = v; shtype = t; amount = imm ? {3'b0, n[4:0]} : n; imm_form = imm; cin = c;
    #1;
    e = ref_shift(v, t, int'(amount), imm, c);
    checks++;
    if ({cout, result} !== e) begin
      failures++;
      $display("FAIL v=%h t=%0d n=%0d imm=%b c=%b: got %b/%h exp %b/%h", v, t, amount, imm, c,
               cout, result, e[32], e[31:0]);
    end
  endtask

  initial begin
    for (int t = 0; t < 4; t++)
      for (int n = 0; n < 40; n++) begin
        one(32'h8000_0001, shift_e'(t), 8'(n), 1'b0, 1'b1);
        one(32'h7F00_FF80, shift_e'(t), 8'(n), 1'b1, 1'b0);
      end
    one(32'h1234_5678, SH_LSL, 8'd200, 1'b0, 1'b1);
    one(32'h8234_5678, SH_ROR, 8'd64, 1'b0, 1'b0);
    repeat (3000)
      one($urandom, shift_e'($urandom_range(0, 3)), 8'($urandom_range(0, 70)), 1'($urandom),
          1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
