// tb_arm7_mul32x8: compares the 32x8 partial product with a 64-bit
// reference for unsigned, signed-multiplicand and signed-signed operands.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_mul32x8;
  logic [31:0] a;
  logic [7:0]  b;
  logic        a_signed, b_signed;
  logic [39:0] p;
  int checks = 0, failures = 0;

  arm7_mul32x8 dut (.*);

  task automatic one(input logic [31:0] x, input logic [7:0] y, input logic sa, input logic sb);
    longint e;
    a = x; b = y; a_signed = sa; b_signed = sb;
    #1;
    e = (sa ? longint'($signed(x)) : longint'(x)) * (sb ? longint'($signed(y)) : longint'(y));
    checks++;
    if (p !== e[39:0]) begin
      failures++;
      $display("FAIL %h*%h (%b%b): got %h exp %h", x, y, sa, sb, p, e[39:0]);
    end
  endtask

  initial begin
    one(32'hFFFF_FFFF, 8'hFF, 0, 0);
    one(32'h8000_0000, 8'hFF, 1, 0);
    one(32'h8000_0000, 8'h80, 1, 1);
    one(32'h7FFF_FFFF, 8'h80, 1, 1);
    repeat (3000) one($urandom, 8'($urandom), 0, 0);
    repeat (3000) one($urandom, 8'($urandom), 1, 0);
    repeat (3000) one($urandom, 8'($urandom), 1, 1);
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
