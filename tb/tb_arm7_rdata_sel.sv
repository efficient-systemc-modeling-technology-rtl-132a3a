// tb_arm7_rdata_sel: every byte and halfword position with zero and sign
// extension, and the word rotation for unaligned addresses.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_rdata_sel;
  import arm7_pkg::*;
  logic [31:0] din, dout;
  logic [1:0]  addr_lo;
  size_e       size;
  logic        sign_ext;
  int checks = 0, failures = 0;

  arm7_rdata_sel dut (.*);

  task automatic chk(input logic [31:0] e);
    #1;
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL din=%h lo=%0d size=%0d s=%b: got %h exp %h", din, addr_lo, size, sign_ext, dout, e);
    end
  endtask

  initial begin
    din = 32'h80F1_7E92;
    size = SZ_BYTE; sign_ext = 0;
    addr_lo = 0; chk(32'h92); addr_lo = 1; chk(32'h7E); addr_lo = 2; chk(32'hF1); addr_lo = 3; chk(32'h80);
    sign_ext = 1;
    addr_lo = 0; chk(32'hFFFF_FF92); addr_lo = 1; chk(32'h7E); addr_lo = 2; chk(32'hFFFF_FFF1);
    addr_lo = 3; chk(32'hFFFF_FF80);
    size = SZ_HALF; sign_ext = 0;
    addr_lo = 0; chk(32'h7E92); addr_lo = 2; chk(32'h80F1);
    sign_ext = 1;
    addr_lo = 0; chk(32'h7E92); addr_lo = 2; chk(32'hFFFF_80F1);
    size = SZ_WORD; sign_ext = 0;
    addr_lo = 0; chk(32'h80F1_7E92); addr_lo = 1; chk(32'h9280_F17E);
    addr_lo = 2; chk(32'h7E92_80F1); addr_lo = 3; chk(32'hF17E_9280);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
