// tb_arm7_wdata_sel: byte and halfword stores are replicated over the
// 32-bit bus, words pass unchanged.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_wdata_sel;
  import arm7_pkg::*;
  logic [31:0] wdata, dout;
  size_e       size;
  int checks = 0, failures = 0;

  arm7_wdata_sel dut (.*);

  task automatic chk(input logic [31:0] w, input size_e s, input logic [31:0] e);
    wdata = w; size = s;
    #1;
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL w=%h s=%0d: got %h exp %h", w, s, dout, e);
    end
  endtask

  initial begin
    chk(32'h1234_5678, SZ_BYTE, 32'h7878_7878);
    chk(32'h1234_5678, SZ_HALF, 32'h5678_5678);
    chk(32'h1234_5678, SZ_WORD, 32'h1234_5678);
    chk(32'hDEAD_BEEF, SZ_BYTE, 32'hEFEF_EFEF);
    chk(32'hDEAD_BEEF, SZ_HALF, 32'hBEEF_BEEF);
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
