// tb_arm7_forward: random read indices and write ports; each read must
// return port 0 data on a match, else port 1 data on a match, else the
// register-file value. Index 31 (the program counter) is never forwarded.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_forward;
  localparam int unsigned NREAD = 4;
  logic [NREAD-1:0][4:0]  rd_idx;
  logic [NREAD-1:0][31:0] rd_data, fwd_data;
  logic [NREAD-1:0]       fwd_hit;
  logic        w0_en, w1_en;
  logic [4:0]  w0_idx, w1_idx;
  logic [31:0] w0_data, w1_data;
  int checks = 0, failures = 0;

  arm7_forward dut (.*);

  initial begin
    repeat (5000) begin
      for (int i = 0; i < NREAD; i++) begin
        rd_idx[i]  = 5'($urandom_range(0, 7) == 0 ? 31 : $urandom_range(0, 6));
        rd_data[i] = $urandom;
      end
      w0_en = 1'($urandom); w1_en = 1'($urandom);
      w0_idx = 5'($urandom_range(0, 7) == 0 ? 31 : $urandom_range(0, 6));
      w1_idx = 5'($urandom_range(0, 6));
      w0_data = $urandom; w1_data = $urandom;
      #1;
      for (int i = 0; i < NREAD; i++) begin
        logic [31:0] e;
        logic        h;
        h = 1'b1;
        if (rd_idx[i] == 5'd31)                   begin e = rd_data[i]; h = 1'b0; end
        else if (w0_en && w0_idx == rd_idx[i])    e = w0_data;
        else if (w1_en && w1_idx == rd_idx[i])    e = w1_data;
        else                                      begin e = rd_data[i]; h = 1'b0; end
        checks++;
        if (fwd_data[i] !== e || fwd_hit[i] !== h) begin
          failures++;
          $display("FAIL port %0d idx=%0d: got %h/%b exp %h/%b", i, rd_idx[i], fwd_data[i],
                   fwd_hit[i], e, h);
        end
      end
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
