// tb_arm7_regfile: random writes on both ports in random modes, followed
// by reads in random modes, compared with a reference that keeps a
// separate 16-entry view per mode and shares the unbanked registers
// explicitly. Also checks reset values, port-0 priority on a same-register
// write, r15 reads as zero, and the CPSR/SPSR ports.
//
// The behaviour checked is the block's published function; where the
// published design is silent the reference follows the ARM v4 architecture.
// Stimulus and reference model are this testbench's own. Runs at the
// block's default parameters; the watchdog ends a hung run as a failure.
module tb_arm7_regfile;
  import arm7_pkg::*;
  localparam int unsigned NREAD = 5;
  logic clk = 0, nreset = 0;
  logic [NREAD-1:0][4:0]  rd_mode;
  logic [NREAD-1:0][3:0]  rd_num;
  logic [NREAD-1:0][31:0] rd_data;
  logic [NREAD-1:0][4:0]  rd_idx;
  logic        w0_en, w1_en, cpsr_we, spsr_we;
  logic [4:0]  w0_mode, w1_mode, spsr_wmode;
  logic [3:0]  w0_num, w1_num;
  logic [31:0] w0_data, w1_data, cpsr_wdata, spsr_wdata, cpsr, spsr_cur;
  int checks = 0, failures = 0;

  arm7_regfile dut (.*);

  always #5 clk = ~clk;

  // reference storage: user bank, fiq r8-r14, and r13/r14 of each other
  // privileged mode; spsr per mode code
  logic [31:0] usr [15];
  logic [31:0] fiqb [8:14];
  logic [31:0] bank [logic [4:0]][13:14];
  logic [31:0] spsr_m [logic [4:0]];
  logic [4:0]  modes [7] = '{MODE_USR, MODE_FIQ, MODE_IRQ, MODE_SVC, MODE_ABT, MODE_UND, MODE_SYS};

  function automatic logic [31:0] ref_rd(input logic [4:0] m, input logic [3:0] r);
    if (r == 4'd15) return 32'h0;
    if (m == MODE_FIQ && r >= 4'd8) return fiqb[r];
    if (r >= 4'd13 && m != MODE_USR && m != MODE_SYS && m != MODE_FIQ) return bank[m][r];
    return usr[r];
  endfunction

  task automatic ref_wr(input logic [4:0] m, input logic [3:0] r, input logic [31:0] d);
    if (r == 4'd15) return;
    if (m == MODE_FIQ && r >= 4'd8) fiqb[r] = d;
    else if (r >= 4'd13 && m != MODE_USR && m != MODE_SYS && m != MODE_FIQ) bank[m][r] = d;
    else usr[r] = d;
  endtask

  initial begin
    foreach (usr[i]) usr[i] = '0;
    foreach (fiqb[i]) fiqb[i] = '0;
    foreach (modes[k]) begin
      bank[modes[k]][13] = '0; bank[modes[k]][14] = '0; spsr_m[modes[k]] = '0;
    end
    w0_en = 0; w1_en = 0; cpsr_we = 0; spsr_we = 0;
    w0_mode = MODE_USR; w1_mode = MODE_USR; spsr_wmode = MODE_USR;
    w0_num = 0; w1_num = 0; w0_data = 0; w1_data = 0; cpsr_wdata = 0; spsr_wdata = 0;
    rd_mode = '0; rd_num = '0;
    #12;
    checks++;
    if (cpsr !== 32'h0000_00D3) begin failures++; $display("FAIL reset cpsr %h", cpsr); end
    nreset = 1;
    repeat (4000) begin
      @(negedge clk);
      w0_en = 1'($urandom); w1_en = 1'($urandom);
      w0_mode = modes[$urandom_range(0, 6)]; w1_mode = modes[$urandom_range(0, 6)];
      w0_num = 4'($urandom); w1_num = ($urandom_range(0, 3) == 0) ? w0_num : 4'($urandom);
      if ($urandom_range(0, 3) == 0) w1_mode = w0_mode;
      w0_data = $urandom; w1_data = $urandom;
      cpsr_we = ($urandom_range(0, 7) == 0);
      cpsr_wdata = {$urandom_range(0, 15) << 28, 19'h0, 3'($urandom), modes[$urandom_range(0, 6)]};
      spsr_we = 1'($urandom); spsr_wmode = modes[$urandom_range(0, 6)]; spsr_wdata = $urandom;
      @(posedge clk);
      if (w1_en) ref_wr(w1_mode, w1_num, w1_data);
      if (w0_en) ref_wr(w0_mode, w0_num, w0_data);
      if (spsr_we && spsr_wmode != MODE_USR && spsr_wmode != MODE_SYS) spsr_m[spsr_wmode] = spsr_wdata;
      #1;
      if (cpsr_we) begin
        checks++;
        if (cpsr !== cpsr_wdata) begin failures++; $display("FAIL cpsr write"); end
      end
      checks++;
      if (spsr_cur !== ((cpsr[4:0] == MODE_USR || cpsr[4:0] == MODE_SYS) ? cpsr : spsr_m[cpsr[4:0]])) begin
        failures++;
        $display("FAIL spsr_cur in mode %b", cpsr[4:0]);
      end
      for (int i = 0; i < NREAD; i++) begin
        rd_mode[i] = modes[$urandom_range(0, 6)];
        rd_num[i]  = 4'($urandom);
      end
      #1;
      for (int i = 0; i < NREAD; i++) begin
        checks++;
        if (rd_data[i] !== ref_rd(rd_mode[i], rd_num[i])) begin
          failures++;
          $display("FAIL read mode %b r%0d: got %h exp %h", rd_mode[i], rd_num[i], rd_data[i],
                   ref_rd(rd_mode[i], rd_num[i]));
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
