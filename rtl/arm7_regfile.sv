// arm7_regfile: banked register file with the program status registers.
//
// Holds the 30 stored general-purpose registers of the ARM programmer's
// model (r0-r14 of user/system mode plus the banked r8_fiq-r14_fiq,
// r13/r14 of svc, abt, irq and und) and the six status registers: CPSR and
// the five SPSRs. r15, the 31st general register, is the program counter
// and is kept by the core's fetch logic, so a read of r15 here returns 0
// and the core substitutes the PC value.
// Which physical register a register number names depends on the mode:
// each read and write port carries its own mode so that the core can read
// with the mode an instruction will run in, or reach the user bank
// (LDM/STM with the S bit). NREAD combinational read ports return the
// register and its physical index (the index feeds the forwarding unit).
// Two synchronous write ports; port 0 wins on a clash. CPSR and the SPSR of
// a chosen mode are written synchronously; spsr_cur reads the SPSR of the
// current mode (CPSR itself in user/system mode, which has none).
// Reset (asynchronous, active low) enters supervisor mode with IRQ and FIQ
// disabled and clears all registers. Register count, banking and PSR
// layout follow the design; port counts and reset clearing are this
// design's choices.
//
// The 37-register organisation and its mode banking follow the published
// design; keeping r15 in the core, the number of ports, port 0 priority
// and the reset values are this design's choices.
module arm7_regfile
  import arm7_pkg::*;
#(
  parameter int unsigned NREAD = 5
) (
  input  logic                   clk,
  input  logic                   nreset,
  input  logic [NREAD-1:0][4:0]  rd_mode,
  input  logic [NREAD-1:0][3:0]  rd_num,
  output logic [NREAD-1:0][31:0] rd_data,
  output logic [NREAD-1:0][4:0]  rd_idx,
  input  logic                   w0_en,
  input  logic [4:0]             w0_mode,
  input  logic [3:0]             w0_num,
  input  logic [31:0]            w0_data,
  input  logic                   w1_en,
  input  logic [4:0]             w1_mode,
  input  logic [3:0]             w1_num,
  input  logic [31:0]            w1_data,
  input  logic                   cpsr_we,
  input  logic [31:0]            cpsr_wdata,
  input  logic                   spsr_we,
  input  logic [4:0]             spsr_wmode,
  input  logic [31:0]            spsr_wdata,
  output logic [31:0]            cpsr,
  output logic [31:0]            spsr_cur
);

  logic [31:0] gpr [30];
  logic [31:0] spsr [5];     // fiq, svc, abt, irq, und
  logic [4:0]  w0_idx, w1_idx;

  function automatic int spsr_slot(input logic [4:0] m);
    unique case (m)
      MODE_FIQ: return 0;
      MODE_SVC: return 1;
      MODE_ABT: return 2;
      MODE_IRQ: return 3;
      MODE_UND: return 4;
      default:  return -1;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < NREAD; i++) begin
      rd_idx[i]  = phys_idx(rd_mode[i], rd_num[i]);
      rd_data[i] = (rd_idx[i] < 5'd30) ? gpr[rd_idx[i]] : 32'h0;
    end
    w0_idx = phys_idx(w0_mode, w0_num);
    w1_idx = phys_idx(w1_mode, w1_num);
  end

  always_comb begin
    int k;
    k = spsr_slot(cpsr[4:0]);
    spsr_cur = (k >= 0) ? spsr[k] : cpsr;
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      for (int i = 0; i < 30; i++) gpr[i] <= 32'h0;
      for (int i = 0; i < 5; i++)  spsr[i] <= 32'h0;
      cpsr <= {24'h0, 1'b1, 1'b1, 1'b0, MODE_SVC};
    end else begin
      if (w1_en && w1_idx < 5'd30) gpr[w1_idx] <= w1_data;
      if (w0_en && w0_idx < 5'd30) gpr[w0_idx] <= w0_data;
      if (cpsr_we) cpsr <= cpsr_wdata;
      if (spsr_we && spsr_slot(spsr_wmode) >= 0) spsr[spsr_slot(spsr_wmode)] <= spsr_wdata;
    end
  end

endmodule
