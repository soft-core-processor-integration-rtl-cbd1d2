// pc_reg: the program counter PC[instPi], one copy per hardware thread.
//
// Each thread has its own PC. Only the copy of the selected thread is
// written, when the scheduler enables the pipeline and the fetch stage is not
// stalled; the scheduler may also force a trap-cell address into the
// selected copy (pc_nhse_sel), which wins over the normal next-PC and over a
// stall. After reset thread i starts at RESET_BASE + i*RESET_STRIDE, so every
// thread can have its own entry code (this start-address scheme is the
// design's own choice; the published design gives no reset addresses).
// Timing: written on the rising clock edge, output is the selected copy.
module pc_reg #(
  parameter int          NTHREADS     = 4,
  parameter logic [31:0] RESET_BASE   = 32'h0000_0000,
  parameter logic [31:0] RESET_STRIDE = 32'h0000_0400,
  localparam int         TW           = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [TW-1:0] task_select,
  input  logic          en_scpu,
  input  logic          stall,
  input  logic          pc_nhse_sel,
  input  logic [31:0]   pc_nhse,
  input  logic [31:0]   pc_in,
  output logic [31:0]   pc_out
);
  logic [31:0] pc_q [NTHREADS];

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < NTHREADS; i++) pc_q[i] <= RESET_BASE + RESET_STRIDE * 32'(i);
    end else if (en_scpu) begin
      if (pc_nhse_sel)  pc_q[task_select] <= pc_nhse;
      else if (!stall)  pc_q[task_select] <= pc_in;
    end
  end

  assign pc_out = pc_q[task_select];
endmodule
