// register_file: the general-purpose register file RegisterFile[instPi].
//
// NTHREADS banks of 32 x 32-bit registers, one bank per hardware thread, with
// two combinational read ports and one write port. Both reads and the write
// address the bank of the thread chosen by the scheduler (task_select);
// register 0 always reads as zero and is never written. The write happens on
// the rising clock edge when reg_write is high and the scheduler enables the
// pipeline. A read of the register being written in the same cycle returns
// the old value; the decode stage forwards the write-back value itself.
// Bank count, port set and r0 behaviour follow the published design; reset clears
// every register (the design's choice, so no register is read undefined).
module register_file #(
  parameter int  NTHREADS = 4,
  localparam int TW       = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [TW-1:0] task_select,
  input  logic          en_scpu,
  input  logic [4:0]    read_reg1,
  input  logic [4:0]    read_reg2,
  input  logic [4:0]    write_reg,
  input  logic [31:0]   write_data,
  input  logic          reg_write,
  output logic [31:0]   read_data1,
  output logic [31:0]   read_data2
);
  logic [31:0] regs [NTHREADS][32];

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int t = 0; t < NTHREADS; t++)
        for (int r = 0; r < 32; r++) regs[t][r] <= '0;
    end else if (en_scpu && reg_write && write_reg != 5'd0) begin
      regs[task_select][write_reg] <= write_data;
    end
  end

  assign read_data1 = (read_reg1 == 5'd0) ? 32'h0 : regs[task_select][read_reg1];
  assign read_data2 = (read_reg2 == 5'd0) ? 32'h0 : regs[task_select][read_reg2];
endmodule
