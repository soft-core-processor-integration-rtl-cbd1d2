// muldiv: multiply/divide unit with HI and LO registers, one pair per
// hardware thread.
//
// MULT/MULTU form the 64-bit product of rs and rt and write its upper half to
// HI and its lower half to LO; DIV/DIVU write the quotient to LO and the
// remainder to HI (signed division truncates toward zero, the remainder takes
// the sign of the dividend). MTHI/MTLO copy rs into HI or LO. MFHI/MFLO read
// the selected thread's HI/LO through the hi/lo outputs, which the EX stage
// returns as the instruction's result.
// Interface and timing: the operation is combinational and HI/LO are written
// on the rising clock edge when write_en is high (the instruction is in EX,
// valid, not stalled and not being flushed), so an MFHI/MFLO right after a
// multiply or divide already sees the new value and needs no interlock.
// Only the copy named by task_select is read or written, and nothing is
// written while the pipeline is disabled.
// Division by zero is undefined in the instruction set; here it leaves
// LO = all ones and HI = the dividend.
// From the published design: HI/LO inside the EX stage next to the ALU and
// their multiplication per thread. This design's own: the single-cycle
// combinational multiplier and divider (the original ALU raises a stall for
// multi-cycle operations) and the divide-by-zero result.
module muldiv
  import nmpra_pkg::*;
#(
  parameter int  NTHREADS = 4,
  localparam int TW       = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [TW-1:0] task_select,
  input  logic          en_scpu,
  input  logic          write_en,
  input  alu_op_t       operation,
  input  logic [31:0]   a,
  input  logic [31:0]   b,
  output logic [31:0]   hi,
  output logic [31:0]   lo
);
  logic [31:0] hi_q [NTHREADS];
  logic [31:0] lo_q [NTHREADS];
  logic [63:0] prod_s, prod_u;
  logic [31:0] quot_s, rem_s, quot_u, rem_u, hi_n, lo_n;
  logic        wr_hi, wr_lo;

  assign hi = hi_q[task_select];
  assign lo = lo_q[task_select];

  always_comb begin
    prod_s = 64'($signed(a) * $signed(b));
    prod_u = {32'h0, a} * {32'h0, b};
    if (b == 32'h0) begin
      quot_s = 32'hFFFF_FFFF; rem_s = a; quot_u = 32'hFFFF_FFFF; rem_u = a;
    end else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin
      // the most negative dividend over -1 overflows: the quotient wraps
      quot_s = 32'h8000_0000; rem_s = 32'h0; quot_u = a / b; rem_u = a % b;
    end else begin
      quot_s = 32'($signed(a) / $signed(b));
      rem_s  = 32'($signed(a) % $signed(b));
      quot_u = a / b;
      rem_u  = a % b;
    end
    hi_n = hi; lo_n = lo; wr_hi = 1'b0; wr_lo = 1'b0;
    unique case (operation)
      ALU_MULT:  begin hi_n = prod_s[63:32]; lo_n = prod_s[31:0]; wr_hi = 1'b1; wr_lo = 1'b1; end
      ALU_MULTU: begin hi_n = prod_u[63:32]; lo_n = prod_u[31:0]; wr_hi = 1'b1; wr_lo = 1'b1; end
      ALU_DIV:   begin hi_n = rem_s; lo_n = quot_s; wr_hi = 1'b1; wr_lo = 1'b1; end
      ALU_DIVU:  begin hi_n = rem_u; lo_n = quot_u; wr_hi = 1'b1; wr_lo = 1'b1; end
      ALU_MTHI:  begin hi_n = a; wr_hi = 1'b1; end
      ALU_MTLO:  begin lo_n = a; wr_lo = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < NTHREADS; i++) begin hi_q[i] <= '0; lo_q[i] <= '0; end
    end else if (en_scpu && write_en) begin
      if (wr_hi) hi_q[task_select] <= hi_n;
      if (wr_lo) lo_q[task_select] <= lo_n;
    end
  end
endmodule
