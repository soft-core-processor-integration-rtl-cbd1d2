// trap_detect: the memory-stage trap detector (TrapDetect).
//
// Combinational. For a conditional trap instruction (TEQ, TNE, TGE, TLT and
// their unsigned and immediate forms) the ALU has already computed either
// A - B (equality traps) or the set-less-than flag (ordering traps). The trap
// fires when the ALU result is zero and trap_cond is 1, or when it is
// non-zero and trap_cond is 0. This split of the work between ALU and
// detector is the design's own choice; the published design only names the block and
// its inputs (Trap, TrapCond, ALUResult).
module trap_detect (
  input  logic        trap,
  input  logic        trap_cond,
  input  logic [31:0] alu_result,
  output logic        exc_tr
);
  assign exc_tr = trap & (trap_cond ? (alu_result == 32'h0) : (alu_result != 32'h0));
endmodule
