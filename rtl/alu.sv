// alu: the execute-stage arithmetic and logic unit.
//
// Combinational. Computes result = A op B for the MIPS32 integer operations
// selected by operation (nmpra_pkg::alu_op_t): add/sub with and without
// overflow detection, logic, set-less-than, the shifts by shamt or by A[4:0],
// load-upper-immediate and pass-B (used to move coprocessor values to the
// register file). exc_ov is the signed overflow of ADD/SUB (the EX_EXC_Ov
// exception request); bzero flags a zero result. Multiply and divide
// (HI/LO) are not part of this unit.
module alu
  import nmpra_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  alu_op_t     operation,
  output logic [31:0] result,
  output logic        exc_ov,
  output logic        bzero
);
  logic [32:0] sum, diff;

  always_comb begin
    sum    = {a[31], a} + {b[31], b};
    diff   = {a[31], a} - {b[31], b};
    exc_ov = 1'b0;
    unique case (operation)
      ALU_ADD:   begin result = sum[31:0];  exc_ov = sum[32] ^ sum[31];   end
      ALU_ADDU:  result = a + b;
      ALU_SUB:   begin result = diff[31:0]; exc_ov = diff[32] ^ diff[31]; end
      ALU_SUBU:  result = a - b;
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_XOR:   result = a ^ b;
      ALU_NOR:   result = ~(a | b);
      ALU_SLT:   result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  result = {31'b0, a < b};
      ALU_SLL:   result = b << shamt;
      ALU_SRL:   result = b >> shamt;
      ALU_SRA:   result = 32'($signed(b) >>> shamt);
      ALU_SLLV:  result = b << a[4:0];
      ALU_SRLV:  result = b >> a[4:0];
      ALU_SRAV:  result = 32'($signed(b) >>> a[4:0]);
      ALU_LUI:   result = {b[15:0], 16'h0000};
      ALU_PASSB: result = b;
      default:   result = 32'h0;
    endcase
  end

  assign bzero = (result == 32'h0);
endmodule
