// tb_alu: every ALU operation on random and corner operands against
// results computed here, including signed overflow of ADD and SUB.
module tb_alu;
  import nmpra_pkg::*;
  logic [31:0] a, b, r;
  logic [4:0]  sh;
  alu_op_t     op;
  logic        ov, bz;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .shamt(sh), .operation(op), .result(r), .exc_ov(ov), .bzero(bz));

  function automatic logic [32:0] ref_alu(alu_op_t o, logic [31:0] x, logic [31:0] y, logic [4:0] s);
    longint sx = longint'($signed(x)), sy = longint'($signed(y)), t;
    logic [31:0] res; logic v = 0;
    case (o)
      ALU_ADD:  begin t = sx + sy; res = t[31:0]; v = (t > 64'sd2147483647) || (t < -64'sd2147483648); end
      ALU_ADDU: res = x + y;
      ALU_SUB:  begin t = sx - sy; res = t[31:0]; v = (t > 64'sd2147483647) || (t < -64'sd2147483648); end
      ALU_SUBU: res = x - y;
      ALU_AND:  res = x & y;
      ALU_OR:   res = x | y;
      ALU_XOR:  res = x ^ y;
      ALU_NOR:  res = ~(x | y);
      ALU_SLT:  res = (sx < sy) ? 1 : 0;
      ALU_SLTU: res = (x < y) ? 1 : 0;
      ALU_SLL:  res = y << s;
      ALU_SRL:  res = y >> s;
      ALU_SRA:  begin res = y; for (int i = 0; i < s; i++) res = {res[31], res[31:1]}; end
      ALU_SLLV: res = y << x[4:0];
      ALU_SRLV: res = y >> x[4:0];
      ALU_SRAV: begin res = y; for (int i = 0; i < x[4:0]; i++) res = {res[31], res[31:1]}; end
      ALU_LUI:  res = {y[15:0], 16'h0};
      default:  res = y;
    endcase
    return {v, res};
  endfunction

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
  logic [32:0] e;
  initial begin
    for (int k = 0; k < 4000; k++) begin
      op = alu_op_t'($urandom_range(0, 17));
      a = (k % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (k % 4 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      sh = 5'($urandom);
      #1;
      e = ref_alu(op, a, b, sh);
      checks++;
      if (r !== e[31:0] || ov !== e[32] || bz !== (e[31:0] == 0)) begin
        failures++; $display("FAIL %s a=%h b=%h sh=%0d: %h/%b vs %h/%b", op.name(), a, b, sh, r, ov, e[31:0], e[32]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
