// tb_trap_detect: the trap fires only for trap instructions, on a zero ALU
// result when trap_cond is set and on a non-zero one when it is clear.
module tb_trap_detect;
  logic trap, cond, tr;
  logic [31:0] res;
  int checks = 0, failures = 0;
  trap_detect dut (.trap, .trap_cond(cond), .alu_result(res), .exc_tr(tr));
  initial begin
    for (int k = 0; k < 400; k++) begin
      trap = 1'($urandom); cond = 1'($urandom);
      res = (k % 2 == 0) ? 32'h0 : ((k % 3 == 0) ? 32'h1 : $urandom);
      #1; checks++;
      if (tr !== (trap && (cond ? (res == 0) : (res != 0)))) begin
        failures++; $display("FAIL trap=%b cond=%b res=%h -> %b", trap, cond, res, tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
