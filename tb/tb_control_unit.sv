// tb_control_unit: decodes a list of MIPS32 instructions (built with the
// assembler package) and checks the control fields that matter for each:
// ALU operation, destination, register write, memory access kind, PC source
// for taken and not-taken branches, traps, coprocessor moves and the
// reserved-instruction flag for opcodes the core does not implement.
module tb_control_unit;
  import nmpra_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] ins;
  logic eq, gz, gez, lz, lez;
  ctrl_t c;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(ins[31:26]), .funct(ins[5:0]), .rs(ins[25:21]), .rt(ins[20:16]),
    .cmp_eq(eq), .cmp_gz(gz), .cmp_gez(gez), .cmp_lz(lz), .cmp_lez(lez), .ctrl(c));

  task automatic expect_f(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h (instr %h)", what, got, exp, ins); end
  endtask

  task automatic dec(logic [31:0] i, logic [4:0] flags = 5'b0);
    ins = i; {eq, gz, gez, lz, lez} = flags; #1;
  endtask

  initial begin
    dec(add(3, 1, 2));
    expect_f("add op", c.alu_op, ALU_ADD); expect_f("add dst", c.regdst, DST_RD);
    expect_f("add wr", c.reg_write, 1); expect_f("add ov", c.ex_can_err, 1);
    dec(addu(3, 1, 2)); expect_f("addu op", c.alu_op, ALU_ADDU); expect_f("addu ov", c.ex_can_err, 0);
    dec(sub(3, 1, 2));  expect_f("sub op", c.alu_op, ALU_SUB);
    dec(slt(3, 1, 2));  expect_f("slt op", c.alu_op, ALU_SLT);
    dec(sltu(3, 1, 2)); expect_f("sltu op", c.alu_op, ALU_SLTU);
    dec(nor_(3, 1, 2)); expect_f("nor op", c.alu_op, ALU_NOR);
    dec(sll(3, 1, 4));  expect_f("sll op", c.alu_op, ALU_SLL); expect_f("sll rs", c.need_rs_by_ex, 0);
    dec(sra(3, 1, 4));  expect_f("sra op", c.alu_op, ALU_SRA);
    dec(sllv(3, 1, 2)); expect_f("sllv op", c.alu_op, ALU_SLLV); expect_f("sllv rs", c.need_rs_by_ex, 1);
    dec(addi(3, 1, -5));
    expect_f("addi op", c.alu_op, ALU_ADD); expect_f("addi imm", c.alu_src_imm, 1);
    expect_f("addi dst", c.regdst, DST_RT); expect_f("addi sext", c.imm_zero_ext, 0);
    dec(ori(3, 1, 5));  expect_f("ori op", c.alu_op, ALU_OR); expect_f("ori zext", c.imm_zero_ext, 1);
    dec(lui(3, 5));     expect_f("lui op", c.alu_op, ALU_LUI); expect_f("lui rs", c.need_rs_by_ex, 0);
    dec(lw(3, 4, 1));
    expect_f("lw rd", c.mem_read, 1); expect_f("lw m2r", c.memto_reg, 1); expect_f("lw wr", c.reg_write, 1);
    expect_f("lw size", {c.mem_byte, c.mem_half}, 0);
    dec(lb(3, 4, 1));   expect_f("lb size", {c.mem_byte, c.mem_half, c.mem_sign_ext}, 3'b101);
    dec(lbu(3, 4, 1));  expect_f("lbu size", {c.mem_byte, c.mem_half, c.mem_sign_ext}, 3'b100);
    dec(lh(3, 4, 1));   expect_f("lh size", {c.mem_byte, c.mem_half, c.mem_sign_ext}, 3'b011);
    dec(sw(3, 4, 1));
    expect_f("sw wr", c.mem_write, 1); expect_f("sw regwr", c.reg_write, 0); expect_f("sw rd", c.mem_read, 0);
    dec(sb(3, 4, 1));   expect_f("sb size", c.mem_byte, 1);
    dec(beq(1, 2, 4), 5'b10000); expect_f("beq taken", c.pcsrc, PCSRC_BRANCH);
    expect_f("beq wants", {c.want_rs_by_id, c.want_rt_by_id}, 2'b11);
    dec(beq(1, 2, 4), 5'b00000); expect_f("beq not taken", c.pcsrc, PCSRC_ADD4);
    dec(bne(1, 2, 4), 5'b00000); expect_f("bne taken", c.pcsrc, PCSRC_BRANCH);
    dec(bne(1, 2, 4), 5'b10000); expect_f("bne not taken", c.pcsrc, PCSRC_ADD4);
    dec(blez(1, 4), 5'b00001);   expect_f("blez taken", c.pcsrc, PCSRC_BRANCH);
    dec(bgtz(1, 4), 5'b01000);   expect_f("bgtz taken", c.pcsrc, PCSRC_BRANCH);
    dec(bgtz(1, 4), 5'b00001);   expect_f("bgtz not taken", c.pcsrc, PCSRC_ADD4);
    dec(bltz(1, 4), 5'b00010);   expect_f("bltz taken", c.pcsrc, PCSRC_BRANCH);
    dec(bgez(1, 4), 5'b00100);   expect_f("bgez taken", c.pcsrc, PCSRC_BRANCH);
    dec(bgezal(1, 4), 5'b00100);
    expect_f("bgezal", {c.pcsrc, c.link, c.regdst, c.reg_write}, {PCSRC_BRANCH, 1'b1, DST_R31, 1'b1});
    dec(j(32'h100));  expect_f("j", {c.pcsrc, c.link, c.reg_write}, {PCSRC_JUMP, 2'b00});
    dec(jal(32'h100)); expect_f("jal", {c.pcsrc, c.link, c.regdst, c.reg_write}, {PCSRC_JUMP, 1'b1, DST_R31, 1'b1});
    dec(jr(31));      expect_f("jr", {c.pcsrc, c.want_rs_by_id, c.reg_write}, {PCSRC_REG, 2'b10});
    dec(jalr(5, 6));  expect_f("jalr", {c.pcsrc, c.link, c.regdst, c.reg_write}, {PCSRC_REG, 1'b1, DST_RD, 1'b1});
    dec(movn(3, 1, 2)); expect_f("movn", {c.movn, c.movz, c.reg_write}, 3'b101);
    dec(movz(3, 1, 2)); expect_f("movz", {c.movn, c.movz, c.reg_write}, 3'b011);
    dec(teq(1, 2));   expect_f("teq", {c.trap, c.trap_cond, c.reg_write}, 3'b110); expect_f("teq op", c.alu_op, ALU_SUBU);
    dec(tne(1, 2));   expect_f("tne", {c.trap, c.trap_cond}, 2'b10);
    dec(syscall());   expect_f("syscall", {c.syscall, c.brk, c.reserved}, 3'b100);
    dec(brk());       expect_f("break", {c.syscall, c.brk, c.reserved}, 3'b010);
    dec(eret());      expect_f("eret", {c.eret, c.reserved}, 2'b10);
    dec(mfc0(3, 14)); expect_f("mfc0", {c.mfc0, c.cop_read, c.reg_write, c.regdst}, {3'b111, DST_RT});
    dec(mtc0(3, 14)); expect_f("mtc0", {c.mtc0, c.want_rt_by_id, c.reg_write}, 3'b110);
    dec(32'h48060000); expect_f("mfc2 (stmr)", {c.cop_read, c.reg_write, c.alu_op}, {2'b11, ALU_PASSB});
    dec(32'h48430001); expect_f("cfc2", {c.cop_read, c.reg_write}, 2'b11);
    dec(32'h48C10000); expect_f("ctc2 (movcr)", {c.cop2_write, c.want_rt_by_id, c.reg_write}, 3'b110);
    dec(mtc2(3, 1));  expect_f("mtc2", c.cop2_write, 1);
    dec(mult(4, 5));  expect_f("mult", {c.alu_op, c.reg_write, c.need_rs_by_ex, c.need_rt_by_ex, c.reserved}, {ALU_MULT, 4'b0110});
    dec(divu(4, 5));  expect_f("divu", {c.alu_op, c.reg_write, c.reserved}, {ALU_DIVU, 2'b00});
    dec(mfhi(6));     expect_f("mfhi", {c.alu_op, c.reg_write, c.regdst, c.need_rt_by_ex}, {ALU_MFHI, 1'b1, DST_RD, 1'b0});
    dec(mtlo(7));     expect_f("mtlo", {c.alu_op, c.reg_write, c.need_rs_by_ex}, {ALU_MTLO, 2'b01});
    dec(lwc2(2, 8, 4)); expect_f("lwc2", {c.lwc2, c.swc2, c.mem_read, c.mem_write, c.reg_write, c.need_rs_by_ex, c.need_rt_by_ex, c.reserved}, 8'b10100100);
    dec(swc2(0, 8, 4)); expect_f("swc2", {c.lwc2, c.swc2, c.mem_read, c.mem_write, c.reg_write, c.need_rs_by_ex, c.need_rt_by_ex, c.reserved}, 8'b01010100);
    dec(32'h7000_0002); expect_f("mul (SPECIAL2) reserved", c.reserved, 1);
    dec(32'h5000_0000); expect_f("beql reserved", c.reserved, 1);        // branch likely
    dec(lwl(3, 1, 4)); expect_f("lwl", {c.mem_left, c.mem_right, c.mem_read, c.mem_write, c.reg_write, c.memto_reg, c.need_rt_by_ex, c.reserved}, 8'b10101110);
    dec(swr(3, 1, 4)); expect_f("swr", {c.mem_left, c.mem_right, c.mem_read, c.mem_write, c.reg_write, c.memto_reg, c.need_rt_by_ex, c.reserved}, 8'b01010010);
    dec(nop());       expect_f("nop", {c.reg_write, c.mem_read, c.mem_write, c.reserved}, 4'b1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
