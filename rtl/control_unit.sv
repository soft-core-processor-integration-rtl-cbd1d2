// control_unit: instruction decoder of the decode (ID) stage.
//
// Combinational. From the opcode, function, rs and rt fields of the
// instruction in ID and the flags of the condition testing unit it produces
// the control word (nmpra_pkg::ctrl_t) that travels with the instruction down
// the pipeline: PC source, register destination, ALU operation and operand
// source, memory access kind, write-back selection, trap and exception
// requests, and which stage needs each source operand (used by the hazard
// unit). Branches and jumps are resolved here, in ID, with one delay slot that
// is always executed; the branch-likely group is not decoded (it raises a
// reserved-instruction exception, as does the SPECIAL2 multiply-accumulate
// group, which this core does not implement). LWL/LWR/SWL/SWR are marked
// left or right for the memory controller; LWL/LWR also read rt. MULT/MULTU/DIV/DIVU/MFHI/MFLO/MTHI/MTLO go to the HI/LO unit;
// LL and SC are marked so the datapath can keep them atomic (SC is also
// marked as a read, because its success flag is known only in MEM).
// COP2 instructions (MFC2, CFC2, MTC2, CTC2) address the scheduler registers;
// LWC2 and SWC2 load and store the scheduler register selected by rt.
// The instruction set and the in-ID branch resolution follow the published design;
// the control-word layout is this design's own.
module control_unit
  import nmpra_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  input  logic [4:0] rs,
  input  logic [4:0] rt,
  input  logic       cmp_eq,
  input  logic       cmp_gz,
  input  logic       cmp_gez,
  input  logic       cmp_lz,
  input  logic       cmp_lez,
  output ctrl_t      ctrl
);
  // common shapes
  function automatic ctrl_t r_type(alu_op_t op, logic need_rs);
    ctrl_t c = CTRL_NOP;
    c.alu_op        = op;
    c.regdst        = DST_RD;
    c.reg_write     = 1'b1;
    c.need_rs_by_ex = need_rs;
    c.need_rt_by_ex = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t i_type(alu_op_t op, logic zext);
    ctrl_t c = CTRL_NOP;
    c.alu_op        = op;
    c.regdst        = DST_RT;
    c.alu_src_imm   = 1'b1;
    c.imm_zero_ext  = zext;
    c.reg_write     = 1'b1;
    c.need_rs_by_ex = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t trap_r(alu_op_t op, logic cond);
    ctrl_t c = CTRL_NOP;
    c.alu_op        = op;
    c.trap          = 1'b1;
    c.trap_cond     = cond;
    c.need_rs_by_ex = 1'b1;
    c.need_rt_by_ex = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t branch(logic taken, logic uses_rt);
    ctrl_t c = CTRL_NOP;
    c.pcsrc         = taken ? PCSRC_BRANCH : PCSRC_ADD4;
    c.want_rs_by_id = 1'b1;
    c.want_rt_by_id = uses_rt;
    return c;
  endfunction

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (opcode)
      OP_SPECIAL: begin
        unique case (funct)
          FN_SLL:  begin ctrl = r_type(ALU_SLL, 1'b0); end
          FN_SRL:  begin ctrl = r_type(ALU_SRL, 1'b0); end
          FN_SRA:  begin ctrl = r_type(ALU_SRA, 1'b0); end
          FN_SLLV: ctrl = r_type(ALU_SLLV, 1'b1);
          FN_SRLV: ctrl = r_type(ALU_SRLV, 1'b1);
          FN_SRAV: ctrl = r_type(ALU_SRAV, 1'b1);
          FN_JR: begin
            ctrl.pcsrc         = PCSRC_REG;
            ctrl.want_rs_by_id = 1'b1;
          end
          FN_JALR: begin
            ctrl.pcsrc         = PCSRC_REG;
            ctrl.want_rs_by_id = 1'b1;
            ctrl.link          = 1'b1;
            ctrl.regdst        = DST_RD;
            ctrl.reg_write     = 1'b1;
          end
          FN_MOVZ: begin ctrl = r_type(ALU_PASSB, 1'b1); ctrl.alu_op = ALU_ADDU; ctrl.movz = 1'b1; end
          FN_MOVN: begin ctrl = r_type(ALU_PASSB, 1'b1); ctrl.alu_op = ALU_ADDU; ctrl.movn = 1'b1; end
          FN_SYSCALL: ctrl.syscall = 1'b1;
          FN_BREAK:   ctrl.brk     = 1'b1;
          FN_MFHI: begin ctrl = r_type(ALU_MFHI, 1'b0); ctrl.need_rt_by_ex = 1'b0; end
          FN_MFLO: begin ctrl = r_type(ALU_MFLO, 1'b0); ctrl.need_rt_by_ex = 1'b0; end
          FN_MTHI: begin ctrl.alu_op = ALU_MTHI; ctrl.need_rs_by_ex = 1'b1; end
          FN_MTLO: begin ctrl.alu_op = ALU_MTLO; ctrl.need_rs_by_ex = 1'b1; end
          FN_MULT:  begin ctrl = r_type(ALU_MULT, 1'b1);  ctrl.reg_write = 1'b0; end
          FN_MULTU: begin ctrl = r_type(ALU_MULTU, 1'b1); ctrl.reg_write = 1'b0; end
          FN_DIV:   begin ctrl = r_type(ALU_DIV, 1'b1);   ctrl.reg_write = 1'b0; end
          FN_DIVU:  begin ctrl = r_type(ALU_DIVU, 1'b1);  ctrl.reg_write = 1'b0; end
          FN_ADD:  begin ctrl = r_type(ALU_ADD, 1'b1); ctrl.ex_can_err = 1'b1; end
          FN_ADDU: ctrl = r_type(ALU_ADDU, 1'b1);
          FN_SUB:  begin ctrl = r_type(ALU_SUB, 1'b1); ctrl.ex_can_err = 1'b1; end
          FN_SUBU: ctrl = r_type(ALU_SUBU, 1'b1);
          FN_AND:  ctrl = r_type(ALU_AND, 1'b1);
          FN_OR:   ctrl = r_type(ALU_OR, 1'b1);
          FN_XOR:  ctrl = r_type(ALU_XOR, 1'b1);
          FN_NOR:  ctrl = r_type(ALU_NOR, 1'b1);
          FN_SLT:  ctrl = r_type(ALU_SLT, 1'b1);
          FN_SLTU: ctrl = r_type(ALU_SLTU, 1'b1);
          FN_TGE:  ctrl = trap_r(ALU_SLT, 1'b1);
          FN_TGEU: ctrl = trap_r(ALU_SLTU, 1'b1);
          FN_TLT:  ctrl = trap_r(ALU_SLT, 1'b0);
          FN_TLTU: ctrl = trap_r(ALU_SLTU, 1'b0);
          FN_TEQ:  ctrl = trap_r(ALU_SUBU, 1'b1);
          FN_TNE:  ctrl = trap_r(ALU_SUBU, 1'b0);
          default: ctrl.reserved = 1'b1;
        endcase
      end
      OP_REGIMM: begin
        unique case (rt)
          RT_BLTZ:   ctrl = branch(cmp_lz, 1'b0);
          RT_BGEZ:   ctrl = branch(cmp_gez, 1'b0);
          RT_BLTZAL: begin
            ctrl = branch(cmp_lz, 1'b0);
            ctrl.link = 1'b1; ctrl.regdst = DST_R31; ctrl.reg_write = 1'b1;
          end
          RT_BGEZAL: begin
            ctrl = branch(cmp_gez, 1'b0);
            ctrl.link = 1'b1; ctrl.regdst = DST_R31; ctrl.reg_write = 1'b1;
          end
          RT_TGEI, RT_TGEIU, RT_TLTI, RT_TLTIU, RT_TEQI, RT_TNEI: begin
            ctrl.trap          = 1'b1;
            ctrl.alu_src_imm   = 1'b1;
            ctrl.need_rs_by_ex = 1'b1;
            unique case (rt)
              RT_TGEI:  begin ctrl.alu_op = ALU_SLT;  ctrl.trap_cond = 1'b1; end
              RT_TGEIU: begin ctrl.alu_op = ALU_SLTU; ctrl.trap_cond = 1'b1; end
              RT_TLTI:  begin ctrl.alu_op = ALU_SLT;  ctrl.trap_cond = 1'b0; end
              RT_TLTIU: begin ctrl.alu_op = ALU_SLTU; ctrl.trap_cond = 1'b0; end
              RT_TEQI:  begin ctrl.alu_op = ALU_SUBU; ctrl.trap_cond = 1'b1; end
              default:  begin ctrl.alu_op = ALU_SUBU; ctrl.trap_cond = 1'b0; end
            endcase
          end
          default: ctrl.reserved = 1'b1;
        endcase
      end
      OP_J:    ctrl.pcsrc = PCSRC_JUMP;
      OP_JAL: begin
        ctrl.pcsrc = PCSRC_JUMP; ctrl.link = 1'b1;
        ctrl.regdst = DST_R31;   ctrl.reg_write = 1'b1;
      end
      OP_BEQ:  ctrl = branch(cmp_eq, 1'b1);
      OP_BNE:  ctrl = branch(!cmp_eq, 1'b1);
      OP_BLEZ: ctrl = branch(cmp_lez, 1'b0);
      OP_BGTZ: ctrl = branch(cmp_gz, 1'b0);
      OP_ADDI:  begin ctrl = i_type(ALU_ADD, 1'b0); ctrl.ex_can_err = 1'b1; end
      OP_ADDIU: ctrl = i_type(ALU_ADDU, 1'b0);
      OP_SLTI:  ctrl = i_type(ALU_SLT, 1'b0);
      OP_SLTIU: ctrl = i_type(ALU_SLTU, 1'b0);
      OP_ANDI:  ctrl = i_type(ALU_AND, 1'b1);
      OP_ORI:   ctrl = i_type(ALU_OR, 1'b1);
      OP_XORI:  ctrl = i_type(ALU_XOR, 1'b1);
      OP_LUI:   begin ctrl = i_type(ALU_LUI, 1'b1); ctrl.need_rs_by_ex = 1'b0; end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.mem_read     = 1'b1;
        ctrl.memto_reg    = 1'b1;
        ctrl.mem_byte     = (opcode == OP_LB) || (opcode == OP_LBU);
        ctrl.mem_half     = (opcode == OP_LH) || (opcode == OP_LHU);
        ctrl.mem_sign_ext = (opcode == OP_LB) || (opcode == OP_LH);
      end
      // LWL/LWR merge memory bytes into rt, so rt is read like store data
      OP_LWL, OP_LWR: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.mem_read      = 1'b1;
        ctrl.memto_reg     = 1'b1;
        ctrl.need_rt_by_ex = 1'b1;
        ctrl.mem_left      = (opcode == OP_LWL);
        ctrl.mem_right     = (opcode == OP_LWR);
      end
      OP_SWL, OP_SWR: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.reg_write     = 1'b0;
        ctrl.mem_write     = 1'b1;
        ctrl.need_rt_by_ex = 1'b1;
        ctrl.mem_left      = (opcode == OP_SWL);
        ctrl.mem_right     = (opcode == OP_SWR);
      end
      OP_LL: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.mem_read  = 1'b1;
        ctrl.memto_reg = 1'b1;
        ctrl.ll        = 1'b1;
      end
      // SC is marked as a read too: its result (success flag) is only known
      // in MEM, so the hazard unit treats it like a load
      OP_SC: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.mem_read      = 1'b1;
        ctrl.mem_write     = 1'b1;
        ctrl.memto_reg     = 1'b1;
        ctrl.need_rt_by_ex = 1'b1;
        ctrl.sc            = 1'b1;
      end
      // LWC2/SWC2 move a word between data memory and the scheduler register
      // whose selector is in rt (same map as CFC2/CTC2); no GPR is involved
      OP_LWC2: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.reg_write = 1'b0;
        ctrl.mem_read  = 1'b1;
        ctrl.lwc2      = 1'b1;
      end
      OP_SWC2: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.reg_write = 1'b0;
        ctrl.mem_write = 1'b1;
        ctrl.swc2      = 1'b1;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl = i_type(ALU_ADDU, 1'b0);
        ctrl.reg_write     = 1'b0;
        ctrl.mem_write     = 1'b1;
        ctrl.need_rt_by_ex = 1'b1;
        ctrl.mem_byte      = (opcode == OP_SB);
        ctrl.mem_half      = (opcode == OP_SH);
      end
      OP_COP0: begin
        if (rs == RS_MF) begin
          ctrl.cop_read = 1'b1; ctrl.mfc0 = 1'b1; ctrl.alu_op = ALU_PASSB;
          ctrl.regdst = DST_RT; ctrl.reg_write = 1'b1;
        end else if (rs == RS_MT) begin
          ctrl.mtc0 = 1'b1; ctrl.want_rt_by_id = 1'b1;
        end else if (rs[4] && funct == FN_ERET) begin
          ctrl.eret = 1'b1;
        end else begin
          ctrl.reserved = 1'b1;
        end
      end
      OP_COP2: begin
        if (rs == RS_MF || rs == RS_CF) begin
          ctrl.cop_read = 1'b1; ctrl.alu_op = ALU_PASSB;
          ctrl.regdst = DST_RT; ctrl.reg_write = 1'b1;
        end else if (rs == RS_MT || rs == RS_CT) begin
          ctrl.cop2_write = 1'b1; ctrl.want_rt_by_id = 1'b1;
        end else begin
          ctrl.reserved = 1'b1;
        end
      end
      default: ctrl.reserved = 1'b1;
    endcase
  end
endmodule
