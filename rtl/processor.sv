// processor: five-stage MIPS32 pipeline whose state is multiplied per
// hardware thread, with the nHSE scheduler attached as coprocessor 2.
//
// The classic IF/ID/EX/MEM/WB pipeline (branches resolved in ID with one
// always-executed delay slot, forwarding from MEM and WB into ID and EX,
// load-use and branch-operand stalls) is built so that every storage element
// of a thread's context - PC, register file, the four pipeline registers and
// the COP0 registers - exists NTHREADS times. The combinational logic is
// shared. The scheduler's nHSE_Task_Select picks which copy every stage reads
// and writes, and nHSE_EN_sCPUi freezes the whole pipeline while no thread is
// ready. A context switch therefore moves nothing: the next clock simply
// works on another copy, and the preempted thread's half-finished
// instructions wait in its own pipeline registers until it is selected again.
//
// Interfaces: a word-addressed instruction port (InstMem_*) and data port
// (DataMem_*, byte enables), each with a Ready handshake; five maskable
// hardware interrupts and an NMI for COP0; ExtIntEv for the scheduler's
// interrupt events. The scheduler loads the selected thread's PC with an
// interrupt trap cell (and drops the instruction that thread had fetched),
// and it does not switch threads while a data access waits for Ready, nor
// between an LL and the SC that closes it (nHSE_inhibit_CC), so an LL/SC
// sequence is atomic with respect to the other threads.
// HI/LO (muldiv) exist once per thread and are written in EX. COP0 gives
// each thread a user/kernel mode and, in user mode, an optional reversed
// (little-endian) byte order for data, applied by the memory controller.
//
// Timing: one instruction per clock per running thread without hazards.
// A load followed by a user in the next instruction costs one stall, as does
// a branch/JR/CTC2/MTC2 whose operand is produced by the instruction just
// before it (two after a load). COP2 and COP0 registers are read and written
// in ID, except that LWC2 writes its scheduler register from WB; a COP2
// access (MFC2/CFC2/MTC2/CTC2/LWC2/SWC2) behind an unfinished LWC2 of the
// same thread waits in ID, and the scheduler does not switch threads until
// the LWC2 has written. SWC2 stores the scheduler register read in ID.
// From the published design: the multiplied datapath, its stages, muxes and control
// signal names, the COP2 scheduler interface. This design's own: the exact
// forwarding/stall equations, the single-cycle multiply/divide, the link
// bit that holds the scheduler between LL and SC, the LWC2/SWC2 register
// selection by rt and write from WB, the instruction group left out
// (branch-likely) and the start address of each thread.
module processor
  import nmpra_pkg::*;
#(
  parameter int          NTHREADS       = 4,
  parameter int          NR_INT         = 4,
  parameter logic [31:0] RESET_BASE     = 32'h0000_0000,
  parameter logic [31:0] RESET_STRIDE   = 32'h0000_0400,
  parameter logic [31:0] INT_VEC_BASE   = 32'h0000_1000,
  parameter logic [31:0] INT_VEC_STRIDE = 32'h0000_0040,
  parameter logic [31:0] EXC_VECTOR     = 32'h0000_2000,
  localparam int         TW             = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic              clock,
  input  logic              reset,
  input  logic [4:0]        Interrupts,
  input  logic              NMI,
  input  logic [NR_INT-1:0] ExtIntEv,
  // data memory interface
  input  logic [31:0]       DataMem_In,
  input  logic              DataMem_Ready,
  output logic [31:0]       DataMem_Out,
  output logic [29:0]       DataMem_Address,
  output logic              DataMem_Read,
  output logic [3:0]        DataMem_Write,
  // instruction memory interface
  input  logic [31:0]       InstMem_In,
  input  logic              InstMem_Ready,
  output logic [29:0]       InstMem_Address,
  output logic              InstMem_Read,
  // status
  output logic [7:0]        IP,
  output logic [TW-1:0]     nHSE_Task_Select,
  output logic              nHSE_EN_sCPUi
);
  wire [TW-1:0] sel = nHSE_Task_Select;
  wire          en  = nHSE_EN_sCPUi;

  // ------------------------------------------------------------ hazards
  logic [1:0] id_rs_fwd_sel, id_rt_fwd_sel, ex_rs_fwd_sel, ex_rt_fwd_sel;
  logic       m_write_data_fwd_sel;
  logic       if_stall, id_stall, ex_stall, m_stall, wb_stall, if_bubble;
  logic       m_stall_controller, inhibit_cc;

  // exceptions
  logic        if_exc_flush, id_exc_flush, ex_exc_flush, m_exc_flush;
  logic        exc_pc_sel, exc_taken;
  logic [31:0] exc_pc_out, cp0_reg_out;

  // scheduler
  logic [31:0] pc_nhse_out, write_data_nhse;
  logic        pc_nhse_sel, reg_write_nhse;
  logic        fsm_run;
  logic [TW-1:0] fsm_id;
  logic [NTHREADS-1:0] thread_ready;

  // pipeline registers
  if_id_t  if_id_d,  if_id_q;
  id_ex_t  id_ex_d,  id_ex_q;
  ex_mem_t ex_mem_d, ex_mem_q;
  mem_wb_t mem_wb_d, mem_wb_q;

  // ------------------------------------------------------------ IF
  logic [31:0] if_pc, if_pc_add4, pc_std_next, pc_next;
  logic [31:0] id_pc_add4, id_jump_address, id_branch_address, id_read_data1_end;
  ctrl_t       id_ctrl;

  assign if_pc_add4      = if_pc + 32'd4;               // PC_Add4
  assign InstMem_Address = if_pc[31:2];
  assign InstMem_Read    = en;

  always_comb begin                                      // PCSrcStd_Mux
    unique case (id_ctrl.pcsrc)
      PCSRC_JUMP:   pc_std_next = id_jump_address;
      PCSRC_BRANCH: pc_std_next = id_branch_address;
      PCSRC_REG:    pc_std_next = id_read_data1_end;
      default:      pc_std_next = if_pc_add4;
    endcase
  end
  assign pc_next = exc_pc_sel ? exc_pc_out : pc_std_next; // PCSrcExc_Mux

  pc_reg #(.NTHREADS(NTHREADS), .RESET_BASE(RESET_BASE), .RESET_STRIDE(RESET_STRIDE)) u_pc (
    .clock, .reset, .task_select(sel), .en_scpu(en),
    .stall(if_stall && !exc_pc_sel),
    .pc_nhse_sel(pc_nhse_sel), .pc_nhse(pc_nhse_out),
    .pc_in(pc_next), .pc_out(if_pc));

  logic id_is_jb;
  assign id_is_jb = if_id_q.valid && (id_ctrl.want_rs_by_id && !id_ctrl.cop2_write && !id_ctrl.mtc0
                                      || id_ctrl.pcsrc == PCSRC_JUMP);
  always_comb begin
    if_id_d.valid    = 1'b1;
    if_id_d.instr    = InstMem_In;
    if_id_d.pc       = if_pc;
    if_id_d.pc_add4  = if_pc_add4;
    if_id_d.is_bds   = id_is_jb;
    if_id_d.exc_adel = (if_pc[1:0] != 2'b00);
  end

  mt_pipe_reg #(.T(if_id_t), .NTHREADS(NTHREADS)) u_if_id (
    .clock, .reset, .task_select(sel), .en_scpu(en), .stall(id_stall),
    .flush(if_exc_flush || if_bubble || pc_nhse_sel), .d(if_id_d), .q(if_id_q));

  // ------------------------------------------------------------ ID
  logic [31:0] instr;
  logic [31:0] id_rd1_rf, id_rd2_rf, id_read_data2_end, id_imm_ext;
  logic        cmp_eq, cmp_gz, cmp_gez, cmp_lz, cmp_lez;
  logic [31:0] m_alu_result, wb_write_data;
  logic        id_valid, id_go;
  ctrl_t       id_ctrl_raw;

  assign instr    = if_id_q.instr;
  assign id_valid = if_id_q.valid;
  assign id_pc_add4 = if_id_q.pc_add4;

  register_file #(.NTHREADS(NTHREADS)) u_rf (
    .clock, .reset, .task_select(sel), .en_scpu(en),
    .read_reg1(instr[25:21]), .read_reg2(instr[20:16]),
    .write_reg(mem_wb_q.rt_rd), .write_data(wb_write_data),
    .reg_write(mem_wb_q.valid && mem_wb_q.reg_write),
    .read_data1(id_rd1_rf), .read_data2(id_rd2_rf));

  always_comb begin                                      // IDRsFwd_Mux / IDRtFwd_Mux
    unique case (id_rs_fwd_sel)
      2'd1:    id_read_data1_end = m_alu_result;
      2'd2:    id_read_data1_end = wb_write_data;
      default: id_read_data1_end = id_rd1_rf;
    endcase
    unique case (id_rt_fwd_sel)
      2'd1:    id_read_data2_end = m_alu_result;
      2'd2:    id_read_data2_end = wb_write_data;
      default: id_read_data2_end = id_rd2_rf;
    endcase
  end

  compare_unit u_cmp (
    .a(id_read_data1_end), .b(id_read_data2_end),
    .cmp_eq, .cmp_gz, .cmp_gez, .cmp_lz, .cmp_lez);

  control_unit u_ctrl (
    .opcode(instr[31:26]), .funct(instr[5:0]), .rs(instr[25:21]), .rt(instr[20:16]),
    .cmp_eq, .cmp_gz, .cmp_gez, .cmp_lz, .cmp_lez, .ctrl(id_ctrl_raw));
  assign id_ctrl = id_valid ? id_ctrl_raw : CTRL_NOP;

  assign id_imm_ext        = id_ctrl.imm_zero_ext ? {16'h0, instr[15:0]} : {{16{instr[15]}}, instr[15:0]};
  assign id_branch_address = id_pc_add4 + {{14{instr[15]}}, instr[15:0], 2'b00};   // BranchAddress_Add
  assign id_jump_address   = {id_pc_add4[31:28], instr[25:0], 2'b00};
  // the decode stage hands on its instruction this clock
  assign id_go = id_valid && !id_stall && !id_exc_flush;

  nhse #(.NTHREADS(NTHREADS), .NR_INT(NR_INT),
         .INT_VEC_BASE(INT_VEC_BASE), .INT_VEC_STRIDE(INT_VEC_STRIDE)) u_nhse (
    .clock, .reset, .nHSE_inhibit_CC(inhibit_cc),
    .cop2_valid(en && id_go && id_ctrl.cop2_write),
    .OpCode(instr[31:26]), .Rs(instr[25:21]), .Rt(instr[20:16]), .Immediate(instr[15:0]),
    .ID_ReadData2_RF(id_read_data2_end),
    .Write_Data_nHSE(write_data_nhse), .Reg_Write_nHSE(reg_write_nhse),
    .lwc2_valid(en && mem_wb_q.valid && mem_wb_q.lwc2), .lwc2_sel(mem_wb_q.rt_rd),
    .lwc2_data(mem_wb_q.read_data),
    .ExtIntEv, .nHSE_Task_Select, .nHSE_EN_sCPUi,
    .PC_nHSE_Out(pc_nhse_out), .PC_nHSE_Sel(pc_nhse_sel),
    .nHSE_FSM_run(fsm_run), .nHSE_FSM_id(fsm_id), .nHSE_ready(thread_ready));

  always_comb begin
    id_ex_d.valid     = id_valid;
    id_ex_d.ctrl      = id_ctrl;
    id_ex_d.rs        = instr[25:21];
    id_ex_d.rt        = instr[20:16];
    id_ex_d.rd        = instr[15:11];
    id_ex_d.shamt     = instr[10:6];
    id_ex_d.rs_data   = id_read_data1_end;
    id_ex_d.rt_data   = id_read_data2_end;
    id_ex_d.imm_ext   = id_imm_ext;
    id_ex_d.cop_data  = id_ctrl.mfc0 ? cp0_reg_out
                        : ((reg_write_nhse || id_ctrl.swc2) ? write_data_nhse : 32'h0);
    id_ex_d.link_addr = id_pc_add4 + 32'd4;
    id_ex_d.pc        = if_id_q.pc;
    id_ex_d.is_bds    = if_id_q.is_bds;
  end

  mt_pipe_reg #(.T(id_ex_t), .NTHREADS(NTHREADS)) u_id_ex (
    .clock, .reset, .task_select(sel), .en_scpu(en), .stall(ex_stall),
    .flush(id_exc_flush || (id_stall && !m_stall)), .d(id_ex_d), .q(id_ex_q));

  // ------------------------------------------------------------ EX
  logic [31:0] ex_read_data1_fwd, ex_read_data2_fwd, ex_alu_b, ex_alu_result, ex_result;
  logic        ex_exc_ov_raw, ex_bzero, ex_reg_write;
  logic [4:0]  ex_rt_rd;
  ctrl_t       ex_ctrl;

  assign ex_ctrl = id_ex_q.ctrl;

  always_comb begin                                      // EXRsFwd_Mux / EXRtFwdLnk_Mux
    unique case (ex_rs_fwd_sel)
      2'd1:    ex_read_data1_fwd = m_alu_result;
      2'd2:    ex_read_data1_fwd = wb_write_data;
      default: ex_read_data1_fwd = id_ex_q.rs_data;
    endcase
    unique case (ex_rt_fwd_sel)
      2'd1:    ex_read_data2_fwd = m_alu_result;
      2'd2:    ex_read_data2_fwd = wb_write_data;
      default: ex_read_data2_fwd = id_ex_q.rt_data;
    endcase
    // EXALUImm_Mux: register, immediate or coprocessor value
    if (ex_ctrl.cop_read)         ex_alu_b = id_ex_q.cop_data;
    else if (ex_ctrl.alu_src_imm) ex_alu_b = id_ex_q.imm_ext;
    else                          ex_alu_b = ex_read_data2_fwd;
    // EXRtRdLnk_Mux
    unique case (ex_ctrl.regdst)
      DST_RD:  ex_rt_rd = id_ex_q.rd;
      DST_R31: ex_rt_rd = 5'd31;
      default: ex_rt_rd = id_ex_q.rt;
    endcase
  end

  alu u_alu (
    .a(ex_read_data1_fwd), .b(ex_alu_b), .shamt(id_ex_q.shamt), .operation(ex_ctrl.alu_op),
    .result(ex_alu_result), .exc_ov(ex_exc_ov_raw), .bzero(ex_bzero));

  // HI/LO: written when the instruction leaves EX for good
  logic [31:0] ex_hi, ex_lo;
  muldiv #(.NTHREADS(NTHREADS)) u_muldiv (
    .clock, .reset, .task_select(sel), .en_scpu(en),
    .write_en(id_ex_q.valid && !ex_stall && !ex_exc_flush), .operation(ex_ctrl.alu_op),
    .a(ex_read_data1_fwd), .b(ex_read_data2_fwd), .hi(ex_hi), .lo(ex_lo));

  always_comb begin
    if (ex_ctrl.link)                     ex_result = id_ex_q.link_addr;
    else if (ex_ctrl.movn || ex_ctrl.movz) ex_result = ex_read_data1_fwd;
    else if (ex_ctrl.alu_op == ALU_MFHI)  ex_result = ex_hi;
    else if (ex_ctrl.alu_op == ALU_MFLO)  ex_result = ex_lo;
    else                                  ex_result = ex_alu_result;
    ex_reg_write = ex_ctrl.reg_write
                   && !(ex_ctrl.movn && ex_read_data2_fwd == 32'h0)
                   && !(ex_ctrl.movz && ex_read_data2_fwd != 32'h0);
    ex_mem_d.valid      = id_ex_q.valid;
    ex_mem_d.ctrl       = ex_ctrl;
    ex_mem_d.ctrl.reg_write = ex_reg_write;
    ex_mem_d.rt_rd      = ex_rt_rd;
    ex_mem_d.rt         = ex_ctrl.swc2 ? 5'd0 : id_ex_q.rt;   // no GPR store forwarding for SWC2
    ex_mem_d.alu_result = ex_result;
    ex_mem_d.store_data = ex_ctrl.swc2 ? id_ex_q.cop_data : ex_read_data2_fwd;
    ex_mem_d.pc         = id_ex_q.pc;
    ex_mem_d.is_bds     = id_ex_q.is_bds;
  end

  mt_pipe_reg #(.T(ex_mem_t), .NTHREADS(NTHREADS)) u_ex_mem (
    .clock, .reset, .task_select(sel), .en_scpu(en), .stall(m_stall),
    .flush(ex_exc_flush), .d(ex_mem_d), .q(ex_mem_q));

  // ------------------------------------------------------------ MEM
  logic [31:0] m_write_data, m_read_data;
  logic        m_exc_adel, m_exc_ades, m_exc_tr;

  assign m_alu_result = ex_mem_q.alu_result;
  assign m_write_data = m_write_data_fwd_sel ? wb_write_data : ex_mem_q.store_data;  // MWriteData_Mux

  // LL/SC: a per-thread link bit, set when an LL leaves MEM and cleared by
  // the SC that closes the sequence or by an exception/ERET redirect. While
  // it is set, or an LL is on its way through EX and MEM, the scheduler may
  // not switch threads, so an LL...SC sequence is never interleaved with
  // another thread and the SC succeeds unless an exception intervened.
  logic [NTHREADS-1:0] llbit;
  logic                ll_ok, m_done;
  logic                lwc2_busy, id_cop2_wait, reverse_endian;
  assign ll_ok  = llbit[sel];
  assign m_done = en && ex_mem_q.valid && !m_stall && !m_exc_flush;
  assign inhibit_cc = m_stall_controller || ll_ok
                      || (id_ex_q.valid && ex_ctrl.ll) || (ex_mem_q.valid && ex_mem_q.ctrl.ll)
                      || lwc2_busy;

  // LWC2 writes its scheduler register from WB. Until then a COP2 access of
  // the same thread waits in ID, and the scheduler holds the thread on the
  // pipeline so the write cannot be left behind in a parked WB register.
  assign lwc2_busy = (id_ex_q.valid && ex_ctrl.lwc2) || (ex_mem_q.valid && ex_mem_q.ctrl.lwc2)
                     || (mem_wb_q.valid && mem_wb_q.lwc2);
  assign id_cop2_wait = lwc2_busy && id_valid
                        && (instr[31:26] == OP_COP2 || id_ctrl.swc2 || id_ctrl.lwc2);

  always_ff @(posedge clock) begin
    if (reset) llbit <= '0;
    else if (en) begin
      if (exc_pc_sel)                          llbit[sel] <= 1'b0;
      else if (m_done && ex_mem_q.ctrl.ll)     llbit[sel] <= 1'b1;
      else if (m_done && ex_mem_q.ctrl.sc)     llbit[sel] <= 1'b0;
    end
  end

  mem_controller u_dmc (
    .mem_read(ex_mem_q.valid && ex_mem_q.ctrl.mem_read && !ex_mem_q.ctrl.sc),
    .mem_write(ex_mem_q.valid && ex_mem_q.ctrl.mem_write && (!ex_mem_q.ctrl.sc || ll_ok)),
    .mem_byte(ex_mem_q.ctrl.mem_byte), .mem_half(ex_mem_q.ctrl.mem_half),
    .mem_sign_extend(ex_mem_q.ctrl.mem_sign_ext),
    .mem_left(ex_mem_q.ctrl.mem_left), .mem_right(ex_mem_q.ctrl.mem_right),
    .reverse(reverse_endian),
    .kill(!en), .address(m_alu_result), .write_data(m_write_data),
    .read_data(m_read_data), .m_stall_controller(m_stall_controller),
    .exc_adel(m_exc_adel), .exc_ades(m_exc_ades),
    .DataMem_In, .DataMem_Ready, .DataMem_Address, .DataMem_Out, .DataMem_Read, .DataMem_Write);

  trap_detect u_trap (
    .trap(ex_mem_q.valid && ex_mem_q.ctrl.trap), .trap_cond(ex_mem_q.ctrl.trap_cond),
    .alu_result(m_alu_result), .exc_tr(m_exc_tr));

  always_comb begin
    mem_wb_d.valid      = ex_mem_q.valid;
    mem_wb_d.reg_write  = ex_mem_q.ctrl.reg_write;
    mem_wb_d.memto_reg  = ex_mem_q.ctrl.memto_reg;
    mem_wb_d.lwc2       = ex_mem_q.ctrl.lwc2;
    mem_wb_d.rt_rd      = ex_mem_q.rt_rd;
    mem_wb_d.alu_result = m_alu_result;
    mem_wb_d.read_data  = ex_mem_q.ctrl.sc ? {31'h0, ll_ok} : m_read_data;
  end

  mt_pipe_reg #(.T(mem_wb_t), .NTHREADS(NTHREADS)) u_mem_wb (
    .clock, .reset, .task_select(sel), .en_scpu(en), .stall(wb_stall),
    .flush(m_exc_flush || m_stall), .d(mem_wb_d), .q(mem_wb_q));

  // ------------------------------------------------------------ WB
  assign wb_write_data = mem_wb_q.memto_reg ? mem_wb_q.read_data : mem_wb_q.alu_result;  // WBMemtoReg_Mux

  // ------------------------------------------------------------ control blocks
  hazard_control u_hdu (
    .id_rs(instr[25:21]), .id_rt(instr[20:16]),
    .id_want_rs_by_id(id_ctrl.want_rs_by_id), .id_want_rt_by_id(id_ctrl.want_rt_by_id),
    .id_need_rs_by_ex(id_ctrl.need_rs_by_ex), .id_need_rt_by_ex(id_ctrl.need_rt_by_ex),
    .id_mem_write(id_ctrl.mem_write),
    .ex_rs(id_ex_q.rs), .ex_rt(id_ex_q.rt), .ex_rt_rd(ex_rt_rd),
    .ex_reg_write(id_ex_q.valid && ex_ctrl.reg_write), .ex_mem_read(id_ex_q.valid && ex_ctrl.mem_read),
    .m_rt(ex_mem_q.rt), .m_rt_rd(ex_mem_q.rt_rd),
    .m_reg_write(ex_mem_q.valid && ex_mem_q.ctrl.reg_write),
    .m_mem_read(ex_mem_q.valid && ex_mem_q.ctrl.mem_read),
    .wb_rt_rd(mem_wb_q.rt_rd), .wb_reg_write(mem_wb_q.valid && mem_wb_q.reg_write),
    .instmem_ready(InstMem_Ready), .m_stall_controller, .id_cop2_wait,
    .id_rs_fwd_sel, .id_rt_fwd_sel, .ex_rs_fwd_sel, .ex_rt_fwd_sel, .m_write_data_fwd_sel,
    .if_stall, .id_stall, .ex_stall, .m_stall, .wb_stall, .if_bubble);

  cop0 #(.NTHREADS(NTHREADS), .EXC_VECTOR(EXC_VECTOR)) u_cop0 (
    .clock, .reset, .nHSE_Task_Select, .nHSE_EN_sCPUi, .exc_allowed(!m_stall_controller),
    .rd(instr[15:11]), .mtc0(id_ctrl.mtc0 && !id_stall), .reg_in(id_read_data2_end),
    .reg_out(cp0_reg_out), .id_eret(id_ctrl.eret),
    .Interrupts, .NMI,
    .id_valid(id_valid),
    .id_exc_sys(id_ctrl.syscall), .id_exc_bp(id_ctrl.brk), .id_exc_ri(id_ctrl.reserved),
    .id_cop0(id_ctrl.mfc0 || id_ctrl.mtc0 || id_ctrl.eret),
    .id_exc_adel(id_valid && if_id_q.exc_adel), .id_restart_pc(if_id_q.pc), .id_is_bds(if_id_q.is_bds),
    .ex_exc_ov(id_ex_q.valid && ex_ctrl.ex_can_err && ex_exc_ov_raw),
    .ex_restart_pc(id_ex_q.pc), .ex_is_bds(id_ex_q.is_bds),
    .m_exc_adel(ex_mem_q.valid && m_exc_adel), .m_exc_ades(ex_mem_q.valid && m_exc_ades),
    .m_exc_tr(m_exc_tr), .m_restart_pc(ex_mem_q.pc), .m_is_bds(ex_mem_q.is_bds),
    .m_bad_addr(m_alu_result),
    .if_exc_flush, .id_exc_flush, .ex_exc_flush, .m_exc_flush,
    .exc_pc_sel, .exc_pc_out, .IP, .reverse_endian, .exc_taken);
endmodule
