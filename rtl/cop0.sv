// cop0: system control coprocessor 0 (exceptions and interrupts), one
// register set per hardware thread.
//
// Holds, for every thread, Status (IE bit 0, EXL bit 1, UM bit 4, IM bits
// 15:8, RE bit 25, CU0 bit 28), Cause (BD bit 31, CE bits 29:28, IP bits 15:8, ExcCode
// bits 6:2), EPC (14) and BadVAddr (8); the selected thread's copy is the one
// read by MFC0, written by MTC0 and updated by an exception. A thread is in
// user mode when UM=1 and EXL=0; there, a COP0 instruction (id_cop0: MFC0,
// MTC0, ERET) raises Coprocessor Unusable (CpU, CE=0) unless CU0 is set, and
// RE=1 makes data accesses little-endian (reverse_endian to the memory
// stage). The
// core has no virtual memory, so there are no address-segment checks.
//
// Exception requests arrive from three stages and are taken oldest first:
// MEM (address error on load/store, conditional trap), then EX (arithmetic
// overflow), then ID (syscall, break, reserved instruction, coprocessor
// unusable, fetch address error, and enabled hardware interrupts, which are attached to the
// instruction in ID). Taking one flushes the excepting instruction and every
// younger one of the same thread (the *_exc_flush outputs), saves its restart
// PC in EPC (or the branch's PC with Cause.BD when it sits in a delay slot),
// sets Status.EXL and steers the PC to EXC_VECTOR (exc_pc_sel). ERET clears
// EXL and returns to EPC, discarding the instruction fetched after it.
// Interrupts are level sensitive: IP[6:2] = Interrupts[4:0], IP[7] = NMI;
// an interrupt is taken when IE=1, EXL=0 and (IP & IM) != 0, while NMI is
// taken whenever EXL=0. Nothing is taken while the memory stage waits
// (exc_allowed low).
// Timing: requests and flushes are combinational; registers update on the
// rising clock edge when the pipeline is enabled for the selected thread.
// From the published design: the block's role, its per-thread multiplication and its
// request/flush signal set, and the distinction between user and kernel mode.
// This design's choices: the register subset, the single exception vector,
// the stage priority and limiting user-mode checks to COP0 instructions.
module cop0 #(
  parameter int          NTHREADS   = 4,
  parameter logic [31:0] EXC_VECTOR = 32'h0000_2000,
  localparam int         TW         = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [TW-1:0] nHSE_Task_Select,
  input  logic          nHSE_EN_sCPUi,
  input  logic          exc_allowed,
  // MFC0 / MTC0 / ERET from ID
  input  logic [4:0]    rd,
  input  logic          mtc0,
  input  logic [31:0]   reg_in,
  output logic [31:0]   reg_out,
  input  logic          id_eret,
  // interrupt inputs
  input  logic [4:0]    Interrupts,
  input  logic          NMI,
  // ID stage requests
  input  logic          id_valid,
  input  logic          id_exc_sys,
  input  logic          id_exc_bp,
  input  logic          id_exc_ri,
  input  logic          id_cop0,
  input  logic          id_exc_adel,
  input  logic [31:0]   id_restart_pc,
  input  logic          id_is_bds,
  // EX stage requests
  input  logic          ex_exc_ov,
  input  logic [31:0]   ex_restart_pc,
  input  logic          ex_is_bds,
  // MEM stage requests
  input  logic          m_exc_adel,
  input  logic          m_exc_ades,
  input  logic          m_exc_tr,
  input  logic [31:0]   m_restart_pc,
  input  logic          m_is_bds,
  input  logic [31:0]   m_bad_addr,
  // outputs
  output logic          if_exc_flush,
  output logic          id_exc_flush,
  output logic          ex_exc_flush,
  output logic          m_exc_flush,
  output logic          exc_pc_sel,
  output logic [31:0]   exc_pc_out,
  output logic [7:0]    IP,
  output logic          reverse_endian,
  output logic          exc_taken
);
  localparam logic [4:0] EXC_INT = 5'd0, EXC_ADEL = 5'd4, EXC_ADES = 5'd5, EXC_SYS = 5'd8,
                         EXC_BP = 5'd9, EXC_RI = 5'd10, EXC_CPU = 5'd11, EXC_OV = 5'd12, EXC_TR = 5'd13;

  logic [31:0] status [NTHREADS];
  logic [31:0] cause  [NTHREADS];
  logic [31:0] epc    [NTHREADS];
  logic [31:0] badva  [NTHREADS];

  wire [TW-1:0] t = nHSE_Task_Select;
  logic        take_m, take_ex, take_id, int_req, id_exc_cpu;
  logic [4:0]  code;
  logic [31:0] vic_pc;
  logic        vic_bds, bad_wr;
  logic [31:0] bad_val;

  assign IP = {NMI, Interrupts, cause[t][9:8]};
  assign reverse_endian = status[t][25] && status[t][4] && !status[t][1];

  always_comb begin
    int_req = !status[t][1] && (NMI || (status[t][0] && ((IP & status[t][15:8]) != 8'h00)));
    id_exc_cpu = id_cop0 && status[t][4] && !status[t][1] && !status[t][28];
    take_m  = exc_allowed && (m_exc_adel || m_exc_ades || m_exc_tr);
    take_ex = exc_allowed && !take_m && ex_exc_ov;
    take_id = exc_allowed && !take_m && !take_ex && id_valid &&
              (id_exc_sys || id_exc_bp || id_exc_ri || id_exc_cpu || id_exc_adel || int_req);
    exc_taken = take_m || take_ex || take_id;

    code = EXC_INT; vic_pc = id_restart_pc; vic_bds = id_is_bds;
    bad_wr = 1'b0; bad_val = m_bad_addr;
    if (take_m) begin
      vic_pc = m_restart_pc; vic_bds = m_is_bds;
      if (m_exc_adel)      begin code = EXC_ADEL; bad_wr = 1'b1; end
      else if (m_exc_ades) begin code = EXC_ADES; bad_wr = 1'b1; end
      else                 code = EXC_TR;
    end else if (take_ex) begin
      vic_pc = ex_restart_pc; vic_bds = ex_is_bds; code = EXC_OV;
    end else if (take_id) begin
      if (int_req)          code = EXC_INT;
      else if (id_exc_adel) begin code = EXC_ADEL; bad_wr = 1'b1; bad_val = id_restart_pc; end
      else if (id_exc_sys)  code = EXC_SYS;
      else if (id_exc_bp)   code = EXC_BP;
      else if (id_exc_cpu)  code = EXC_CPU;
      else                  code = EXC_RI;
    end

    m_exc_flush  = take_m;
    ex_exc_flush = take_m || take_ex;
    id_exc_flush = take_m || take_ex || take_id;
    if_exc_flush = exc_taken || (id_eret && id_valid && exc_allowed);
    exc_pc_sel   = if_exc_flush;
    exc_pc_out   = exc_taken ? EXC_VECTOR : epc[t];

    unique case (rd)
      5'd8:    reg_out = badva[t];
      5'd12:   reg_out = status[t];
      5'd13:   reg_out = {cause[t][31:16], IP, cause[t][7:0]};
      5'd14:   reg_out = epc[t];
      default: reg_out = 32'h0;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < NTHREADS; i++) begin
        status[i] <= '0; cause[i] <= '0; epc[i] <= '0; badva[i] <= '0;
      end
    end else if (nHSE_EN_sCPUi) begin
      if (exc_taken) begin
        epc[t]          <= vic_bds ? vic_pc - 32'd4 : vic_pc;
        cause[t][31]    <= vic_bds;
        cause[t][29:28] <= 2'd0;
        cause[t][6:2]   <= code;
        status[t][1]    <= 1'b1;
        if (bad_wr) badva[t] <= bad_val;
      end else if (id_eret && id_valid && exc_allowed) begin
        status[t][1]    <= 1'b0;
      end else if (mtc0 && id_valid && exc_allowed) begin
        unique case (rd)
          5'd12: status[t] <= reg_in;
          5'd13: cause[t][9:8] <= reg_in[9:8];
          5'd14: epc[t] <= reg_in;
          default: ;
        endcase
      end
    end
  end
endmodule
