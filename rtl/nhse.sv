// nhse: hardware scheduler engine for n threads (nHSE), mapped as COP2.
//
// The scheduler decides, every clock, which hardware thread (instPi) owns the
// multiplied datapath, and drives nHSE_Task_Select / nHSE_EN_sCPUi to the
// pipeline. Per thread it holds the control-task register crTRi (which
// events are validated), the control-event register crEVi (which events have
// occurred), the event-priority register crEPRi, the run-time monitor
// mrCntRuni and the time-event counter mrTEVi; globally it holds cr0MSTOP
// (bit i lets thread i run) and grINT_IDj (the thread that external interrupt
// j is attached to).
//
// Event bits, in crTRi / crEVi:
//   0 time event (lr_enTi)      1 watchdog (lr_enWDi)   2 deadline 1 (lr_enDi)
//   3 deadline 2 (lr_enD2i)     4 interrupt (lr_enInti) 5 mutex (lr_enMutexi)
//   6 signal/message (lr_enSMi) 7 run / event being serviced (lr_run_instPi)
// crEPRi holds a 3-bit priority for event k in bits [3k+2:3k]; a smaller value
// is a higher priority.
//
// Scheduling: a thread is ready when its cr0MSTOP bit is set and some event
// is both validated and pending (crTRi & crEVi != 0). The FSM state
// (nHSE_FSM_state) is FSM_WAIT when no thread is ready, otherwise FSM_sCPUi
// for the ready thread with the lowest index (thread 0 has the highest
// priority). The state is held while nHSE_inhibit_CC is high. Task select and
// enable are registered from the state, so a context switch takes effect one
// clock after the state changes: an external interrupt edge is captured in
// crEVi on the first clock, the FSM moves on the second and the new thread
// owns the pipeline from the third.
//
// Interrupt events: a rising edge on ExtIntEv[j] marks interrupt j pending and
// sets bit 4 of crEV of the thread grINT_IDj. While that thread runs, the
// interrupt is accepted when bit 4 is validated and pending and neither the
// mutex nor the message event is validated, pending and of higher priority;
// the lowest-numbered pending interrupt attached to the thread wins. On
// acceptance bit 7 is set in crEVi and crTRi, the thread's PC is loaded with
// the trap cell INT_VEC_BASE + j*INT_VEC_STRIDE (PC_nHSE_Sel for one clock),
// and further interrupts for the thread are held off until the handler writes
// crTRi with bit 7 clear (the "wait" instruction), which ends the service.
//
// COP2 access (decode stage, current thread): MFC2/MTC2 reach the monitoring
// registers (selector = immediate: 0 mrCntRuni, 1 mrTEVi), CFC2/CTC2 the
// control registers (0 crTRi, 1 crEVi, 2 crEPRi, 4 cr0MSTOP, 8+j grINT_IDj).
// The rt field (the GPR side of the move) is handled by the datapath.
// SWC2 reads the control register whose selector is its rt field (same map)
// in the decode stage, and the datapath stores it; LWC2 writes the control
// register selected by its rt field from the write-back stage (lwc2_valid,
// lwc2_sel, lwc2_data). The datapath never presents a decode-stage write and
// an LWC2 write in the same clock (COP2 accesses wait behind an LWC2), so
// both share one write path.
// Reads are combinational (Write_Data_nHSE, Reg_Write_nHSE); writes happen on
// the clock edge when cop2_valid is high. mrTEVi counts down to zero and sets
// the time event (bit 0) when it gets there.
//
// From the published design: the register set, the event list, the 3-bit priority
// fields and the interrupt-acceptance rule of its interrupt algorithm, the
// port list and the FSM_WAIT/FSM_sCPUi states. This design's own choices:
// fixed index priority between threads, the bit numbering of the events, the
// COP2 selector map, edge-triggered interrupt capture, the reset values
// (only thread 0 enabled; every thread has its run bit set) and the
// time-event counter.
module nhse #(
  parameter int          NTHREADS       = 4,
  parameter int          NR_INT         = 4,
  parameter logic [31:0] INT_VEC_BASE   = 32'h0000_1000,
  parameter logic [31:0] INT_VEC_STRIDE = 32'h0000_0040,
  localparam int         TW             = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              nHSE_inhibit_CC,
  // COP2 access from the decode stage
  input  logic              cop2_valid,
  input  logic [5:0]        OpCode,
  input  logic [4:0]        Rs,
  input  logic [4:0]        Rt,
  input  logic [15:0]       Immediate,
  input  logic [31:0]       ID_ReadData2_RF,
  output logic [31:0]       Write_Data_nHSE,
  output logic              Reg_Write_nHSE,
  // LWC2 write from the write-back stage
  input  logic              lwc2_valid,
  input  logic [4:0]        lwc2_sel,
  input  logic [31:0]       lwc2_data,
  // events
  input  logic [NR_INT-1:0] ExtIntEv,
  // datapath control
  output logic [TW-1:0]     nHSE_Task_Select,
  output logic              nHSE_EN_sCPUi,
  output logic [31:0]       PC_nHSE_Out,
  output logic              PC_nHSE_Sel,
  // observation
  output logic              nHSE_FSM_run,
  output logic [TW-1:0]     nHSE_FSM_id,
  output logic [NTHREADS-1:0] nHSE_ready
);
  localparam logic [5:0] OP_COP2 = 6'b010010;
  localparam logic [5:0] OP_SWC2 = 6'b111010;
  localparam logic [4:0] RS_MF = 5'b00000, RS_CF = 5'b00010, RS_MT = 5'b00100, RS_CT = 5'b00110;
  localparam logic [2:0] EV_NONE  = 3'b111;
  localparam logic [2:0] EV_INT   = 3'b100;
  localparam logic [7:0] INT_NONE = 8'hFF;

  logic [31:0]   crTR [NTHREADS], crTR_n [NTHREADS];
  logic [31:0]   crEV [NTHREADS], crEV_n [NTHREADS];
  logic [31:0]   crEPR [NTHREADS], crEPR_n [NTHREADS];
  logic [31:0]   mrCntRun [NTHREADS], mrCntRun_n [NTHREADS];
  logic [31:0]   mrTEV [NTHREADS], mrTEV_n [NTHREADS];
  logic [2:0]    grEv_select [NTHREADS], grEv_select_n [NTHREADS];
  logic [7:0]    grInt_select [NTHREADS], grInt_select_n [NTHREADS];
  logic [NTHREADS-1:0] cr0MSTOP, cr0MSTOP_n;
  logic [TW-1:0] grINT_ID [NR_INT], grINT_ID_n [NR_INT];
  logic [NR_INT-1:0] pending, pending_n, ext_q;
  logic          fsm_run_n;
  logic [TW-1:0] fsm_id_n;
  logic          pc_sel_n;
  logic [31:0]   pc_out_n;

  wire [TW-1:0] cur = nHSE_Task_Select;
  wire is_cop2  = (OpCode == OP_COP2);
  wire is_swc2  = (OpCode == OP_SWC2);
  wire ctl_acc  = (is_cop2 && (Rs == RS_CF || Rs == RS_CT)) || is_swc2;
  wire [15:0] rd_sel = is_swc2 ? 16'(Rt) : Immediate;
  wire mon_wr   = cop2_valid && is_cop2 && (Rs == RS_MT);
  // the one control-register write path: CTC2 from ID or LWC2 from WB
  wire        ctl_wr  = lwc2_valid || (cop2_valid && is_cop2 && (Rs == RS_CT));
  wire [15:0] wr_sel  = lwc2_valid ? 16'(lwc2_sel) : Immediate;
  wire [31:0] wr_data = lwc2_valid ? lwc2_data : ID_ReadData2_RF;

  // ------------------------------------------------------------ COP2 read
  always_comb begin
    Write_Data_nHSE = 32'h0;
    if (ctl_acc) begin
      unique case (rd_sel)
        16'd0: Write_Data_nHSE = crTR[cur];
        16'd1: Write_Data_nHSE = crEV[cur];
        16'd2: Write_Data_nHSE = crEPR[cur];
        16'd4: Write_Data_nHSE = 32'(cr0MSTOP);
        default: begin
          for (int j = 0; j < NR_INT; j++)
            if (rd_sel == 16'(8 + j)) Write_Data_nHSE = 32'(grINT_ID[j]);
        end
      endcase
    end else begin
      Write_Data_nHSE = (Immediate == 16'd0) ? mrCntRun[cur] : mrTEV[cur];
    end
    Reg_Write_nHSE = is_cop2 && (Rs == RS_MF || Rs == RS_CF);
  end

  // ------------------------------------------------------------ next state
  always_comb begin
    logic [NR_INT-1:0] edges;
    logic              int_ok, found;
    logic [7:0]        jsel;
    logic [2:0]        p4, p5, p6;

    crTR_n = crTR; crEV_n = crEV; crEPR_n = crEPR; mrCntRun_n = mrCntRun;
    mrTEV_n = mrTEV; grEv_select_n = grEv_select; grInt_select_n = grInt_select;
    cr0MSTOP_n = cr0MSTOP; grINT_ID_n = grINT_ID;
    pc_sel_n = 1'b0; pc_out_n = PC_nHSE_Out;
    int_ok = 1'b0; found = 1'b0; jsel = 8'h0; p4 = 3'h0; p5 = 3'h0; p6 = 3'h0;

    // external interrupt capture (rising edge)
    edges     = ExtIntEv & ~ext_q;
    pending_n = pending | edges;

    // run-time monitor and time events
    for (int i = 0; i < NTHREADS; i++) begin
      if (nHSE_EN_sCPUi && cur == TW'(i)) mrCntRun_n[i] = mrCntRun[i] + 32'd1;
      if (mrTEV[i] != 32'h0) begin
        mrTEV_n[i] = mrTEV[i] - 32'd1;
        if (mrTEV[i] == 32'd1) crEV_n[i][0] = 1'b1;
      end
    end

    // interrupt acceptance for the thread the FSM is running (the published acceptance rule)
    if (nHSE_FSM_run) begin
      p4 = crEPR[nHSE_FSM_id][14:12];
      p5 = crEPR[nHSE_FSM_id][17:15];
      p6 = crEPR[nHSE_FSM_id][20:18];
      int_ok = crTR[nHSE_FSM_id][4] && crEV[nHSE_FSM_id][4]
               && !((p5 < p4) && crTR[nHSE_FSM_id][5] && crEV[nHSE_FSM_id][5])
               && !((p6 < p4) && crTR[nHSE_FSM_id][6] && crEV[nHSE_FSM_id][6]);
      found = 1'b0;
      jsel  = INT_NONE;
      for (int j = NR_INT - 1; j >= 0; j--) begin
        if (pending[j] && grINT_ID[j] == nHSE_FSM_id) begin
          found = 1'b1;
          jsel  = 8'(j);
        end
      end
      if (int_ok && found && grEv_select[nHSE_FSM_id] == EV_NONE
          && grInt_select[nHSE_FSM_id] == INT_NONE) begin
        grEv_select_n[nHSE_FSM_id]  = EV_INT;
        grInt_select_n[nHSE_FSM_id] = jsel;
        crEV_n[nHSE_FSM_id][7]      = 1'b1;
        crTR_n[nHSE_FSM_id][7]      = 1'b1;
        crEV_n[nHSE_FSM_id][4]      = 1'b0;
        for (int j = 0; j < NR_INT; j++) if (jsel == 8'(j)) pending_n[j] = 1'b0;
        pc_out_n = INT_VEC_BASE + INT_VEC_STRIDE * 32'(jsel);
        pc_sel_n = 1'b1;
      end
    end

    // COP2 / LWC2 writes from the running thread
    if (ctl_wr) begin
      unique case (wr_sel)
        16'd0: begin
          crTR_n[cur] = wr_data;
          if (!wr_data[7] && grEv_select[cur] != EV_NONE) begin
            grEv_select_n[cur]  = EV_NONE;   // end of event service
            grInt_select_n[cur] = INT_NONE;
            crEV_n[cur][7]      = 1'b0;
          end
        end
        16'd1: crEV_n[cur]  = wr_data;
        16'd2: crEPR_n[cur] = wr_data;
        16'd4: cr0MSTOP_n   = wr_data[NTHREADS-1:0];
        default: begin
          for (int j = 0; j < NR_INT; j++)
            if (wr_sel == 16'(8 + j)) grINT_ID_n[j] = wr_data[TW-1:0];
        end
      endcase
    end
    if (mon_wr && Immediate == 16'd1) mrTEV_n[cur] = ID_ReadData2_RF;

    // interrupt event bit of every thread that has an attached pending interrupt
    for (int j = 0; j < NR_INT; j++)
      if (pending_n[j]) crEV_n[grINT_ID_n[j]][4] = 1'b1;

    // scheduling decision
    fsm_run_n = 1'b0;
    fsm_id_n  = nHSE_FSM_id;
    for (int i = NTHREADS - 1; i >= 0; i--) begin
      if (nHSE_ready[i]) begin
        fsm_run_n = 1'b1;
        fsm_id_n  = TW'(i);
      end
    end
    if (nHSE_inhibit_CC) begin
      fsm_run_n = nHSE_FSM_run;
      fsm_id_n  = nHSE_FSM_id;
    end
  end

  always_comb begin
    for (int i = 0; i < NTHREADS; i++)
      nHSE_ready[i] = cr0MSTOP[i] && ((crTR[i][7:0] & crEV[i][7:0]) != 8'h00);
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < NTHREADS; i++) begin
        crTR[i] <= 32'h0000_0080; crEV[i] <= 32'h0000_0080; crEPR[i] <= '0;
        mrCntRun[i] <= '0; mrTEV[i] <= '0;
        grEv_select[i] <= EV_NONE; grInt_select[i] <= INT_NONE;
      end
      for (int j = 0; j < NR_INT; j++) grINT_ID[j] <= '0;
      cr0MSTOP         <= NTHREADS'(1);
      pending          <= '0;
      ext_q            <= '0;
      nHSE_FSM_run     <= 1'b0;
      nHSE_FSM_id      <= '0;
      nHSE_Task_Select <= '0;
      nHSE_EN_sCPUi    <= 1'b0;
      PC_nHSE_Sel      <= 1'b0;
      PC_nHSE_Out      <= '0;
    end else begin
      crTR <= crTR_n; crEV <= crEV_n; crEPR <= crEPR_n; mrCntRun <= mrCntRun_n;
      mrTEV <= mrTEV_n; grEv_select <= grEv_select_n; grInt_select <= grInt_select_n;
      cr0MSTOP <= cr0MSTOP_n; grINT_ID <= grINT_ID_n;
      pending  <= pending_n;
      ext_q    <= ExtIntEv;
      nHSE_FSM_run <= fsm_run_n;
      nHSE_FSM_id  <= fsm_id_n;
      // FSM_WAIT disables the pipeline; FSM_sCPUi selects thread i
      if (nHSE_FSM_run) nHSE_Task_Select <= nHSE_FSM_id;
      nHSE_EN_sCPUi <= nHSE_FSM_run && cr0MSTOP[nHSE_FSM_id];
      PC_nHSE_Sel   <= pc_sel_n;
      PC_nHSE_Out   <= pc_out_n;
    end
  end
endmodule
