// tb_nhse: directed test of the hardware scheduler.
//  * after reset only thread 0 runs; COP2 reads of crTR, mrCntRun
//  * enabling threads (cr0MSTOP), attaching interrupts (grINT_ID)
//  * the wait move (crTR without the run bit) hands the pipeline to the next
//    ready thread by index priority
//  * an interrupt edge for a waiting thread preempts a lower one; the switch
//    is held while nHSE_inhibit_CC is high; the trap cell of the interrupt is
//    loaded (PC_nHSE_Sel) and the run bit set
//  * a second interrupt waits until the service ends, then is taken
//  * a pending mutex event of higher priority blocks interrupt acceptance
//  * the time-event counter wakes a waiting thread
//  * from FSM_WAIT an interrupt gives the thread the pipeline after 3 clocks
//  * SWC2 reads the control register named by rt; an LWC2 write-back sets a
//    control register and, into crTR without the run bit, ends a service
module tb_nhse;
  localparam int N = 4, NI = 4;
  localparam logic [31:0] VB = 32'h1000, VS = 32'h40;
  logic clock = 0, reset = 1, inhibit = 0, cop2_valid = 0;
  logic [5:0] OpCode = 0;
  logic [4:0] Rs = 0, Rt = 0, lsel = 0;
  logic lvalid = 0;
  logic [31:0] ldata = 0;
  logic [15:0] Imm = 0;
  logic [31:0] wdata = 0, rdata, pc_out;
  logic reg_wr, en, pc_sel, fsm_run;
  logic [NI-1:0] ext = 0;
  logic [1:0] tsel, fsm_id;
  logic [N-1:0] ready;
  int checks = 0, failures = 0;
  int pc_loads = 0;
  logic [31:0] last_vec;

  nhse #(.NTHREADS(N), .NR_INT(NI), .INT_VEC_BASE(VB), .INT_VEC_STRIDE(VS)) dut (
    .clock, .reset, .nHSE_inhibit_CC(inhibit), .cop2_valid, .OpCode, .Rs, .Rt, .Immediate(Imm),
    .ID_ReadData2_RF(wdata), .Write_Data_nHSE(rdata), .Reg_Write_nHSE(reg_wr),
    .lwc2_valid(lvalid), .lwc2_sel(lsel), .lwc2_data(ldata), .ExtIntEv(ext),
    .nHSE_Task_Select(tsel), .nHSE_EN_sCPUi(en), .PC_nHSE_Out(pc_out), .PC_nHSE_Sel(pc_sel),
    .nHSE_FSM_run(fsm_run), .nHSE_FSM_id(fsm_id), .nHSE_ready(ready));

  always #5 clock = ~clock;
  always @(posedge clock) if (!reset && pc_sel) begin pc_loads++; last_vec = pc_out; end
  initial begin repeat (3000) @(posedge clock); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask
  task automatic tick(int n = 1); repeat (n) @(posedge clock); #1; endtask
  task automatic ctc2(int sel, logic [31:0] v);
    OpCode = 6'h12; Rs = 5'b00110; Imm = 16'(sel); wdata = v; cop2_valid = 1; tick();
    cop2_valid = 0; OpCode = 0;
  endtask
  task automatic mtc2(int sel, logic [31:0] v);
    OpCode = 6'h12; Rs = 5'b00100; Imm = 16'(sel); wdata = v; cop2_valid = 1; tick();
    cop2_valid = 0; OpCode = 0;
  endtask
  // LWC2 write-back of a loaded word into control register sel
  task automatic lwc2(int sel, logic [31:0] v);
    lsel = 5'(sel); ldata = v; lvalid = 1; tick(); lvalid = 0;
  endtask
  // SWC2 read: selector in rt, immediate is the address offset
  task automatic read_swc2(int sel, output logic [31:0] v);
    OpCode = 6'h3A; Rt = 5'(sel); Imm = 16'h0004; #1 v = rdata;
    chk("no Reg_Write_nHSE on SWC2", reg_wr, 0); OpCode = 0; Rt = 0;
  endtask
  function automatic logic [31:0] cfc2(int sel);
    OpCode = 6'h12; Rs = 5'b00010; Imm = 16'(sel);
    return 0;
  endfunction
  task automatic read_ctl(int sel, output logic [31:0] v);
    OpCode = 6'h12; Rs = 5'b00010; Imm = 16'(sel); #1 v = rdata;
    chk("Reg_Write_nHSE on CFC2", reg_wr, 1); OpCode = 0;
  endtask
  task automatic read_mon(int sel, output logic [31:0] v);
    OpCode = 6'h12; Rs = 5'b00000; Imm = 16'(sel); #1 v = rdata;
    chk("Reg_Write_nHSE on MFC2", reg_wr, 1); OpCode = 0;
  endtask
  task automatic wait_sel(int t, int maxc, output int n);
    n = 0;
    while (!(en && tsel == 2'(t)) && n < maxc) begin tick(); n++; end
  endtask

  logic [31:0] v, v2;
  int n, loads0;
  initial begin
    tick(2); reset = 0;
    tick(2);
    chk("thread 0 runs after reset", {en, 1'b0, tsel}, 4'b1000);
    read_ctl(0, v); chk("crTR0 reset", v, 32'h80);
    read_mon(0, v); tick(); read_mon(0, v2); chk("mrCntRun0 counts", v2 - v, 1);
    OpCode = 6'h08; #1 chk("no Reg_Write_nHSE for ADDI", reg_wr, 0); OpCode = 0;
    ctc2(4, 32'hF);            // all threads enabled
    ctc2(10, 0);               // interrupt 2 -> thread 0
    ctc2(9, 2);                // interrupt 1 -> thread 2
    ctc2(11, 1);               // interrupt 3 -> thread 1
    read_ctl(4, v); chk("cr0MSTOP", v, 32'hF);
    read_ctl(9, v); chk("grINT_ID1", v, 2);
    read_swc2(4, v); chk("SWC2 reads cr0MSTOP", v, 32'hF);
    read_swc2(9, v); chk("SWC2 reads grINT_ID1", v, 2);
    lwc2(2, 32'h0012_3456); read_ctl(2, v); chk("LWC2 writes crEPR0", v, 32'h0012_3456);
    read_swc2(2, v); chk("SWC2 reads crEPR0", v, 32'h0012_3456);
    lwc2(2, 32'h0);
    // thread 0 waits for an interrupt event
    ctc2(0, 32'h10);
    wait_sel(1, 5, n); chk("wait hands over to thread 1", {en, 1'b0, tsel}, 4'b1001);
    chk("switch time after wait (FSM, then select)", n, 2);
    // interrupt 2 for thread 0 while the switch is inhibited
    inhibit = 1; ext[2] = 1; tick(6);
    chk("inhibited: thread 1 keeps the pipeline", {en, 1'b0, tsel}, 4'b1001);
    chk("event captured in crEV0", dut.crEV[0][4], 1);
    inhibit = 0;
    wait_sel(0, 5, n); chk("switch after inhibit released", {en, 1'b0, tsel}, 4'b1000);
    checks++; if (n > 2) begin failures++; $display("FAIL release to switch %0d clocks", n); end
    tick(2);
    chk("trap cell loaded once", pc_loads, 1); chk("trap cell of interrupt 2", last_vec, VB + 2 * VS);
    chk("run bit crEV0", dut.crEV[0][7], 1); chk("run bit crTR0", dut.crTR[0][7], 1);
    ext = 0;
    // interrupt 0 (also thread 0) while the first is served: must wait
    tick(); ext[0] = 1; tick(5);
    chk("second interrupt held during service", pc_loads, 1);
    ctc2(0, 32'h10);          // end of service, keep interrupts validated
    tick(4);
    chk("second interrupt taken after service", pc_loads, 2); chk("trap cell of interrupt 0", last_vec, VB);
    ext = 0;
    lwc2(0, 32'h0);           // end of service by LWC2, stop
    chk("LWC2 end of service clears the run bit", dut.crEV[0][7], 0);
    wait_sel(1, 5, n); chk("back to thread 1", {en, 1'b0, tsel}, 4'b1001);
    // thread 1: mutex event of higher priority blocks the interrupt
    ctc2(2, (32'd3 << 12) | (32'd1 << 15));   // int prio 3, mutex prio 1
    ctc2(0, 32'hB0);                          // run, mutex, interrupt validated
    ctc2(1, 32'hA0);                          // mutex pending
    loads0 = pc_loads;
    ext[3] = 1; tick(8);
    chk("blocked by mutex priority", pc_loads, loads0);
    chk("interrupt pending in crEV1", dut.crEV[1][4], 1);
    ctc2(1, 32'h90);                          // mutex served
    tick(3);
    chk("taken once mutex cleared", pc_loads, loads0 + 1); chk("trap cell of interrupt 3", last_vec, VB + 3 * VS);
    ext = 0;
    ctc2(0, 32'h0);
    wait_sel(2, 5, n); chk("thread 2 next", {en, 1'b0, tsel}, 4'b1010);
    // thread 2 waits for a time event in 12 clocks
    mtc2(1, 12);
    ctc2(0, 32'h01);
    wait_sel(3, 5, n); chk("thread 3 next", {en, 1'b0, tsel}, 4'b1011);
    ctc2(0, 32'h10);                          // thread 3 waits for interrupts
    tick(2);
    chk("FSM_WAIT: pipeline disabled", {en, fsm_run}, 2'b00);
    wait_sel(2, 20, n); chk("time event wakes thread 2", {en, 1'b0, tsel}, 4'b1010);
    chk("time event bit", dut.crEV[2][0], 1);
    ctc2(9, 3);                               // interrupt 1 -> thread 3
    ctc2(0, 32'h0);
    tick(3);
    chk("idle again", en, 0);
    ext[1] = 1; n = 0;
    while (!(en && tsel == 2'd3) && n < 10) begin tick(); n++; end
    chk("response time from FSM_WAIT (clocks)", n, 3);
    tick(2);
    chk("trap cell of interrupt 1", last_vec, VB + 1 * VS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
