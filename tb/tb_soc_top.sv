// tb_soc_top: end-to-end test of the SoC at its default size (4 hardware
// threads, 592 KiB memory).
//
// Loads one program per thread plus two interrupt trap cells and the common
// exception handler into the on-chip memory, releases reset and lets the
// hardware scheduler run them:
//  * thread 0 enables the other threads, attaches external interrupt 1 to
//    thread 1 and waits for an interrupt event; its trap cell for interrupt 0
//    is the LED sequence of the published test program (machine code taken
//    verbatim) and ends with the "wait" move to crTR;
//  * thread 1 sums 1..60 in a loop (branch-operand stalls, forwarding) and
//    reads a slow device on the external I/O bus in every pass, then
//    stores, loads and uses the sum (load-use stall) and waits for
//    interrupt 1, whose trap cell stores a marker;
//  * thread 2 enters user mode (its next MFC0 raises Coprocessor Unusable),
//    takes a SYSCALL and an overflow exception through the shared handler, multiplies and divides through HI/LO, increments a word with
//    LL/SC (and checks that an SC without LL fails), stores and loads
//    scheduler registers with SWC2/LWC2 (COP2 reads right behind an LWC2
//    must wait for it), merges unaligned words with LWL/LWR/SWL/SWR, then waits for a time event from its mrTEV counter;
//  * thread 3 runs the published thread-3 sequence (scheduler-register moves,
//    verbatim machine code) and ends in the wait instruction.
// External interrupt 0 is raised while thread 1 waits for the I/O device, so
// the switch to thread 0 must be held off until the access completes; thread
// 1 must still finish with the right sum. External interrupt 1 later wakes
// the idle processor; its response time from the interrupt edge to thread 1
// owning the pipeline is checked (at most three clocks: capture, FSM,
// select). Every mechanism is counted and must occur at least once.
module tb_soc_top;
  import mips_asm_pkg::*;

  logic        clock = 1'b0;
  logic        reset_n = 1'b0;
  logic [7:0]  Switch = 8'h5A;
  logic [14:0] LED;
  logic [3:0]  ExtIntEv = 4'h0;
  logic [4:0]  MIPS32_Interrupts = 5'h0;
  logic        MIPS32_NMI = 1'b0;
  logic [25:0] io_address;
  logic [31:0] io_wdata, io_rdata = 32'h0;
  logic        io_re, io_ack = 1'b0;
  logic [3:0]  io_we;
  logic [7:0]  MIPS32_IP;
  logic [1:0]  nHSE_Task_Select;
  logic        nHSE_EN_sCPUi;

  soc_top dut (.*);

  always #15 clock = ~clock;   // 33 MHz

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ program
  task automatic put(int byte_addr, logic [31:0] w);
    dut.u_mem.mem[byte_addr >> 2] = w;
  endtask
  task automatic put_seq(int byte_addr, logic [31:0] ws[$]);
    foreach (ws[i]) put(byte_addr + 4 * i, ws[i]);
  endtask
  // tail every thread ends in: three delay nops, then spin
  function automatic void tail(ref logic [31:0] q[$], input int at);
    q.push_back(nop()); q.push_back(nop()); q.push_back(nop());
    q.push_back(j(at + 4 * q.size())); q.push_back(nop());
  endfunction

  localparam int N_SUM = 60;

  task automatic load_program();
    logic [31:0] q[$];
    for (int i = 0; i < 151552; i++) dut.u_mem.mem[i] = 32'h0;
    // thread 0 (0x0000)
    q = {addi(1, 0, 'hF), ctc2(1, 4), addi(2, 0, 1), ctc2(2, 9), addi(1, 0, 'h10), ctc2(1, 0)};
    tail(q, 'h0000); put_seq('h0000, q);
    // thread 0, trap cell of interrupt 0 (0x1000): the published program, verbatim
    q = {32'h20010000, 32'h200E0003, 32'h000E7780, 32'h200C00F0, 32'hADCC0000, 32'h48C10000};
    tail(q, 'h1000); put_seq('h1000, q);
    // thread 1 (0x0400)
    q = {addi(3, 0, 0), addi(4, 0, N_SUM), addi(7, 0, 'h3000),
         lui(13, 'hE000), addi(15, 0, 0),
         add(3, 3, 4), lw(12, 0, 13), addi(4, 4, -1), add(15, 15, 12), bne(4, 0, -5), nop(),
         sw(3, 0, 7), lw(8, 0, 7), addi(9, 8, 1), sw(9, 4, 7),
         lbu(10, 3, 7), lb(11, 2, 7), sh_(9, 'hC, 7),
         addi(1, 0, 'h10), ctc2(1, 0)};
    tail(q, 'h0400); put_seq('h0400, q);
    // thread 1, trap cell of interrupt 1 (0x1040)
    q = {addi(11, 0, 'h55), sw(11, 8, 7), ctc2(0, 0)};
    tail(q, 'h1040); put_seq('h1040, q);
    // thread 2 (0x0800)
    q = {// user mode: the MFC0 after it raises Coprocessor Unusable and is skipped
         addi(18, 0, 'h55), addi(16, 0, 'h10), mtc0(16, 12), mfc0(18, 12),
         addi(5, 0, 7), syscall(), addi(5, 5, 1), lui(6, 'h7FFF), ori(6, 6, 'hFFFF),
         add(7, 6, 6), addi(20, 0, 'h3000), sw(5, 'h10, 20),
         // multiply and divide through HI/LO
         addi(24, 0, -7), addi(25, 0, 3), mult(24, 25), mflo(26), mfhi(27),
         sw(26, 'h18, 20), sw(27, 'h1C, 20),
         div(24, 25), mflo(26), mfhi(27), sw(26, 'h20, 20), sw(27, 'h24, 20),
         multu(24, 25), mfhi(26), sw(26, 'h2C, 20), mthi(25), mfhi(26), sw(26, 'h30, 20),
         // atomic increment with LL/SC, then an SC without LL that must fail
         ll(28, 'h10, 20), addi(28, 28, 100), sc(28, 'h10, 20), sw(28, 'h28, 20),
         addi(29, 0, 5), sc(29, 'h34, 20), sw(29, 'h38, 20),
         // scheduler registers through memory: SWC2 crTR, LWC2 crEPR followed
         // at once by COP2 reads that must wait for it, then restore crEPR
         swc2(0, 'h3C, 20), lwc2(2, 'h10, 20), cfc2(30, 2), sw(30, 'h40, 20),
         lwc2(2, 'h3C, 20), swc2(2, 'h44, 20), lwc2(2, 'h48, 20),
         // unaligned word parts: LWL then LWR into the same register, SWL/SWR
         lui(16, 'h1122), ori(16, 16, 'h3344), sw(16, 'h4C, 20), addi(17, 0, -1),
         lwl(17, 'h4D, 20), sw(17, 'h50, 20), lwr(17, 'h4D, 20), sw(17, 'h54, 20),
         swl(16, 'h5A, 20), swr(16, 'h5D, 20),
         addi(21, 0, 20), addi(22, 0, 1), mtc2(21, 1), ctc2(22, 0),
         nop(), nop(), addi(23, 0, 'h77), sw(23, 'h14, 20), ctc2(0, 0)};
    tail(q, 'h0800); put_seq('h0800, q);
    // thread 3 (0x0C00): the published thread-3 sequence, verbatim
    q = {32'h48060000, 32'h48020000, 32'h20010071, 32'h24420001, 32'h48430001,
         32'h20010011, 32'h48C10000};
    tail(q, 'h0C00); put_seq('h0C00, q);
    // exception handler (0x2000): skip the faulting instruction
    q = {mfc0(26, 14), addiu(26, 26, 4), mtc0(26, 14), eret(), nop()};
    put_seq('h2000, q);
  endtask

  // ------------------------------------------------------------ monitors
  int n_switch = 0, n_irq_accept = 0, n_id_stall = 0, n_fwd = 0, n_mstall = 0;
  int n_cpu = 0;
  int n_muldiv = 0, n_llsc = 0, n_cop2_wait = 0;
  int n_inhibit = 0, n_exc = 0, n_eret = 0, n_wait = 0, n_time_ev = 0, n_idfwd = 0;
  int cycle = 0;
  logic [1:0] last_sel = '0;
  logic last_en = 1'b0, last_tev = 1'b0;

  always @(posedge clock) if (reset_n) begin
    cycle <= cycle + 1;
    if (nHSE_EN_sCPUi && last_en && nHSE_Task_Select != last_sel) n_switch++;
    last_sel <= nHSE_Task_Select;
    last_en  <= nHSE_EN_sCPUi;
    if (dut.u_cpu.pc_nhse_sel) n_irq_accept++;
    if (nHSE_EN_sCPUi && dut.u_cpu.id_stall && !dut.u_cpu.m_stall) n_id_stall++;
    if (nHSE_EN_sCPUi && (dut.u_cpu.ex_rs_fwd_sel != 0 || dut.u_cpu.ex_rt_fwd_sel != 0)) n_fwd++;
    if (nHSE_EN_sCPUi && (dut.u_cpu.id_rs_fwd_sel != 0 || dut.u_cpu.id_rt_fwd_sel != 0)) n_idfwd++;
    if (nHSE_EN_sCPUi && dut.u_cpu.m_stall) n_mstall++;
    if (dut.u_cpu.u_nhse.nHSE_inhibit_CC && dut.u_cpu.u_nhse.nHSE_ready[0] &&
        dut.u_cpu.u_nhse.nHSE_FSM_id != 0) n_inhibit++;
    if (nHSE_EN_sCPUi && dut.u_cpu.exc_taken) n_exc++;
    if (nHSE_EN_sCPUi && dut.u_cpu.exc_taken && dut.u_cpu.u_cop0.code == 5'd11) n_cpu++;
    if (nHSE_EN_sCPUi && dut.u_cpu.u_muldiv.write_en &&
        dut.u_cpu.ex_ctrl.alu_op inside {nmpra_pkg::ALU_MULT, nmpra_pkg::ALU_MULTU, nmpra_pkg::ALU_DIV, nmpra_pkg::ALU_DIVU}) n_muldiv++;
    if (nHSE_EN_sCPUi && dut.u_cpu.ll_ok && dut.u_cpu.inhibit_cc) n_llsc++;
    if (nHSE_EN_sCPUi && dut.u_cpu.id_cop2_wait) n_cop2_wait++;
    if (nHSE_EN_sCPUi && dut.u_cpu.id_ctrl.eret && dut.u_cpu.exc_pc_sel) n_eret++;
    if (cycle > 5 && !nHSE_EN_sCPUi) n_wait++;
    if (dut.u_cpu.u_nhse.crEV[2][0] && !last_tev) n_time_ev++;
    last_tev <= dut.u_cpu.u_nhse.crEV[2][0];
  end

  // external I/O device: answers 1 after four clocks
  int io_wait = 0;
  always @(posedge clock) begin
    io_ack <= 1'b0;
    if (io_re && !io_ack) begin
      io_wait <= io_wait + 1;
      if (io_wait == 3) begin io_ack <= 1'b1; io_rdata <= 32'd1; io_wait <= 0; end
    end
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] word(int byte_addr);
    return dut.u_mem.mem[byte_addr >> 2];
  endfunction

  int lat;
  initial begin
    #1 load_program();   // after the memory clears itself at time zero
    repeat (3) @(posedge clock);
    #1 reset_n = 1'b1;
    // wait until thread 1 is in its loop and waiting for the device
    wait (nHSE_EN_sCPUi && nHSE_Task_Select == 2'd1);
    repeat (40) @(posedge clock);
    wait (io_re);
    @(posedge clock); #1;
    check("thread 1 still running before interrupt", {30'h0, nHSE_Task_Select}, 32'd1);
    ExtIntEv[0] = 1'b1;
    lat = 0;
    while (!(nHSE_EN_sCPUi && nHSE_Task_Select == 2'd0) && lat < 20) begin
      @(posedge clock); #1; lat++;
      if (dut.u_cpu.pc_nhse_sel) check("trap cell of interrupt 0", dut.u_cpu.pc_nhse_out, 32'h1000);
    end
    $display("interrupt 0 response (held by the I/O access): %0d clocks", lat);
    checks++; if (lat <= 3 || lat >= 20) begin failures++; $display("FAIL switch not held off by the access"); end
    ExtIntEv[0] = 1'b0;
    // everything runs to its wait state
    wait (cycle > 800 && !nHSE_EN_sCPUi);
    repeat (5) @(posedge clock);
    check("LED register (published program)", {18'h0, LED[13:0]}, 32'hF0);
    check("thread 0 r14", dut.u_cpu.u_rf.regs[0][14], 32'hC000_0000);
    check("thread 1 sum", word('h3000), 32'(N_SUM * (N_SUM + 1) / 2));
    check("thread 1 load-use", word('h3004), 32'(N_SUM * (N_SUM + 1) / 2 + 1));
    check("thread 1 lbu", dut.u_cpu.u_rf.regs[1][10], 32'(N_SUM * (N_SUM + 1) / 2) & 32'hFF);
    check("thread 1 lb", dut.u_cpu.u_rf.regs[1][11], 32'((N_SUM * (N_SUM + 1) / 2) >> 8) & 32'hFF);
    check("thread 1 sh", word('h300C), 32'(N_SUM * (N_SUM + 1) / 2 + 1) << 16);
    check("thread 2 after syscall and LL/SC increment", word('h3010), 32'd108);
    check("thread 2 mult lo", word('h3018), 32'hFFFF_FFEB);
    check("thread 2 mult hi", word('h301C), 32'hFFFF_FFFF);
    check("thread 2 div quotient", word('h3020), 32'hFFFF_FFFE);
    check("thread 2 div remainder", word('h3024), 32'hFFFF_FFFF);
    check("thread 2 multu hi", word('h302C), 32'h0000_0002);
    check("thread 2 mthi", word('h3030), 32'h3);
    check("thread 2 SC success flag", word('h3028), 32'h1);
    check("thread 2 SC without LL stores nothing", word('h3034), 32'h0);
    check("thread 2 SC without LL fails", word('h3038), 32'h0);
    check("thread 2 SWC2 crTR", word('h303C), 32'h80);
    check("thread 2 LWC2 then CFC2", word('h3040), 32'd108);
    check("thread 2 LWC2 then SWC2", word('h3044), 32'h80);
    check("thread 2 crEPR restored by LWC2", dut.u_cpu.u_nhse.crEPR[2], 32'h0);
    checks++; if (n_cop2_wait == 0) begin failures++; $display("FAIL no COP2 wait behind LWC2"); end
    check("thread 2 user-mode MFC0 skipped", dut.u_cpu.u_rf.regs[2][18], 32'h55);
    check("thread 2 still in user mode", {31'h0, dut.u_cpu.u_cop0.status[2][4]}, 32'h1);
    check("thread 2 LWL", word('h3050), 32'h2233_44FF);
    check("thread 2 LWR", word('h3054), 32'h2233_1122);
    check("thread 2 SWL", word('h3058), 32'h0000_1122);
    check("thread 2 SWR", word('h305C), 32'h3344_0000);
    check("thread 2 overflow suppressed", dut.u_cpu.u_rf.regs[2][7], 32'h0);
    check("thread 2 overflow operand", dut.u_cpu.u_rf.regs[2][6], 32'h7FFF_FFFF);
    check("thread 2 ExcCode Ov", {27'h0, dut.u_cpu.u_cop0.cause[2][6:2]}, 32'd12);
    check("thread 2 after time event", word('h3014), 32'h77);
    check("thread 3 r1", dut.u_cpu.u_rf.regs[3][1], 32'h11);
    check("thread 3 crEV", dut.u_cpu.u_rf.regs[3][3], 32'h80);
    check("thread 3 run counter step", dut.u_cpu.u_rf.regs[3][2], dut.u_cpu.u_rf.regs[3][6] + 32'd2);
    check("thread 3 crTR", dut.u_cpu.u_nhse.crTR[3], 32'h11);
    check("thread 1 handler not yet run", word('h3008), 32'h0);
    check("thread 1 device reads", dut.u_cpu.u_rf.regs[1][15], 32'(N_SUM));
    // interrupt 1 wakes thread 1
    @(posedge clock); #1;
    ExtIntEv[1] = 1'b1;
    lat = 0;
    while (!(nHSE_EN_sCPUi && nHSE_Task_Select == 2'd1) && lat < 20) begin
      @(posedge clock); #1; lat++;
      if (dut.u_cpu.pc_nhse_sel) check("trap cell of interrupt 1", dut.u_cpu.pc_nhse_out, 32'h1040);
    end
    $display("interrupt 1 response: %0d clocks", lat);
    checks++; if (lat > 3) begin failures++; $display("FAIL response %0d clocks > 3", lat); end
    repeat (60) @(posedge clock);
    check("thread 1 interrupt handler", word('h3008), 32'h55);
    check("all threads waiting", {31'h0, nHSE_EN_sCPUi}, 32'h0);
    // every mechanism happened
    $display("switches=%0d irq=%0d id_stall=%0d ex_fwd=%0d id_fwd=%0d m_stall=%0d inhibit=%0d exc=%0d eret=%0d wait=%0d time_ev=%0d muldiv=%0d llsc_hold=%0d cop2_wait=%0d",
             n_switch, n_irq_accept, n_id_stall, n_fwd, n_idfwd, n_mstall, n_inhibit, n_exc, n_eret, n_wait, n_time_ev, n_muldiv, n_llsc, n_cop2_wait);
    checks++; if (n_muldiv != 3)    begin failures++; $display("FAIL multiply/divide operations %0d", n_muldiv); end
    checks++; if (n_llsc == 0)      begin failures++; $display("FAIL no LL/SC atomic hold"); end
    checks++; if (n_switch < 4)     begin failures++; $display("FAIL too few context switches"); end
    checks++; if (n_irq_accept != 2) begin failures++; $display("FAIL interrupt acceptances %0d", n_irq_accept); end
    checks++; if (n_id_stall == 0)  begin failures++; $display("FAIL no ID stall"); end
    checks++; if (n_fwd == 0)       begin failures++; $display("FAIL no EX forwarding"); end
    checks++; if (n_idfwd == 0)     begin failures++; $display("FAIL no ID forwarding"); end
    checks++; if (n_mstall == 0)    begin failures++; $display("FAIL no memory stall"); end
    checks++; if (n_inhibit == 0)   begin failures++; $display("FAIL switch never inhibited"); end
    checks++; if (n_exc != 3)       begin failures++; $display("FAIL exceptions %0d", n_exc); end
    checks++; if (n_cpu != 1)       begin failures++; $display("FAIL coprocessor-unusable exceptions %0d", n_cpu); end
    checks++; if (n_eret != 3)      begin failures++; $display("FAIL erets %0d", n_eret); end
    checks++; if (n_wait == 0)      begin failures++; $display("FAIL never FSM_WAIT"); end
    checks++; if (n_time_ev == 0)   begin failures++; $display("FAIL no time event"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
