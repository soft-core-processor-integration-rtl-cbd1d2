// tb_cop0: directed test of coprocessor 0: MTC0/MFC0 of Status and EPC,
// syscall in ID (flushes, EPC, ExcCode, EXL), delay-slot EPC with Cause.BD,
// priority of a MEM address error over an EX overflow (BadVAddr), no
// exception while the memory stage waits, ERET, masked and unmasked
// hardware interrupts, NMI, separate register sets per thread, and user
// mode: a COP0 instruction there raises Coprocessor Unusable unless CU0 is
// set, and is allowed again once EXL is set; Status.RE reverses the byte
// order only in user mode.
module tb_cop0;
  localparam int N = 4;
  localparam logic [31:0] VEC = 32'h2000;
  logic clock = 0, reset = 1, en = 1, allowed = 1, mtc0 = 0, eret = 0, nmi = 0;
  logic [1:0] sel = 0;
  logic [4:0] rd = 0, ints = 0;
  logic [31:0] reg_in = 0, reg_out, exc_pc;
  logic c0 = 0, re;
  logic id_valid = 0, sys = 0, bp = 0, ri = 0, id_adel = 0, id_bds = 0;
  logic ex_ov = 0, ex_bds = 0, m_adel = 0, m_ades = 0, m_tr = 0, m_bds = 0;
  logic [31:0] id_pc = 0, ex_pc = 0, m_pc = 0, m_bad = 0;
  logic ifl, idf, exf, mf, pcsel, taken;
  logic [7:0] ip;
  int checks = 0, failures = 0;

  cop0 #(.NTHREADS(N), .EXC_VECTOR(VEC)) dut (
    .clock, .reset, .nHSE_Task_Select(sel), .nHSE_EN_sCPUi(en), .exc_allowed(allowed),
    .rd, .mtc0, .reg_in, .reg_out, .id_eret(eret), .Interrupts(ints), .NMI(nmi),
    .id_valid, .id_exc_sys(sys), .id_exc_bp(bp), .id_exc_ri(ri), .id_cop0(c0), .id_exc_adel(id_adel),
    .id_restart_pc(id_pc), .id_is_bds(id_bds), .ex_exc_ov(ex_ov), .ex_restart_pc(ex_pc),
    .ex_is_bds(ex_bds), .m_exc_adel(m_adel), .m_exc_ades(m_ades), .m_exc_tr(m_tr),
    .m_restart_pc(m_pc), .m_is_bds(m_bds), .m_bad_addr(m_bad),
    .if_exc_flush(ifl), .id_exc_flush(idf), .ex_exc_flush(exf), .m_exc_flush(mf),
    .exc_pc_sel(pcsel), .exc_pc_out(exc_pc), .IP(ip), .reverse_endian(re), .exc_taken(taken));

  always #5 clock = ~clock;
  initial begin repeat (2000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask
  task automatic tick(); @(posedge clock); #1; endtask
  task automatic read(int r, output logic [31:0] v); rd = 5'(r); #1 v = reg_out; endtask
  task automatic write(int r, logic [31:0] v);
    rd = 5'(r); reg_in = v; mtc0 = 1; c0 = 1; id_valid = 1; tick(); mtc0 = 0; c0 = 0; id_valid = 0;
  endtask
  task automatic clear_eret_exl(); eret = 1; id_valid = 1; tick(); eret = 0; id_valid = 0; endtask

  logic [31:0] v;
  initial begin
    tick(); reset = 0;
    write(12, 32'h0000_0401);                // IE, IM[2]
    read(12, v); chk("status", v, 32'h0000_0401);
    // syscall in ID
    id_valid = 1; sys = 1; id_pc = 32'h0000_0440; #1;
    chk("sys flushes", {ifl, idf, exf, mf, pcsel, taken}, 6'b110011); chk("vector", exc_pc, VEC);
    tick(); sys = 0; id_valid = 0;
    read(14, v); chk("EPC sys", v, 32'h440);
    read(13, v); chk("ExcCode sys", v[6:2], 8); chk("BD sys", v[31], 0);
    read(12, v); chk("EXL set", v[1], 1);
    // ERET returns to EPC and clears EXL
    eret = 1; id_valid = 1; #1; chk("eret target", exc_pc, 32'h440); chk("eret flush", {ifl, idf, pcsel}, 3'b101);
    tick(); eret = 0; id_valid = 0;
    read(12, v); chk("EXL cleared", v[1], 0);
    // break in a delay slot
    id_valid = 1; bp = 1; id_bds = 1; id_pc = 32'h0000_0504; tick(); bp = 0; id_bds = 0; id_valid = 0;
    read(14, v); chk("EPC bds", v, 32'h500);
    read(13, v); chk("ExcCode bp", v[6:2], 9); chk("BD set", v[31], 1);
    clear_eret_exl();
    // MEM address error beats EX overflow
    ex_ov = 1; ex_pc = 32'h600; m_ades = 1; m_pc = 32'h5FC; m_bad = 32'h1234_5677; #1;
    chk("mem wins flushes", {ifl, idf, exf, mf}, 4'b1111);
    tick(); ex_ov = 0; m_ades = 0;
    read(14, v); chk("EPC ades", v, 32'h5FC);
    read(13, v); chk("ExcCode ades", v[6:2], 5);
    read(8, v); chk("BadVAddr", v, 32'h1234_5677);
    clear_eret_exl();
    // overflow alone: EX and younger flushed, MEM kept
    ex_ov = 1; #1; chk("ov flushes", {ifl, idf, exf, mf}, 4'b1110);
    tick(); ex_ov = 0; read(13, v); chk("ExcCode ov", v[6:2], 12);
    clear_eret_exl();
    // nothing while the memory stage waits
    allowed = 0; m_tr = 1; #1; chk("held while memory waits", {taken, pcsel}, 2'b00);
    allowed = 1; #1; chk("trap taken", taken, 1); tick(); m_tr = 0;
    read(13, v); chk("ExcCode tr", v[6:2], 13);
    // interrupts: masked while EXL=1, taken after ERET
    ints = 5'b00001; id_valid = 1; #1; chk("IP[2]", ip[2], 1); chk("masked by EXL", taken, 0);
    eret = 1; tick(); eret = 0; #1;
    chk("interrupt taken", taken, 1); tick(); id_valid = 0;
    read(13, v); chk("ExcCode int", v[6:2], 0);
    read(14, v); chk("EPC int", v, 32'h504);
    clear_eret_exl();
    ints = 5'b00010; id_valid = 1; #1; chk("IM blocks IP[3]", taken, 0);
    ints = 0; write(12, 32'h0); nmi = 1; id_valid = 1; #1; chk("NMI ignores IE", taken, 1);
    nmi = 0; id_valid = 0; #1;
    // thread 1 has its own registers
    sel = 1; read(14, v); chk("thread 1 EPC untouched", v, 0);
    read(12, v); chk("thread 1 status untouched", v, 0);
    sel = 0; read(14, v); chk("thread 0 EPC kept", v, 32'h504);
    // user mode (thread 2)
    sel = 2; write(12, 32'h10);
    read(12, v); chk("UM set from kernel mode", v, 32'h10);
    rd = 12; reg_in = 0; mtc0 = 1; c0 = 1; id_valid = 1; id_pc = 32'h900; #1;
    chk("MTC0 in user mode raises an exception", taken, 1);
    tick(); mtc0 = 0; c0 = 0; id_valid = 0;
    read(13, v); chk("ExcCode CpU", v[6:2], 11); chk("CE = 0", v[29:28], 0);
    read(12, v); chk("user-mode MTC0 did not write", v, 32'h12);
    write(12, 32'h1000_0010);                // in the handler (EXL=1): kernel
    read(12, v); chk("kernel write with EXL set", v, 32'h1000_0010);
    c0 = 1; id_valid = 1; #1; chk("CU0 allows COP0 in user mode", taken, 0);
    c0 = 0; id_valid = 0; chk("big-endian without RE", re, 0);
    write(12, 32'h1200_0010); chk("RE in user mode reverses", re, 1);
    write(12, 32'h0200_0000); chk("RE ignored in kernel mode", re, 0);
    write(12, 32'h0);
    read(12, v); chk("back to kernel", v, 0);
    sel = 0;
    // pipeline disabled: no update
    en = 0; id_valid = 1; sys = 1; id_pc = 32'h777; tick(); sys = 0; id_valid = 0; en = 1;
    read(14, v); chk("no update while disabled", v, 32'h504);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
