// tb_hazard_control: directed cases (load-use, branch after ALU op, branch
// after load, store after load, memory wait, instruction wait, COP2 access
// behind an LWC2, r0) and
// random register patterns, all checked against the forwarding and stall
// rules of the pipeline written out here independently.
module tb_hazard_control;
  logic [4:0] id_rs, id_rt, ex_rs, ex_rt, ex_rt_rd, m_rt, m_rt_rd, wb_rt_rd;
  logic id_wrs, id_wrt, id_nrs, id_nrt, id_mw, ex_rw, ex_mr, m_rw, m_mr, wb_rw, im_ready, msc, cw;
  logic [1:0] idrs, idrt, exrs, exrt;
  logic mwd, if_stall, id_stall, ex_stall, m_stall, wb_stall, if_bubble;
  int checks = 0, failures = 0;

  hazard_control dut (
    .id_rs, .id_rt, .id_want_rs_by_id(id_wrs), .id_want_rt_by_id(id_wrt),
    .id_need_rs_by_ex(id_nrs), .id_need_rt_by_ex(id_nrt), .id_mem_write(id_mw),
    .ex_rs, .ex_rt, .ex_rt_rd, .ex_reg_write(ex_rw), .ex_mem_read(ex_mr),
    .m_rt, .m_rt_rd, .m_reg_write(m_rw), .m_mem_read(m_mr),
    .wb_rt_rd, .wb_reg_write(wb_rw), .instmem_ready(im_ready), .m_stall_controller(msc), .id_cop2_wait(cw),
    .id_rs_fwd_sel(idrs), .id_rt_fwd_sel(idrt), .ex_rs_fwd_sel(exrs), .ex_rt_fwd_sel(exrt),
    .m_write_data_fwd_sel(mwd), .if_stall, .id_stall, .ex_stall, .m_stall, .wb_stall, .if_bubble);

  function automatic logic [1:0] fwd(logic [4:0] s);
    if (s != 0 && m_rw && !m_mr && m_rt_rd == s) return 2'd1;
    if (s != 0 && wb_rw && wb_rt_rd == s) return 2'd2;
    return 2'd0;
  endfunction

  task automatic check_all(string tag);
    logic exp_stall;
    exp_stall = msc || cw;
    if (id_wrs && id_rs != 0 && ((ex_rw && ex_rt_rd == id_rs) || (m_rw && m_mr && m_rt_rd == id_rs))) exp_stall = 1;
    if (id_wrt && id_rt != 0 && ((ex_rw && ex_rt_rd == id_rt) || (m_rw && m_mr && m_rt_rd == id_rt))) exp_stall = 1;
    if (id_nrs && id_rs != 0 && ex_mr && ex_rw && ex_rt_rd == id_rs) exp_stall = 1;
    if (id_nrt && !id_mw && id_rt != 0 && ex_mr && ex_rw && ex_rt_rd == id_rt) exp_stall = 1;
    #1; checks++;
    if (idrs !== fwd(id_rs) || idrt !== fwd(id_rt) || exrs !== fwd(ex_rs) || exrt !== fwd(ex_rt) ||
        mwd !== (m_rt != 0 && wb_rw && wb_rt_rd == m_rt) || id_stall !== exp_stall ||
        ex_stall !== msc || m_stall !== msc || if_stall !== (exp_stall || !im_ready) ||
        if_bubble !== (!im_ready && !exp_stall) || wb_stall !== 1'b0) begin
      failures++;
      $display("FAIL %s: fwd %0d %0d %0d %0d m%b stall %b (exp %b)", tag, idrs, idrt, exrs, exrt, mwd, id_stall, exp_stall);
    end
  endtask

  task automatic clear();
    {id_rs, id_rt, ex_rs, ex_rt, ex_rt_rd, m_rt, m_rt_rd, wb_rt_rd} = '0;
    {id_wrs, id_wrt, id_nrs, id_nrt, id_mw, ex_rw, ex_mr, m_rw, m_mr, wb_rw, msc, cw} = '0;
    im_ready = 1;
  endtask

  initial begin
    // load-use: lw r5 in EX, add using r5 in ID -> stall
    clear(); id_rs = 5; id_nrs = 1; ex_rt_rd = 5; ex_rw = 1; ex_mr = 1; check_all("load-use");
    checks++; if (id_stall !== 1) begin failures++; $display("FAIL load-use not stalled"); end
    // the same with an ALU producer: no stall, EX forwarding next cycle
    clear(); id_rs = 5; id_nrs = 1; ex_rt_rd = 5; ex_rw = 1; check_all("alu-use");
    checks++; if (id_stall !== 0) begin failures++; $display("FAIL alu-use stalled"); end
    // branch needs the value an ALU op in EX produces -> stall
    clear(); id_rs = 4; id_wrs = 1; ex_rt_rd = 4; ex_rw = 1; check_all("branch-alu");
    checks++; if (id_stall !== 1) begin failures++; $display("FAIL branch-alu"); end
    // branch with the producer in MEM -> forward 1
    clear(); id_rs = 4; id_wrs = 1; m_rt_rd = 4; m_rw = 1; check_all("branch-mem");
    checks++; if (idrs !== 2'd1 || id_stall) begin failures++; $display("FAIL branch-mem"); end
    // branch with a load in MEM -> stall
    clear(); id_rt = 4; id_wrt = 1; m_rt_rd = 4; m_rw = 1; m_mr = 1; check_all("branch-load");
    checks++; if (id_stall !== 1) begin failures++; $display("FAIL branch-load"); end
    // store data right behind a load: no stall, MEM forwarding from WB
    clear(); id_rt = 6; id_nrt = 1; id_mw = 1; ex_rt_rd = 6; ex_rw = 1; ex_mr = 1; check_all("load-store");
    checks++; if (id_stall !== 0) begin failures++; $display("FAIL load-store stalled"); end
    clear(); m_rt = 6; wb_rt_rd = 6; wb_rw = 1; check_all("store-fwd");
    checks++; if (mwd !== 1) begin failures++; $display("FAIL store fwd"); end
    // r0 never forwards
    clear(); ex_rs = 0; m_rt_rd = 0; m_rw = 1; check_all("r0");
    // memory wait and instruction wait
    clear(); msc = 1; check_all("mwait");
    clear(); im_ready = 0; check_all("iwait");
    // COP2 access waiting for an LWC2 ahead of it
    clear(); cw = 1; check_all("cop2-wait");
    checks++; if (id_stall !== 1 || if_stall !== 1 || ex_stall !== 0) begin failures++; $display("FAIL cop2 wait"); end
    // random
    for (int k = 0; k < 5000; k++) begin
      {id_rs, id_rt, ex_rs, ex_rt, ex_rt_rd, m_rt, m_rt_rd, wb_rt_rd} = {8{$urandom}} & {8{5'b00011}};
      {id_wrs, id_wrt, id_nrs, id_nrt, id_mw, ex_rw, ex_mr, m_rw, m_mr, wb_rw} = 10'($urandom);
      msc = ($urandom_range(0, 7) == 0); cw = ($urandom_range(0, 7) == 0); im_ready = ($urandom_range(0, 7) != 0);
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
