// hazard_control: hazard detection and data forwarding (HazardControl).
//
// Combinational. Looks at the source registers of the instructions in ID and
// EX and the destination registers of the instructions in EX, MEM and WB of
// the running thread (all pipeline registers are the selected thread's copy,
// so hazards are only ever checked inside one thread) and produces:
//  * forwarding selects for the two ID operands (IDRsFwd/IDRtFwd: 0 register
//    file, 1 MEM-stage ALU result, 2 write-back data), for the two EX operands
//    (EXRsFwd/EXRtFwd, same coding) and for the store data in MEM
//    (MWriteDataFwdSel: 1 takes the write-back data);
//  * ID_Stall when an operand cannot be forwarded yet: a branch/jump register
//    or a coprocessor write needs a value still being computed in EX or still
//    being loaded in MEM, or an EX-stage user follows a load directly, or a
//    COP2 access (id_cop2_wait) must let an LWC2 ahead of it finish writing
//    its scheduler register;
//  * IF/EX/MEM/WB stall lines: a data-memory wait (M_Stall_Controller) holds
//    IF through MEM; an instruction-memory wait holds only the PC.
// The stage-by-stage stall structure and the forwarding sources follow the
// original datapath drawings; the exact stall equations are this design's own.
module hazard_control (
  // decode stage
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       id_want_rs_by_id,
  input  logic       id_want_rt_by_id,
  input  logic       id_need_rs_by_ex,
  input  logic       id_need_rt_by_ex,
  input  logic       id_mem_write,
  // execute stage
  input  logic [4:0] ex_rs,
  input  logic [4:0] ex_rt,
  input  logic [4:0] ex_rt_rd,
  input  logic       ex_reg_write,
  input  logic       ex_mem_read,
  // memory stage
  input  logic [4:0] m_rt,
  input  logic [4:0] m_rt_rd,
  input  logic       m_reg_write,
  input  logic       m_mem_read,
  // write-back stage
  input  logic [4:0] wb_rt_rd,
  input  logic       wb_reg_write,
  // memory handshakes
  input  logic       instmem_ready,
  input  logic       m_stall_controller,
  input  logic       id_cop2_wait,
  // outputs
  output logic [1:0] id_rs_fwd_sel,
  output logic [1:0] id_rt_fwd_sel,
  output logic [1:0] ex_rs_fwd_sel,
  output logic [1:0] ex_rt_fwd_sel,
  output logic       m_write_data_fwd_sel,
  output logic       if_stall,
  output logic       id_stall,
  output logic       ex_stall,
  output logic       m_stall,
  output logic       wb_stall,
  output logic       if_bubble
);
  function automatic logic hit(logic [4:0] src, logic [4:0] dst, logic wr);
    return wr && (dst != 5'd0) && (dst == src);
  endfunction

  logic stall_rs_id, stall_rt_id, stall_rs_ex, stall_rt_ex;

  always_comb begin
    // decode-stage forwarding: only finished ALU results (MEM) and WB data
    id_rs_fwd_sel = 2'd0;
    if (hit(id_rs, m_rt_rd, m_reg_write) && !m_mem_read) id_rs_fwd_sel = 2'd1;
    else if (hit(id_rs, wb_rt_rd, wb_reg_write))         id_rs_fwd_sel = 2'd2;
    id_rt_fwd_sel = 2'd0;
    if (hit(id_rt, m_rt_rd, m_reg_write) && !m_mem_read) id_rt_fwd_sel = 2'd1;
    else if (hit(id_rt, wb_rt_rd, wb_reg_write))         id_rt_fwd_sel = 2'd2;

    // execute-stage forwarding
    ex_rs_fwd_sel = 2'd0;
    if (hit(ex_rs, m_rt_rd, m_reg_write) && !m_mem_read) ex_rs_fwd_sel = 2'd1;
    else if (hit(ex_rs, wb_rt_rd, wb_reg_write))         ex_rs_fwd_sel = 2'd2;
    ex_rt_fwd_sel = 2'd0;
    if (hit(ex_rt, m_rt_rd, m_reg_write) && !m_mem_read) ex_rt_fwd_sel = 2'd1;
    else if (hit(ex_rt, wb_rt_rd, wb_reg_write))         ex_rt_fwd_sel = 2'd2;

    // store data in MEM that a load ahead of it has just produced
    m_write_data_fwd_sel = hit(m_rt, wb_rt_rd, wb_reg_write);

    // stalls in ID
    stall_rs_id = id_want_rs_by_id &&
                  (hit(id_rs, ex_rt_rd, ex_reg_write) || (hit(id_rs, m_rt_rd, m_reg_write) && m_mem_read));
    stall_rt_id = id_want_rt_by_id &&
                  (hit(id_rt, ex_rt_rd, ex_reg_write) || (hit(id_rt, m_rt_rd, m_reg_write) && m_mem_read));
    stall_rs_ex = id_need_rs_by_ex && ex_mem_read && hit(id_rs, ex_rt_rd, ex_reg_write);
    stall_rt_ex = id_need_rt_by_ex && !id_mem_write && ex_mem_read && hit(id_rt, ex_rt_rd, ex_reg_write);

    id_stall  = stall_rs_id || stall_rt_id || stall_rs_ex || stall_rt_ex || id_cop2_wait
                || m_stall_controller;
    ex_stall  = m_stall_controller;
    m_stall   = m_stall_controller;
    wb_stall  = 1'b0;
    if_stall  = id_stall || !instmem_ready;
    if_bubble = !instmem_ready && !id_stall;
  end
endmodule
