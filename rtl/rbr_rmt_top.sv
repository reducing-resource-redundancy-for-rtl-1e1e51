// rbr_rmt_top: redundancy-reduction unit of a staggered redundant
// multithreading (RMT) core, with register bits reuse (RBR), ROB and LSB
// redundancy reduction, register value reuse (RVR) and load value buffer
// reduction (LVBR).
//
// Every instruction runs twice: a leading copy and, SLACK instructions
// later, a trailing copy. The results are compared at commit. This unit is
// the part of the core that decides which resources the trailing copy
// needs, using what the leading copy has already produced:
//   - leading dispatch (ld_*): a physical register from reg_usage, a
//     leading ROB entry, the leading map table;
//   - leading writeback (lwb_*): size check in the register file (narrow
//     results stored in 16 bits, size bit set in the ROB), the RVR CAM for
//     normal results, the value buffer, and the load value buffer for loads;
//   - trailing rename (tr_*), allowed by slack_ctrl, at the replica
//     pointer: the trailing copy gets the leading copy's register when its
//     result was narrow (TR_SHARED), the RVR candidate register when its
//     result already sat in another register (TR_REUSE), or a new register
//     (TR_OWN); it skips the trailing ROB section when its mapping equals
//     the leading copy's and the map bit is set, and always for control
//     instructions;
//   - trailing writeback (twb_*): upper half of a shared register with a
//     size check, or a whole register;
//   - commit (c_*): up to four ROB entries per cycle, all checks of
//     rbr_rob, release of previous mappings to reg_usage and the RVR CAM.
// Operand reads (rd_*) go through the map tables and the reconstruct stage.
// The load/store buffer (m_*) and the load value buffer (tl_*) are brought
// out as their own port groups; the core's issue queue, functional units
// and caches are outside this unit. One instruction per thread and cycle is
// accepted on each port; that and the port layout are this design's choices.
//
// Timing: every port is sampled on the rising clock edge; *_o handshake
// outputs (ld_fire_o, tr_fire_o, lwb_ready_o, tl_hit_o) are combinational
// in the same cycle, reads (rd_*) are combinational, commit results (c_*)
// are valid in the cycle the pairs retire.
//
// Deadlock avoidance. The document avoids a full resource with no trailing
// instruction in flight by squashing younger leading instructions; this
// unit has no squash, so it prevents the register case instead (this
// design's own choice): the leading thread only allocates while the free
// registers exceed the number of leading results whose trailing copy may
// still need a register of its own, plus three. A leading result that turns
// out narrow before its copy is renamed (lwb_repl clear) drops its
// reservation, since the copy will share the register. The load value
// buffer keeps its last entry for the oldest instruction in flight, and
// slack_ctrl's escape lets the trailing thread run when the leading one is
// stuck and nothing trailing is in flight. Squash and branch recovery are
// not modelled: a mispredict only clears the map bits.
module rbr_rmt_top
  import rbr_pkg::*;
#(
  parameter int NP     = NPREG,
  parameter int NA     = NARCH,
  parameter int NL     = ROB_LDG,
  parameter int NT     = ROB_TLG,
  parameter int NCAM   = CAM_N,
  parameter int NLVB   = LVB_N,
  parameter int NLB    = LB_LDG,
  parameter int NSB    = SB_LDG,
  parameter int NSBT   = SB_TLG,
  parameter int SLK    = SLACK,
  localparam int CW    = COMMIT_W,
  localparam int PW    = $clog2(NP),
  localparam int AW    = $clog2(NA),
  localparam int LW    = $clog2(NL),
  localparam int SI    = $clog2((NSB > NLB) ? NSB : NLB)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   mispredict,
  input  logic                   violate_en,
  input  logic                   drain,
  // leading dispatch
  input  logic                   ld_valid,
  input  logic                   ld_has_dest,
  input  logic [AW-1:0]          ld_arch,
  input  logic                   ld_ctrl,
  output logic                   ld_fire_o,
  output logic [LW-1:0]          ld_tag_o,
  output logic [PW-1:0]          ld_preg_o,
  // trailing rename
  input  logic                   tr_valid,
  input  logic                   tr_has_dest,
  input  logic [AW-1:0]          tr_arch,
  input  logic                   tr_ctrl,
  output logic                   tr_fire_o,
  output logic [LW-1:0]          tr_tag_o,      // tag = leading copy's ROB index
  output logic [PW-1:0]          tr_preg_o,
  output tr_alloc_t              tr_alloc_o,
  output logic                   tr_rob_shared_o,
  output logic [2:0]             slack_reason_o,
  // leading writeback
  input  logic                   lwb_valid,
  input  logic [LW-1:0]          lwb_tag,
  input  logic [XLEN-1:0]        lwb_value,
  input  logic                   lwb_is_load,
  input  logic                   lwb_fault,
  output logic                   lwb_ready_o,   // 0: load value buffer full, hold the writeback
  output logic                   lwb_narrow_o,
  output logic                   lwb_cam_hit_o,
  output logic                   lwb_lvb_skip_o,
  output logic                   lwb_lvb_ok_o,
  // trailing writeback
  input  logic                   twb_valid,
  input  logic [LW-1:0]          twb_tag,
  input  logic [XLEN-1:0]        twb_value,
  output logic                   twb_fault_o,
  // trailing load value lookup
  input  logic                   tl_valid,
  input  logic [PW-1:0]          tl_preg,       // leading load's register
  output logic                   tl_hit_o,
  output logic [XLEN-1:0]        tl_value_o,
  // operand reads
  input  logic [1:0]             rd_trailing,
  input  logic [1:0][AW-1:0]     rd_arch,
  output logic [1:0][XLEN-1:0]   rd_value_o,
  output logic [1:0]             rd_perr_o,
  // commit
  output logic [CW-1:0]          c_valid_o,
  output logic [CW-1:0]          c_fault_o,
  output logic [CW-1:0]          c_sep_o,
  output logic [CW-1:0][AW-1:0]  c_arch_o,
  output logic [CW-1:0][PW-1:0]  c_lpreg_o,
  output logic [CW-1:0][PW-1:0]  c_tpreg_o,
  output logic                   usage_perr_o,
  output logic [NP-1:0]          free_o,
  // load/store buffer
  input  logic                   m_ld_en,
  input  logic                   m_ld_store,
  output logic                   m_ld_ok_o,
  output logic [SI-1:0]          m_ld_idx_o,
  input  logic                   m_la_en,
  input  logic                   m_la_store,
  input  logic [SI-1:0]          m_la_idx,
  input  logic [XLEN-1:0]        m_la_addr,
  input  logic [XLEN-1:0]        m_la_val,
  input  logic                   m_td_en,
  input  logic                   m_td_store,
  input  logic                   m_td_two_src,
  output logic                   m_td_avail_o,
  output logic [1:0]             m_td_mode_o,
  output logic [SI-1:0]          m_td_idx_o,
  input  logic                   m_tb_en,
  input  logic                   m_tb_store,
  input  logic [SI-1:0]          m_tb_idx,
  input  logic [XLEN-1:0]        m_tb_addr,
  input  logic [XLEN-1:0]        m_tb_val,
  output logic                   m_tb_fault_o,
  input  logic                   m_c_load,
  input  logic                   m_c_store,
  output logic                   m_c_fault_o,
  output logic [$clog2(NSBT+1)-1:0] m_tsb_used_o,
  output logic [$clog2(NLVB+1)-1:0] lvb_used_o,
  output logic [$clog2(NT):0]    rob_tcount_o
);
  // ---------------- wires ----------------
  logic      tr_go;
  tr_alloc_t alloc;
  logic      rob_shared, needs_new;
  logic [PW-1:0] tpreg;
  logic          al_ok, at_ok, at_req;
  logic [PW-1:0] al_preg, at_preg;
  logic [NP-1:0] cand_valid;
  logic          st_en, cs_en, cc_en;
  logic [PW-1:0] st_preg, cs_preg, cc_preg;

  logic          d_ok;
  logic [LW-1:0] d_idx;
  logic [PW-1:0] lr_prev;

  logic          rp_valid, rp_has_dest, rp_size, rp_cand_v, ta_sep_ok;
  logic [LW-1:0] rp_idx;
  logic [PW-1:0] rp_preg, rp_prev, rp_cand_preg;
  logic [LW:0]   ndist, nrep, lcount;
  logic [PW-1:0] tr_prev;
  logic          tr_mbit;

  logic [PW-1:0] lwb_preg;
  logic          lwb_has_dest, lwb_replicated, lwb_oldest, lwb_repl;
  size_info_t    lw_info;
  logic          cam_hit;
  logic [PW-1:0] cam_preg;

  logic [PW-1:0] twb_preg;
  logic          twb_shared, twb_has_dest, tw_fault;

  logic [CW-1:0][LW-1:0] cmp_idx;
  logic [CW-1:0]         cmp_shared, cmp_mis;
  logic [CW-1:0]         c_lrel, c_trel;
  logic [CW-1:0][PW-1:0] c_lrel_preg, c_trel_preg;

  logic [1:0][PW-1:0] ls_preg, ts_preg, rd_preg;
  logic [1:0]         ts_hi, rd_hi;

  // ---------------- leading dispatch ----------------
  // Register reservation: every leading instruction with a destination
  // whose trailing copy is not renamed yet may still need a register of its
  // own (pend_dest), unless its result was already found narrow: its
  // trailing copy will then share the register, so the reservation is
  // dropped at the leading writeback. The leading thread allocates only
  // while at least pend_dest + 3 registers are free, so the trailing thread
  // always finds two (its allocation port needs two) and cannot be starved.
  logic [PW:0] free_cnt, pend_dest;
  logic        resv_ok;
  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < NP; i++) free_cnt = free_cnt + (PW+1)'(free_o[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_dest <= '0;
    else pend_dest <= pend_dest + (PW+1)'(ld_fire_o && ld_has_dest)
                                - (PW+1)'(tr_fire_o && tr_has_dest && alloc != TR_SHARED)
                                - (PW+1)'(lwb_narrow_o && !lwb_repl);
  end
  assign resv_ok   = free_cnt >= pend_dest + (PW+1)'(3);
  a_pend_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pend_dest != '0 || !(tr_fire_o && tr_has_dest && alloc != TR_SHARED) && !(lwb_narrow_o && !lwb_repl));
  assign ld_fire_o = ld_valid && d_ok && (!ld_has_dest || (al_ok && resv_ok));
  assign ld_tag_o  = d_idx;
  assign ld_preg_o = al_preg;

  // ---------------- trailing rename decision ----------------

  always_comb begin
    alloc = TR_OWN;
    tpreg = at_preg;
    if (tr_has_dest && rp_size) begin
      alloc = TR_SHARED; tpreg = rp_preg;
    end else if (tr_has_dest && rp_cand_v && cand_valid[rp_cand_preg]) begin
      alloc = TR_REUSE;  tpreg = rp_cand_preg;
    end
    needs_new  = tr_has_dest && alloc == TR_OWN;
    rob_shared = tr_has_dest ? (tr_mbit && tpreg == rp_preg) : tr_ctrl;
  end

  assign tr_fire_o = tr_valid && tr_go && rp_valid &&
                     (rob_shared || ta_sep_ok) && (!needs_new || at_ok);
  assign at_req    = tr_fire_o && needs_new;
  assign st_en     = tr_fire_o && tr_has_dest && alloc != TR_OWN;
  assign st_preg   = tpreg;
  assign cc_en     = tr_fire_o && tr_has_dest && alloc == TR_REUSE;
  assign cc_preg   = tpreg;
  assign tr_tag_o        = rp_idx;
  assign tr_preg_o       = tpreg;
  assign tr_alloc_o      = alloc;
  assign tr_rob_shared_o = rob_shared;

  slack_ctrl #(.SLACK(SLK), .DW(LW + 1)) u_slack (
    .ldg_stall_i   (ld_valid && !ld_fire_o),
    .dist_i        (ndist),
    .tlg_inflight_i(nrep),
    .violate_en    (violate_en),
    .drain_i       (drain),
    .tr_go_o       (tr_go),
    .reason_o      (slack_reason_o)
  );

  // ---------------- leading writeback acceptance ----------------
  logic lwb_go, lvb_ok, lvb_skip;
  // The trailing copy counts as renamed also when it is renamed in the
  // same cycle as the leading writeback (it then did not see the result).
  assign lwb_repl    = lwb_replicated || (tr_fire_o && rp_idx == lwb_tag);
  assign lwb_ready_o = !(lwb_is_load && lwb_has_dest) || lvb_ok;
  assign lwb_go      = lwb_valid && lwb_ready_o;

  // ---------------- register allocation state ----------------
  // A candidate is recorded only for an instruction whose trailing copy is
  // not renamed yet; otherwise nobody would ever reuse (and release) it.
  assign cs_en   = lwb_go && lwb_has_dest && !lw_info.width && !cand_valid[lwb_preg] && cam_hit &&
                   !lwb_repl;
  assign cs_preg = cam_preg;

  reg_usage #(.N(NP), .NA(NA), .NREL(CW)) u_usage (
    .clk, .rst_n,
    .al_req(ld_fire_o && ld_has_dest), .al_ok, .al_preg,
    .at_req, .at_ok, .at_preg,
    .st_en, .st_preg,
    .rl_en(c_lrel), .rl_preg(c_lrel_preg),
    .rt_en(c_trel), .rt_preg(c_trel_preg),
    .cs_en, .cs_preg, .cc_en, .cc_preg,
    .cand_valid_o(cand_valid), .free_o, .perr_o(usage_perr_o)
  );

  // ---------------- map tables ----------------
  assign rd_preg[0] = rd_trailing[0] ? ts_preg[0] : ls_preg[0];
  assign rd_preg[1] = rd_trailing[1] ? ts_preg[1] : ls_preg[1];
  assign rd_hi      = rd_trailing & ts_hi;

  rbr_rename #(.NA(NA), .NP(NP), .NS(2)) u_rename (
    .clk, .rst_n, .mispredict,
    .lr_en(ld_fire_o && ld_has_dest), .lr_arch(ld_arch), .lr_preg(al_preg), .lr_prev_o(lr_prev),
    .tr_en(tr_fire_o && tr_has_dest), .tr_arch, .tr_preg(tpreg),
    .tr_same(alloc == TR_SHARED), .tr_prev_o(tr_prev), .tr_mbit_o(tr_mbit),
    .ls_arch(rd_arch), .ls_preg_o(ls_preg), .ts_arch(rd_arch), .ts_preg_o(ts_preg), .ts_hi_o(ts_hi)
  );

  // ---------------- ROB ----------------
  rbr_rob #(.NL(NL), .NT(NT), .NP(NP), .NA(NA), .CW(CW)) u_rob (
    .clk, .rst_n,
    .d_en(ld_fire_o), .d_has_dest(ld_has_dest), .d_arch(ld_has_dest ? ld_arch : '0),
    .d_preg(ld_has_dest ? al_preg : '0), .d_prev(ld_has_dest ? lr_prev : '0), .d_ctrl(ld_ctrl), .d_ok_o(d_ok), .d_idx_o(d_idx),
    .lwb_en(lwb_go), .lwb_idx(lwb_tag), .lwb_narrow(lwb_has_dest && lw_info.width),
    .lwb_fault, .lwb_cand_v(cs_en), .lwb_cand_preg(cam_preg), .lwb_preg_o(lwb_preg),
    .lwb_has_dest_o(lwb_has_dest), .lwb_replicated_o(lwb_replicated), .lwb_oldest_o(lwb_oldest),
    .rp_valid_o(rp_valid), .rp_idx_o(rp_idx), .rp_has_dest_o(rp_has_dest), .rp_preg_o(rp_preg),
    .rp_prev_o(rp_prev), .rp_size_o(rp_size), .rp_cand_v_o(rp_cand_v),
    .rp_cand_preg_o(rp_cand_preg), .dist_o(ndist),
    .ta_en(tr_fire_o), .ta_sep(!rob_shared), .ta_has_dest(tr_has_dest), .ta_arch(tr_has_dest ? tr_arch : '0),
    .ta_preg(tr_has_dest ? tpreg : '0), .ta_prev(tr_has_dest ? tr_prev : '0), .ta_ctrl(tr_ctrl), .ta_check(alloc == TR_SHARED),
    .ta_sep_ok_o(ta_sep_ok),
    .twb_en(twb_valid), .twb_idx(twb_tag), .twb_fault(tw_fault), .twb_preg_o(twb_preg),
    .twb_shared_o(twb_shared), .twb_has_dest_o(twb_has_dest),
    .cmp_idx_o(cmp_idx), .cmp_shared_o(cmp_shared), .cmp_mis_i(cmp_mis),
    .c_valid_o, .c_fault_o, .c_sep_o, .c_lrel_o(c_lrel), .c_lrel_preg_o(c_lrel_preg),
    .c_trel_o(c_trel), .c_trel_preg_o(c_trel_preg), .c_arch_o, .c_lpreg_o, .c_tpreg_o,
    .nrep_o(nrep), .lcount_o(lcount), .tcount_o(rob_tcount_o)
  );

  // ---------------- register file ----------------
  rbr_regfile #(.N(NP), .NRD(2)) u_rf (
    .clk, .rst_n,
    .lw_en(lwb_go && lwb_has_dest), .lw_preg(lwb_preg), .lw_val(lwb_value), .lw_info_o(lw_info),
    .tw_en(twb_valid && twb_has_dest), .tw_preg(twb_preg), .tw_shared(twb_shared),
    .tw_val(twb_value), .tw_fault_o(tw_fault),
    .rd_preg, .rd_hi, .rd_val(rd_value_o), .rd_perr(rd_perr_o)
  );
  assign lwb_narrow_o = lwb_go && lwb_has_dest && lw_info.width;
  assign twb_fault_o  = twb_valid && tw_fault;

  // ---------------- RVR CAM ----------------
  rvr_cam #(.N(NCAM), .NP(NP), .NINV(CW)) u_cam (
    .clk, .rst_n,
    .lk_en(lwb_go && lwb_has_dest && !lw_info.width && !cand_valid[lwb_preg]),
    .lk_val(lwb_value), .lk_type(1'b0), .lk_preg(lwb_preg),
    .hit_o(cam_hit), .hit_preg_o(cam_preg),
    .inv_en(c_lrel), .inv_preg(c_lrel_preg)
  );
  assign lwb_cam_hit_o = cs_en;
  assign lwb_lvb_ok_o  = lvb_ok;
  assign lwb_lvb_skip_o = lwb_go && lwb_is_load && lwb_has_dest && lvb_skip;

  // ---------------- additional value buffer ----------------
  value_buffer #(.N(NL), .NCMP(CW)) u_avb (
    .clk, .rst_n,
    .lw_en(lwb_go && lwb_has_dest), .lw_idx(lwb_tag), .lw_val(lwb_value),
    .tw_en(twb_valid && twb_has_dest), .tw_idx(twb_tag), .tw_shared(twb_shared), .tw_val(twb_value),
    .cmp_idx(cmp_idx), .cmp_shared(cmp_shared), .cmp_mis_o(cmp_mis)
  );

  // ---------------- load value buffer ----------------
  load_value_buffer #(.N(NLVB), .NP(NP)) u_lvb (
    .clk, .rst_n,
    .w_en(lwb_go && lwb_is_load && lwb_has_dest), .w_preg(lwb_preg), .w_val(lwb_value),
    .w_tr_renamed(lwb_repl), .w_oldest(lwb_oldest), .w_ok_o(lvb_ok), .w_skip_o(lvb_skip),
    .rd_en(tl_valid), .rd_preg(tl_preg), .rd_hit_o(tl_hit_o), .rd_val_o(tl_value_o), .used_o(lvb_used_o)
  );

  // ---------------- load/store buffer ----------------
  lsb_check #(.NLB(NLB), .NSB(NSB), .NSBT(NSBT)) u_lsb (
    .clk, .rst_n,
    .ld_en(m_ld_en), .ld_store(m_ld_store), .ld_ok_o(m_ld_ok_o), .ld_idx_o(m_ld_idx_o),
    .la_en(m_la_en), .la_store(m_la_store), .la_idx(m_la_idx), .la_addr(m_la_addr), .la_val(m_la_val),
    .td_en(m_td_en), .td_store(m_td_store), .td_two_src(m_td_two_src),
    .td_avail_o(m_td_avail_o), .td_mode_o(m_td_mode_o), .td_idx_o(m_td_idx_o),
    .tb_en(m_tb_en), .tb_store(m_tb_store), .tb_idx(m_tb_idx), .tb_addr(m_tb_addr), .tb_val(m_tb_val),
    .tb_fault_o(m_tb_fault_o), .c_load(m_c_load), .c_store(m_c_store), .c_fault_o(m_c_fault_o),
    .tsb_used_o(m_tsb_used_o)
  );

  logic unused;
  assign unused = ^{rp_has_dest, rp_prev, lcount, lw_info.location, lw_info.value};
endmodule
