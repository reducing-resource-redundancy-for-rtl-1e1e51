// rmt_system: one rbr_rmt_top instance driven by rmt_driver, with the
// sizes given as parameters. It is the building block of the sensitivity
// test, which runs several sizes side by side; done, checks and failures
// come from the driver. No mechanism is required that only some sizes
// reach (slack reached, deadlock escape, load value buffer full); all the
// others are.
module rmt_system #(
  parameter int NP = 128, parameter int NL = 160, parameter int NT = 32,
  parameter int NLB = 40, parameter int NSB = 35, parameter int NSBT = 5,
  parameter int NPROG = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NA = 32, NLVB = 16;
  localparam int PW = $clog2(NP), AW = $clog2(NA), LW = $clog2(NL), SI = $clog2((NSB > NLB) ? NSB : NLB);

  logic mispredict, violate_en, drain;
  logic ld_valid, ld_has_dest, ld_ctrl, ld_fire;
  logic [AW-1:0] ld_arch, tr_arch;
  logic [LW-1:0] ld_tag, tr_tag, lwb_tag, twb_tag;
  logic [PW-1:0] ld_preg, tr_preg, tl_preg;
  logic tr_valid, tr_has_dest, tr_ctrl, tr_fire, tr_rob_shared;
  logic [1:0] tr_alloc;
  logic [2:0] slack_reason;
  logic lwb_valid, lwb_is_load, lwb_fault, lwb_ready, lwb_narrow, lwb_cam_hit, lwb_lvb_skip, lwb_lvb_ok;
  logic [31:0] lwb_value, twb_value, tl_value;
  logic twb_valid, twb_fault, tl_valid, tl_hit;
  logic [1:0] rd_trailing, rd_perr;
  logic [1:0][AW-1:0] rd_arch;
  logic [1:0][31:0] rd_value;
  logic [3:0] c_valid, c_fault, c_sep;
  logic [3:0][AW-1:0] c_arch;
  logic [3:0][PW-1:0] c_lpreg, c_tpreg;
  logic usage_perr;
  logic [NP-1:0] free;
  logic m_ld_en, m_ld_store, m_ld_ok, m_la_en, m_la_store, m_td_en, m_td_store, m_td_two_src;
  logic m_td_avail, m_tb_en, m_tb_store, m_tb_fault, m_c_load, m_c_store, m_c_fault;
  logic [SI-1:0] m_ld_idx, m_la_idx, m_td_idx, m_tb_idx;
  logic [31:0] m_la_addr, m_la_val, m_tb_addr, m_tb_val;
  logic [1:0] m_td_mode;
  logic [$clog2(NSBT+1)-1:0] m_tsb_used;
  logic [$clog2(NLVB+1)-1:0] lvb_used;
  logic [$clog2(NT):0] rob_tcount;

  rbr_rmt_top #(.NP(NP), .NL(NL), .NT(NT), .NLB(NLB), .NSB(NSB), .NSBT(NSBT)) dut (
    .clk, .rst_n, .mispredict, .violate_en, .drain,
    .ld_valid, .ld_has_dest, .ld_arch, .ld_ctrl, .ld_fire_o(ld_fire), .ld_tag_o(ld_tag), .ld_preg_o(ld_preg),
    .tr_valid, .tr_has_dest, .tr_arch, .tr_ctrl, .tr_fire_o(tr_fire), .tr_tag_o(tr_tag),
    .tr_preg_o(tr_preg), .tr_alloc_o(tr_alloc), .tr_rob_shared_o(tr_rob_shared), .slack_reason_o(slack_reason),
    .lwb_valid, .lwb_tag, .lwb_value, .lwb_is_load, .lwb_fault, .lwb_ready_o(lwb_ready),
    .lwb_narrow_o(lwb_narrow), .lwb_cam_hit_o(lwb_cam_hit), .lwb_lvb_skip_o(lwb_lvb_skip), .lwb_lvb_ok_o(lwb_lvb_ok),
    .twb_valid, .twb_tag, .twb_value, .twb_fault_o(twb_fault),
    .tl_valid, .tl_preg, .tl_hit_o(tl_hit), .tl_value_o(tl_value),
    .rd_trailing, .rd_arch, .rd_value_o(rd_value), .rd_perr_o(rd_perr),
    .c_valid_o(c_valid), .c_fault_o(c_fault), .c_sep_o(c_sep), .c_arch_o(c_arch),
    .c_lpreg_o(c_lpreg), .c_tpreg_o(c_tpreg), .usage_perr_o(usage_perr), .free_o(free),
    .m_ld_en, .m_ld_store, .m_ld_ok_o(m_ld_ok), .m_ld_idx_o(m_ld_idx),
    .m_la_en, .m_la_store, .m_la_idx, .m_la_addr, .m_la_val,
    .m_td_en, .m_td_store, .m_td_two_src, .m_td_avail_o(m_td_avail), .m_td_mode_o(m_td_mode), .m_td_idx_o(m_td_idx),
    .m_tb_en, .m_tb_store, .m_tb_idx, .m_tb_addr, .m_tb_val, .m_tb_fault_o(m_tb_fault),
    .m_c_load, .m_c_store, .m_c_fault_o(m_c_fault),
    .m_tsb_used_o(m_tsb_used), .lvb_used_o(lvb_used), .rob_tcount_o(rob_tcount)
  );

  rmt_driver #(.SI(SI), .NP(NP), .NA(NA), .NL(NL), .NSBT(NSBT), .NLVB(NLVB), .NPROG(NPROG), .REQ_DEADLOCK(1'b0), .REQ_SLACK(1'b0)) drv (
    .clk, .rst_n, .mispredict, .violate_en, .drain,
    .ld_valid, .ld_has_dest, .ld_arch, .ld_ctrl, .ld_fire, .ld_tag, .ld_preg,
    .tr_valid, .tr_has_dest, .tr_arch, .tr_ctrl, .tr_fire, .tr_tag, .tr_preg, .tr_alloc, .tr_rob_shared,
    .slack_reason, .lwb_valid, .lwb_tag, .lwb_value, .lwb_is_load, .lwb_fault, .lwb_ready, .lwb_narrow,
    .lwb_cam_hit, .lwb_lvb_skip, .twb_valid, .twb_tag, .twb_value, .twb_fault,
    .tl_valid, .tl_preg, .tl_hit, .tl_value, .rd_trailing, .rd_arch, .rd_value, .rd_perr,
    .c_valid, .c_fault, .c_arch, .c_lpreg, .c_tpreg, .usage_perr,
    .m_ld_en, .m_ld_store, .m_ld_ok, .m_ld_idx, .m_la_en, .m_la_store, .m_la_idx, .m_la_addr, .m_la_val,
    .m_td_en, .m_td_store, .m_td_two_src, .m_td_avail, .m_td_mode, .m_td_idx,
    .m_tb_en, .m_tb_store, .m_tb_idx, .m_tb_addr, .m_tb_val, .m_tb_fault, .m_c_load, .m_c_store, .m_c_fault,
    .done, .checks, .failures
  );

endmodule
