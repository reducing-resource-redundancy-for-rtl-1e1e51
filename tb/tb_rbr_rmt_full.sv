// tb_rbr_rmt_full: end-to-end test of rbr_rmt_top at its default size.
//
// The unit is instantiated with no parameter overrides: 128 physical
// registers, a 160-entry leading and 32-entry trailing ROB section, an
// 8-entry RVR CAM, a 16-entry load value buffer, 40 load buffer entries,
// 35 + 5 store buffer entries and a 64-instruction slack. A 4000-instruction synthetic program
// runs through both threads from reset until every instruction has
// committed. Here the slack is normally reached before the leading thread
// runs out of ROB entries, so the test requires "slack reached" releases
// (the deadlock escape is required by the reduced-size test instead). The
// program, stimulus and checks are in rmt_driver; this file only connects
// the unit and has the watchdog.
module tb_rbr_rmt_full;
  localparam int NP = 128, NA = 32, NL = 160, NT = 32, NLVB = 16, NSBT = 5, NPROG = 4000;
  localparam int PW = $clog2(NP), AW = $clog2(NA), LW = $clog2(NL), SI = $clog2(rbr_pkg::LB_LDG);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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
  logic [2:0] m_tsb_used;
  logic [$clog2(NLVB+1)-1:0] lvb_used;
  logic [$clog2(NT):0] rob_tcount;
  logic done;
  int checks, failures;

  rbr_rmt_top dut (
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

  rmt_driver #(.SI(SI), .NP(NP), .NA(NA), .NL(NL), .NSBT(NSBT), .NLVB(NLVB), .NPROG(NPROG), .REQ_DEADLOCK(1'b0), .REQ_SLACK(1'b1)) drv (
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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog: %0d instructions committed", drv.ci);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
