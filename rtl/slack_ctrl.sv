// slack_ctrl: staggered execution control of the two threads.
//
// The trailing thread is held back until the leading thread is SLACK
// instructions ahead of it (dist_i counts leading instructions whose
// trailing copy has not been renamed yet). Two cases release it earlier:
//  - deadlock escape: the leading thread is stalled on a full resource while
//    no trailing instruction is in the pipeline, so nothing would ever free
//    the resource; trailing instructions then go irrespective of the slack;
//  - slack violation (violate_en): when the leading thread is stalled for
//    any resource, trailing instructions that can proceed go ahead.
// drain_i lets the trailing thread catch up at the end of a program.
// tr_go_o is combinational. reason_o says why trailing renaming was
// allowed: 0 none, 1 slack reached, 2 deadlock escape, 3 slack violation,
// 4 drain. The slack of 64 and both escape rules follow the RMT scheme;
// squashing younger leading instructions on a deadlock is not modelled.
module slack_ctrl #(
  parameter int SLACK = 64,
  parameter int DW    = 8
) (
  input  logic          ldg_stall_i,     // leading dispatch blocked by a resource
  input  logic [DW-1:0] dist_i,
  input  logic [DW-1:0] tlg_inflight_i,  // trailing instructions in the pipeline
  input  logic          violate_en,
  input  logic          drain_i,
  output logic          tr_go_o,
  output logic [2:0]    reason_o
);
  always_comb begin
    reason_o = 3'd0;
    if (dist_i == '0)                                 reason_o = 3'd0;
    else if (int'(dist_i) >= SLACK)                  reason_o = 3'd1;
    else if (ldg_stall_i && tlg_inflight_i == '0)     reason_o = 3'd2;
    else if (ldg_stall_i && violate_en)               reason_o = 3'd3;
    else if (drain_i)                                 reason_o = 3'd4;
    tr_go_o = reason_o != 3'd0;
  end
endmodule
