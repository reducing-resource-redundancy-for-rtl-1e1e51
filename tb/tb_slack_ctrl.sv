// tb_slack_ctrl: sweeps the distance between the threads and the stall,
// violation and drain inputs and checks when the trailing thread may go
// and why: slack of 64 reached, deadlock escape (leading stalled with no
// trailing instruction in flight), slack violation, drain.
module tb_slack_ctrl;
  logic ldg_stall, violate_en, drain, go;
  logic [7:0] d, infl;
  logic [2:0] reason;
  int checks = 0, failures = 0;

  slack_ctrl #(.SLACK(64), .DW(8)) dut (.ldg_stall_i(ldg_stall), .dist_i(d), .tlg_inflight_i(infl),
    .violate_en, .drain_i(drain), .tr_go_o(go), .reason_o(reason));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dd = 0; dd <= 128; dd++)
      for (int m = 0; m < 16; m++) begin
        automatic int er;
        d = 8'(dd); ldg_stall = m[0]; violate_en = m[1]; drain = m[2];
        infl = m[3] ? 8'($urandom_range(1, 100)) : 8'd0;
        #1;
        if (dd == 0) er = 0;
        else if (dd >= 64) er = 1;
        else if (ldg_stall && infl == 0) er = 2;
        else if (ldg_stall && violate_en) er = 3;
        else if (drain) er = 4;
        else er = 0;
        checks++;
        if (reason != 3'(er) || go != (er != 0)) begin
          failures++;
          $display("FAIL d=%0d stall=%b viol=%b drain=%b infl=%0d: reason %0d exp %0d",
                   dd, ldg_stall, violate_en, drain, infl, reason, er);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
