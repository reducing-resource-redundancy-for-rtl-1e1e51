// tb_rbr_rename: random leading and trailing renames against reference
// map tables. Checks the previous mappings returned, source lookups of
// both threads, the map bit (set only when the trailing copy took the
// leading copy's register, cleared for all registers on a misprediction),
// the half bit, and that a disagreeing map-bit copy reads as clear.
module tb_rbr_rename;
  localparam int NA = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mispredict = 0, lr_en = 0, tr_en = 0, tr_same = 0, tr_mbit;
  logic [4:0] lr_arch = 0, tr_arch = 0;
  logic [6:0] lr_preg = 0, tr_preg = 0, lr_prev, tr_prev;
  logic [1:0][4:0] ls_arch = '0, ts_arch = '0;
  logic [1:0][6:0] ls_preg, ts_preg;
  logic [1:0] ts_hi;
  int checks = 0, failures = 0;

  rbr_rename #(.NA(NA), .NP(128), .NS(2)) dut (.clk, .rst_n, .mispredict, .lr_en, .lr_arch,
    .lr_preg, .lr_prev_o(lr_prev), .tr_en, .tr_arch, .tr_preg, .tr_same, .tr_prev_o(tr_prev),
    .tr_mbit_o(tr_mbit), .ls_arch, .ls_preg_o(ls_preg), .ts_arch, .ts_preg_o(ts_preg), .ts_hi_o(ts_hi));

  logic [6:0] lm [NA];
  logic [6:0] tm [NA];
  bit mb [NA];
  bit hb [NA];

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NA; i++) begin lm[i] = 7'(i); tm[i] = 7'(i); mb[i] = 1; hb[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      lr_en = $urandom_range(0, 1); lr_arch = 5'($urandom); lr_preg = 7'($urandom);
      tr_en = $urandom_range(0, 1); tr_arch = 5'($urandom);
      tr_same = $urandom_range(0, 1);
      tr_preg = tr_same ? lm[tr_arch] : 7'($urandom);
      mispredict = $urandom_range(0, 40) == 0;
      for (int s = 0; s < 2; s++) begin ls_arch[s] = 5'($urandom); ts_arch[s] = 5'($urandom); end
      #1;
      checks++;
      if (lr_prev != lm[lr_arch] || tr_prev != tm[tr_arch] || tr_mbit != mb[tr_arch]) begin
        failures++;
        $display("FAIL rename views: %0d/%0d %0d/%0d %b/%b", lr_prev, lm[lr_arch], tr_prev,
                 tm[tr_arch], tr_mbit, mb[tr_arch]);
      end
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (ls_preg[s] != lm[ls_arch[s]] || ts_preg[s] != tm[ts_arch[s]] || ts_hi[s] != hb[ts_arch[s]]) begin
          failures++;
          $display("FAIL source lookup %0d", s);
        end
      end
      if (lr_en) lm[lr_arch] = lr_preg;
      if (tr_en) begin tm[tr_arch] = tr_preg; mb[tr_arch] = tr_same; hb[tr_arch] = tr_same; end
      if (mispredict) for (int i = 0; i < NA; i++) mb[i] = 0;
    end
    @(negedge clk); lr_en = 0; tr_en = 0; mispredict = 0;
    // one copy of a set map bit flips: the bit must read as clear
    tr_en = 1; tr_arch = 5'd3; tr_same = 1; tr_preg = lm[3];
    @(negedge clk); tr_en = 0;
    dut.mbit[3][1] = 1'b0; tr_arch = 5'd3; #1;
    checks++; if (tr_mbit) begin failures++; $display("FAIL duplicated map bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
