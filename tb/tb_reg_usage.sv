// tb_reg_usage: exercises the register usage vectors against a reference
// model: leading and trailing allocation, trailing mapping of an existing
// register (shared or reused), releases from both threads (a register is
// free only when both threads released it and it is no pending reuse
// candidate), candidate-valid set/clear, and the parity over the usage bits.
module tb_reg_usage;
  localparam int N = 128, NA = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic al_req = 0, al_ok, at_req = 0, at_ok, st_en = 0, cs_en = 0, cc_en = 0, perr;
  logic [6:0] al_preg, at_preg, st_preg = 0, cs_preg = 0, cc_preg = 0;
  logic [3:0] rl_en = 0, rt_en = 0;
  logic [3:0][6:0] rl_preg = '0, rt_preg = '0;
  logic [N-1:0] cand, free;
  int checks = 0, failures = 0;

  reg_usage #(.N(N), .NA(NA), .NREL(4)) dut (
    .clk, .rst_n, .al_req, .al_ok, .al_preg, .at_req, .at_ok, .at_preg, .st_en, .st_preg,
    .rl_en, .rl_preg, .rt_en, .rt_preg, .cs_en, .cs_preg, .cc_en, .cc_preg,
    .cand_valid_o(cand), .free_o(free), .perr_o(perr));

  bit ul [N];
  bit ut [N];
  bit uc [N];

  task automatic compare(string what);
    checks++;
    for (int i = 0; i < N; i++)
      if (free[i] != !(ul[i] || ut[i] || uc[i]) || cand[i] != uc[i]) begin
        failures++;
        $display("FAIL %s reg %0d free %b cand %b exp %b %b", what, i, free[i], cand[i],
                 !(ul[i] || ut[i] || uc[i]), uc[i]);
        break;
      end
    checks++;
    if (perr) begin failures++; $display("FAIL parity %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin ul[i] = i < NA; ut[i] = i < NA; uc[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int it = 0; it < 3000; it++) begin
      automatic int lowest = -1, highest = -1;
      @(negedge clk);
      al_req = $urandom_range(0, 2) != 0;
      at_req = $urandom_range(0, 3) == 0;
      st_en  = $urandom_range(0, 3) == 0; st_preg = 7'($urandom_range(0, N - 1));
      cs_en  = $urandom_range(0, 3) == 0; cs_preg = 7'($urandom_range(0, N - 1));
      cc_en  = $urandom_range(0, 3) == 0; cc_preg = 7'($urandom_range(0, N - 1));
      for (int k = 0; k < 4; k++) begin
        rl_en[k] = $urandom_range(0, 1); rl_preg[k] = 7'($urandom_range(0, N - 1));
        rt_en[k] = $urandom_range(0, 1); rt_preg[k] = 7'($urandom_range(0, N - 1));
      end
      #1;
      for (int i = 0; i < N; i++) if (!(ul[i] || ut[i] || uc[i])) begin lowest = i; break; end
      for (int i = N - 1; i >= 0; i--) if (!(ul[i] || ut[i] || uc[i]) && i != lowest) begin highest = i; break; end
      checks++;
      if (al_ok != (lowest >= 0) || (al_ok && al_preg != 7'(lowest)) ||
          at_ok != (highest >= 0) || (at_ok && at_preg != 7'(highest))) begin
        failures++;
        $display("FAIL alloc %b %0d %b %0d exp %0d %0d", al_ok, al_preg, at_ok, at_preg, lowest, highest);
      end
      for (int k = 0; k < 4; k++) begin
        if (rl_en[k]) ul[rl_preg[k]] = 0;
        if (rt_en[k]) ut[rt_preg[k]] = 0;
      end
      if (al_req && lowest >= 0) ul[lowest] = 1;
      if (at_req && highest >= 0) ut[highest] = 1;
      if (st_en) ut[st_preg] = 1;
      if (cc_en) uc[cc_preg] = 0;
      if (cs_en) uc[cs_preg] = 1;
      @(posedge clk); #1;
      al_req = 0; at_req = 0; st_en = 0; cs_en = 0; cc_en = 0; rl_en = 0; rt_en = 0;
      #1;
      compare("step");
    end
    // parity catches a flipped usage bit
    @(negedge clk);
    dut.use_l[5] = ~dut.use_l[5]; #1;
    checks++; if (!perr) begin failures++; $display("FAIL parity flip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
