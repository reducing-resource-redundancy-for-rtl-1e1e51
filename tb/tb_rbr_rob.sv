// tb_rbr_rob: batches of instruction pairs through the ROB, at reduced
// size (16 leading, 4 trailing entries). Per batch: leading dispatch,
// some early writebacks (narrow or not, with RVR candidates), trailing
// allocation at the replica pointer (the size bit and candidate seen there
// are checked against a model), trailing writeback, then commit. At commit
// the number of pairs per cycle is checked against a four-entry budget
// (shared pair 1, separate pair 2) and every pair's fault flag against the
// fault injected into it: value mismatch, check bit inconsistent with the
// registers, ROB parity (trailing view differs from the shared entry),
// and faults reported at writeback. Released registers are checked too.
module tb_rbr_rob;
  localparam int NL = 16, NT = 4, CW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d_en = 0, d_has_dest = 0, d_ctrl = 0, d_ok;
  logic [4:0] d_arch = 0; logic [6:0] d_preg = 0, d_prev = 0;
  logic [3:0] d_idx;
  logic lwb_en = 0, lwb_narrow = 0, lwb_fault = 0, lwb_cand_v = 0;
  logic [3:0] lwb_idx = 0; logic [6:0] lwb_cand_preg = 0, lwb_preg;
  logic lwb_has_dest, lwb_repl, lwb_oldest;
  logic rp_valid, rp_has_dest, rp_size, rp_cand_v;
  logic [3:0] rp_idx; logic [6:0] rp_preg, rp_prev, rp_cand_preg;
  logic [4:0] ndist, nrep, lcount;
  logic ta_en = 0, ta_sep = 0, ta_has_dest = 0, ta_ctrl = 0, ta_check = 0, ta_sep_ok;
  logic [4:0] ta_arch = 0; logic [6:0] ta_preg = 0, ta_prev = 0;
  logic twb_en = 0, twb_fault = 0, twb_shared, twb_has_dest;
  logic [3:0] twb_idx = 0; logic [6:0] twb_preg;
  logic [CW-1:0][3:0] cmp_idx; logic [CW-1:0] cmp_shared, cmp_mis;
  logic [CW-1:0] c_valid, c_fault, c_sep, c_lrel, c_trel;
  logic [CW-1:0][6:0] c_lrel_preg, c_trel_preg, c_lpreg, c_tpreg;
  logic [CW-1:0][4:0] c_arch;
  logic [2:0] tcount;
  int checks = 0, failures = 0;

  rbr_rob #(.NL(NL), .NT(NT), .NP(128), .NA(32), .CW(CW)) dut (
    .clk, .rst_n, .d_en, .d_has_dest, .d_arch, .d_preg, .d_prev, .d_ctrl, .d_ok_o(d_ok), .d_idx_o(d_idx),
    .lwb_en, .lwb_idx, .lwb_narrow, .lwb_fault, .lwb_cand_v, .lwb_cand_preg, .lwb_preg_o(lwb_preg),
    .lwb_has_dest_o(lwb_has_dest), .lwb_replicated_o(lwb_repl), .lwb_oldest_o(lwb_oldest),
    .rp_valid_o(rp_valid), .rp_idx_o(rp_idx), .rp_has_dest_o(rp_has_dest), .rp_preg_o(rp_preg),
    .rp_prev_o(rp_prev), .rp_size_o(rp_size), .rp_cand_v_o(rp_cand_v), .rp_cand_preg_o(rp_cand_preg),
    .dist_o(ndist), .ta_en, .ta_sep, .ta_has_dest, .ta_arch, .ta_preg, .ta_prev, .ta_ctrl, .ta_check,
    .ta_sep_ok_o(ta_sep_ok), .twb_en, .twb_idx, .twb_fault, .twb_preg_o(twb_preg),
    .twb_shared_o(twb_shared), .twb_has_dest_o(twb_has_dest), .cmp_idx_o(cmp_idx),
    .cmp_shared_o(cmp_shared), .cmp_mis_i(cmp_mis), .c_valid_o(c_valid), .c_fault_o(c_fault),
    .c_sep_o(c_sep), .c_lrel_o(c_lrel), .c_lrel_preg_o(c_lrel_preg), .c_trel_o(c_trel),
    .c_trel_preg_o(c_trel_preg), .c_arch_o(c_arch), .c_lpreg_o(c_lpreg), .c_tpreg_o(c_tpreg),
    .nrep_o(nrep), .lcount_o(lcount), .tcount_o(tcount));

  typedef struct {
    bit hd; bit ctrl; logic [4:0] arch; logic [6:0] preg, prev, tpreg, tprev;
    bit narrow, cand; logic [6:0] cpreg; bit ldone; bit sep; bit check; int kind; logic [3:0] idx;
    bit ren; bit tdone;
  } ins_t;
  int n = 0, head = 0;
  int ncommit_cycles = 0, nfaults = 0, nshared = 0;
  ins_t q [12];
  bit mis_tbl [NL];

  always_comb for (int k = 0; k < CW; k++) cmp_mis[k] = mis_tbl[cmp_idx[k]];

  task automatic lwb(int i);
    @(negedge clk); lwb_en = 1; lwb_idx = q[i].idx; lwb_narrow = q[i].narrow;
    lwb_fault = q[i].kind == 4; lwb_cand_v = q[i].cand; lwb_cand_preg = q[i].cpreg; #1;
    checks++;
    if (lwb_preg != q[i].preg || lwb_has_dest != q[i].hd || lwb_oldest != (i == head)) begin
      failures++; $display("FAIL lwb view");
    end
    @(negedge clk); lwb_en = 0; q[i].ldone = 1;
  endtask

  // commit monitor: samples just before each clock edge
  always @(posedge clk) if (rst_n && head < n) begin
    automatic int budget = CW, en = 0;
    for (int k = 0; k < CW && head + k < n; k++) begin
      automatic int cost = q[head + k].sep ? 2 : 1;
      if (!(q[head + k].ren && q[head + k].ldone && q[head + k].tdone) || cost > budget) break;
      budget -= cost; en++;
    end
    checks++;
    if ($countones(c_valid) != en) begin
      failures++; $display("FAIL commit count %0d exp %0d", $countones(c_valid), en);
    end
    if (en > 0) ncommit_cycles++;
    for (int k = 0; k < en; k++) begin
      automatic ins_t x = q[head + k];
      automatic bit ef = x.kind != 0;
      nfaults += ef; nshared += !x.sep;
      checks++;
      if (c_fault[k] != ef || c_sep[k] != x.sep || c_lrel[k] != x.hd ||
          (x.hd && (c_lrel_preg[k] != x.prev || c_trel_preg[k] != x.tprev || c_tpreg[k] != x.tpreg))) begin
        failures++;
        $display("FAIL commit ins %0d kind %0d: fault %b sep %b", head + k, x.kind, c_fault[k], c_sep[k]);
      end
    end
    head = head + en;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NL; i++) mis_tbl[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      automatic int nsep = 0;
      n = 0; head = 0;
      for (int i = 0; i < 12; i++) begin q[i].ren = 0; q[i].tdone = 0; q[i].ldone = 0; q[i].sep = 0; end
      n = $urandom_range(1, 12);
      for (int i = 0; i < n; i++) begin
        q[i].hd = $urandom_range(0, 4) != 0; q[i].ctrl = !q[i].hd && $urandom_range(0, 1);
        q[i].arch = 5'($urandom); q[i].preg = 7'($urandom); q[i].prev = 7'($urandom);
        q[i].narrow = q[i].hd && $urandom_range(0, 1);
        q[i].cand = q[i].hd && !q[i].narrow && $urandom_range(0, 2) == 0;
        q[i].cpreg = 7'($urandom); q[i].ldone = 0;
        q[i].kind = ($urandom_range(0, 5) == 0) ? $urandom_range(1, 5) : 0;
        @(negedge clk); d_en = 1; d_has_dest = q[i].hd; d_ctrl = q[i].ctrl; d_arch = q[i].arch;
        d_preg = q[i].preg; d_prev = q[i].prev; #1;
        checks++; if (!d_ok) begin failures++; $display("FAIL ROB full"); end
        q[i].idx = d_idx;
        @(negedge clk); d_en = 0;
      end
      for (int i = 0; i < n; i++) if ($urandom_range(0, 1)) lwb(i);
      // trailing allocation at the replica pointer
      for (int i = 0; i < n; i++) begin
        automatic int kind = q[i].kind;
        @(negedge clk); #1;
        checks++;
        if (!rp_valid || rp_idx != q[i].idx || rp_size != (q[i].ldone && q[i].narrow) ||
            rp_cand_v != (q[i].ldone && q[i].cand) || (rp_cand_v && rp_cand_preg != q[i].cpreg) ||
            rp_preg != q[i].preg) begin
          failures++; $display("FAIL replica view ins %0d", i);
        end
        if (!q[i].hd) q[i].sep = !q[i].ctrl && nsep < NT;
        else q[i].sep = (nsep < NT) ? $urandom_range(0, 1) : 0;
        if (kind == 1 && q[i].sep) kind = 0;             // parity fault needs a shared entry
        if (kind == 2 && (!q[i].sep || !q[i].hd)) kind = 0;  // check-bit fault needs a separate entry
        if (kind == 3 && !q[i].hd) kind = 0;
        q[i].kind = kind;
        q[i].check = q[i].sep ? $urandom_range(0, 1) : q[i].hd;
        q[i].tpreg = (q[i].check || !q[i].sep) ? q[i].preg : q[i].preg + 7'd1;
        if (kind == 2) begin q[i].check = 1; q[i].tpreg = q[i].preg + 7'd1; end  // says shared, is not
        q[i].tprev = q[i].sep ? 7'($urandom) : q[i].prev;
        nsep += q[i].sep;
        ta_en = 1; ta_sep = q[i].sep; ta_has_dest = q[i].hd; ta_arch = q[i].arch;
        ta_preg = q[i].tpreg; ta_ctrl = q[i].ctrl; ta_check = q[i].check;
        ta_prev = (kind == 1) ? q[i].prev ^ 7'd4 : q[i].tprev;
        checks++; if (q[i].sep && !ta_sep_ok) begin failures++; $display("FAIL no trailing room"); end
        @(negedge clk); ta_en = 0; q[i].ren = 1;
        mis_tbl[q[i].idx] = (kind == 3);
      end
      for (int i = 0; i < n; i++) if (!q[i].ldone) lwb(i);
      for (int i = 0; i < n; i++) begin
        @(negedge clk); twb_en = 1; twb_idx = q[i].idx; twb_fault = q[i].kind == 5; #1;
        checks++;
        if (twb_has_dest != q[i].hd || (q[i].hd && (twb_preg != q[i].tpreg ||
            twb_shared != (q[i].sep ? q[i].check : 1'b1)))) begin
          failures++; $display("FAIL twb view ins %0d: preg %0d/%0d shared %b", i, twb_preg, q[i].tpreg, twb_shared);
        end
        @(negedge clk); twb_en = 0; q[i].tdone = 1;
      end
      wait (head == n);
      @(negedge clk);
      checks++;
      if (lcount != 0 || tcount != 0 || nrep != 0) begin failures++; $display("FAIL not empty"); end
    end
    checks++;
    if (nfaults == 0 || nshared == 0) failures++;
    $display("commit cycles %0d, faults seen %0d, shared pairs %0d", ncommit_cycles, nfaults, nshared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
