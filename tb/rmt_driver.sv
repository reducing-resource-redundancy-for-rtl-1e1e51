// rmt_driver: program generator, stimulus and checker for rbr_rmt_top.
//
// It generates a synthetic instruction stream (ALU results, loads, stores,
// branches) whose results are narrow about half of the time and often
// repeat a small pool of normal values, then plays both threads through
// the unit: leading dispatch, leading writeback after a random latency,
// trailing rename (whenever the unit allows it), trailing writeback,
// trailing load-value lookups, operand reads of both threads and commit.
// A reference model tracks every instruction and checks: trailing rename
// tags, operand values read through the map tables and the reconstruct
// stage, load values forwarded to trailing loads, the in-order commit
// stream and that exactly the injected faults are reported. It also runs a
// stream of memory instructions through the load/store buffer ports.
// Each mechanism of the design is counted, and one that never happened
// (as selected by REQ) counts as a failure.
module rmt_driver #(
  parameter int NP = 128, parameter int NA = 32, parameter int NL = 128,
  parameter int NSBT = 5, parameter int NLVB = 16, parameter int NPROG = 1000,
  parameter bit REQ_DEADLOCK = 1'b0, parameter bit REQ_SLACK = 1'b1, parameter bit REQ_LVB_FULL = 1'b0,
  localparam int PW = $clog2(NP), localparam int AW = $clog2(NA), localparam int LW = $clog2(NL),
  parameter int SI = 6
) (
  input  logic clk, input logic rst_n,
  output logic mispredict, output logic violate_en, output logic drain,
  output logic ld_valid, output logic ld_has_dest, output logic [AW-1:0] ld_arch, output logic ld_ctrl,
  input  logic ld_fire, input logic [LW-1:0] ld_tag, input logic [PW-1:0] ld_preg,
  output logic tr_valid, output logic tr_has_dest, output logic [AW-1:0] tr_arch, output logic tr_ctrl,
  input  logic tr_fire, input logic [LW-1:0] tr_tag, input logic [PW-1:0] tr_preg,
  input  logic [1:0] tr_alloc, input logic tr_rob_shared, input logic [2:0] slack_reason,
  output logic lwb_valid, output logic [LW-1:0] lwb_tag, output logic [31:0] lwb_value,
  output logic lwb_is_load, output logic lwb_fault,
  input  logic lwb_ready, input logic lwb_narrow, input logic lwb_cam_hit, input logic lwb_lvb_skip,
  output logic twb_valid, output logic [LW-1:0] twb_tag, output logic [31:0] twb_value,
  input  logic twb_fault,
  output logic tl_valid, output logic [PW-1:0] tl_preg, input logic tl_hit, input logic [31:0] tl_value,
  output logic [1:0] rd_trailing, output logic [1:0][AW-1:0] rd_arch,
  input  logic [1:0][31:0] rd_value, input logic [1:0] rd_perr,
  input  logic [3:0] c_valid, input logic [3:0] c_fault, input logic [3:0][AW-1:0] c_arch,
  input  logic [3:0][PW-1:0] c_lpreg, input logic [3:0][PW-1:0] c_tpreg,
  input  logic usage_perr,
  output logic m_ld_en, output logic m_ld_store, input logic m_ld_ok, input logic [SI-1:0] m_ld_idx,
  output logic m_la_en, output logic m_la_store, output logic [SI-1:0] m_la_idx,
  output logic [31:0] m_la_addr, output logic [31:0] m_la_val,
  output logic m_td_en, output logic m_td_store, output logic m_td_two_src,
  input  logic m_td_avail, input logic [1:0] m_td_mode, input logic [SI-1:0] m_td_idx,
  output logic m_tb_en, output logic m_tb_store, output logic [SI-1:0] m_tb_idx,
  output logic [31:0] m_tb_addr, output logic [31:0] m_tb_val, input logic m_tb_fault,
  output logic m_c_load, output logic m_c_store, input logic m_c_fault,
  output logic done, output int checks, output int failures
);
  typedef enum int {C_ALU, C_LOAD, C_STORE, C_BR} cls_e;
  cls_e        cls  [NPROG];
  logic [AW-1:0] arch [NPROG];
  logic [31:0] val  [NPROG];
  bit          inj  [NPROG];
  logic [LW-1:0] tag [NPROG];
  logic [PW-1:0] lp  [NPROG];
  int          lrdy [NPROG], trdy [NPROG];
  bit          ldn  [NPROG], tren [NPROG], tdn [NPROG], lvb_ent [NPROG], corrupt [NPROG];
  int          talloc [NPROG];
  int          ldc [NPROG], tdc [NPROG];   // cycle of the writeback

  int li = 0, ti = 0, ci = 0, cyc = 0;
  bit trace = $test$plusargs("trace");   // +trace prints every event
  int lwriter [NA];
  int twriter [NA];
  // mechanism counters
  int n_shared = 0, n_reuse = 0, n_own = 0, n_rob_sh = 0, n_rob_sep = 0, n_cam = 0, n_narrow = 0;
  int n_lvb_skip = 0, n_lvb_hit = 0, n_lvb_full = 0, n_fault = 0, n_mispred = 0, n_stall = 0;
  int n_reason [5];
  int n_cw [5];
  int n_lsb_mode [4];
  int n_rd = 0;

  function automatic bit has_dest(int i); return cls[i] == C_ALU || cls[i] == C_LOAD; endfunction

  function automatic logic [31:0] gen_value();
    logic [31:0] pool [6] = '{32'h3f800000, 32'h12345678, 32'h40490fdb, 32'hdeadbeef, 32'h7fff0001, 32'h0badcafe};
    logic [31:0] r = $urandom;
    case ($urandom_range(0, 9))
      0, 1: r[31:16] = '0;
      2, 3: r[31:16] = '1;
      4:    r[15:0]  = '0;
      5:    r[15:0]  = '1;
      6, 7: r = pool[$urandom_range(0, 5)];
      default: begin
        if (r[31:16] == '0 || r[31:16] == '1) r[31] = ~r[31];
        if (r[15:0] == '0 || r[15:0] == '1) r[0] = ~r[0];
      end
    endcase
    return r;
  endfunction

  initial begin
    for (int i = 0; i < NPROG; i++) begin
      automatic int c = $urandom_range(0, 9);
      cls[i]  = c < 6 ? C_ALU : c < 8 ? C_LOAD : c < 9 ? C_STORE : C_BR;
      arch[i] = AW'($urandom_range(1, NA - 1));
      val[i]  = gen_value();
      inj[i]  = has_dest(i) && $urandom_range(0, 24) == 0;
      ldn[i] = 0; tren[i] = 0; tdn[i] = 0; lvb_ent[i] = 0; corrupt[i] = 0;
    end
    for (int a = 0; a < NA; a++) begin lwriter[a] = -1; twriter[a] = -1; end
    for (int k = 0; k < 5; k++) begin n_reason[k] = 0; n_cw[k] = 0; end
    for (int k = 0; k < 4; k++) n_lsb_mode[k] = 0;
  end

  task automatic idle_inputs();
    ld_valid = 0; tr_valid = 0; lwb_valid = 0; twb_valid = 0; tl_valid = 0; mispredict = 0;
    lwb_fault = 0;
  endtask

  // ---------------- main core stream ----------------
  initial begin
    checks = 0; failures = 0; done = 0; violate_en = 0; drain = 0;
    idle_inputs();
    rd_trailing = 2'b10; rd_arch = '0;
    ld_has_dest = 0; ld_arch = 0; ld_ctrl = 0; tr_has_dest = 0; tr_arch = 0; tr_ctrl = 0;
    lwb_tag = 0; lwb_value = 0; lwb_is_load = 0; twb_tag = 0; twb_value = 0; tl_preg = 0;
    @(posedge rst_n);
    while (ci < NPROG) begin
      int lw_i, tw_i;
      @(negedge clk);
      cyc++;
      idle_inputs();
      violate_en = (cyc / 1500) % 2 == 1;
      drain = li == NPROG;
      // leading dispatch
      if (li < NPROG && $urandom_range(0, 9) != 0) begin
        ld_valid = 1; ld_has_dest = has_dest(li); ld_arch = arch[li]; ld_ctrl = cls[li] == C_BR;
      end
      // leading writeback: oldest ready one, or a random later one
      lw_i = -1;
      for (int i = ci; i < li; i++)
        if (!ldn[i] && lrdy[i] <= cyc) begin
          lw_i = i;
          if ($urandom_range(0, 2) != 0) break;
        end
      if (lw_i >= 0) begin
        lwb_valid = 1; lwb_tag = tag[lw_i]; lwb_value = val[lw_i]; lwb_is_load = cls[lw_i] == C_LOAD;
      end
      // trailing rename
      if (ti < li) begin
        tr_valid = 1; tr_has_dest = has_dest(ti); tr_arch = arch[ti]; tr_ctrl = cls[ti] == C_BR;
      end
      // trailing writeback (loads wait for the forwarded value)
      tw_i = -1;
      // every third 40-cycle window the oldest one is held back, so that
      // finished instructions pile up behind it and commit in a burst
      for (int i = ci; i < ti; i++)
        if (!(i == ci && (cyc / 40) % 3 == 0) && !tdn[i] && trdy[i] <= cyc && (cls[i] != C_LOAD || (ldn[i] && ldc[i] < cyc))) begin
          tw_i = i;
          if ($urandom_range(0, 2) != 0) break;
        end
      if (tw_i >= 0) begin
        twb_valid = 1; twb_tag = tag[tw_i]; twb_value = val[tw_i];
        if (inj[tw_i] && talloc[tw_i] != 2) twb_value = val[tw_i] ^ 32'h10;
        if (cls[tw_i] == C_LOAD && lvb_ent[tw_i]) begin tl_valid = 1; tl_preg = lp[tw_i]; end
      end
      if ($urandom_range(0, 199) == 0) mispredict = 1;
      // operand reads
      rd_arch[0] = AW'($urandom_range(0, NA - 1)); rd_arch[1] = AW'($urandom_range(0, NA - 1));
      #1;
      // ---- sample ----
      if (trace) begin
        if (ld_fire) $display("%0d LD i%0d cls%0d a%0d tag%0d p%0d v%h inj%b", cyc, li, cls[li], arch[li], ld_tag, ld_preg, val[li], inj[li]);
        if (lwb_valid) $display("%0d LWB i%0d rdy%b narrow%b cam%b skip%b", cyc, lw_i, lwb_ready, lwb_narrow, lwb_cam_hit, lwb_lvb_skip);
        if (tr_fire) $display("%0d TR i%0d tag%0d p%0d alloc%0d robsh%b why%0d", cyc, ti, tr_tag, tr_preg, tr_alloc, tr_rob_shared, slack_reason);
        if (c_valid != 0) for (int k = 0; k < 4; k++) if (c_valid[k]) $display("%0d   commit a%0d lp%0d tp%0d", cyc, c_arch[k], c_lpreg[k], c_tpreg[k]);
        if (twb_valid) $display("%0d TWB i%0d v%h flt%b", cyc, tw_i, twb_value, twb_fault);
        if (c_valid != 0) $display("%0d C %b flt %b", cyc, c_valid, c_fault);
      end
      if (ld_valid && !ld_fire) n_stall++;
      if (ld_fire) begin
        tag[li] = ld_tag; lp[li] = ld_preg; lrdy[li] = cyc + $urandom_range(1, 12);
        if (has_dest(li)) lwriter[arch[li]] = li;
        li++;
      end
      if (lwb_valid && lwb_ready) begin
        ldn[lw_i] = 1; ldc[lw_i] = cyc;
        n_narrow += lwb_narrow; n_cam += lwb_cam_hit;
        if (lwb_is_load) begin
          if (lwb_lvb_skip) n_lvb_skip++; else lvb_ent[lw_i] = 1;
        end
      end else if (lwb_valid) n_lvb_full++;
      if (tr_fire) begin
        checks++;
        if (tr_tag != tag[ti]) begin failures++; $display("FAIL trailing tag of %0d", ti); end
        talloc[ti] = int'(tr_alloc); tren[ti] = 1; trdy[ti] = cyc + $urandom_range(1, 8);
        if (has_dest(ti)) begin
          twriter[arch[ti]] = ti;
          case (tr_alloc) 0: n_own++; 1: n_shared++; default: n_reuse++; endcase
        end
        if (tr_rob_shared) n_rob_sh++; else n_rob_sep++;
        n_reason[slack_reason]++;
        ti++;
      end
      if (twb_valid) begin
        tdn[tw_i] = 1; tdc[tw_i] = cyc;
        if (twb_value != val[tw_i]) corrupt[tw_i] = 1;
        if (tl_valid) begin
          checks++;
          if (!tl_hit || tl_value != val[tw_i]) begin
            failures++; $display("FAIL load value for %0d: hit %b %h exp %h", tw_i, tl_hit, tl_value, val[tw_i]);
          end else n_lvb_hit++;
        end
      end
      if (mispredict) n_mispred++;
      // operand reads: leading port 0, trailing port 1
      for (int p = 0; p < 2; p++) begin
        automatic int w = (p == 1) ? twriter[rd_arch[p]] : lwriter[rd_arch[p]];
        automatic bit ready = (w < 0) || ((p == 1) ? (tdn[w] && tdc[w] < cyc && !corrupt[w]) : (ldn[w] && ldc[w] < cyc));
        if (ready) begin
          automatic logic [31:0] e = (w < 0) ? 32'h0 : val[w];
          checks++; n_rd++;
          if (rd_value[p] != e || rd_perr[p]) begin
            failures++;
            $display("FAIL read %s r%0d: %h exp %h (writer %0d)", (p == 1) ? "trailing" : "leading", rd_arch[p], rd_value[p], e, w);
          end
        end
      end
      // commit stream
      if (c_valid != 0) begin
        automatic int n = 0;
        for (int k = 0; k < 4; k++) if (c_valid[k]) begin
          checks++;
          if (c_fault[k] != (inj[ci] && corrupt[ci]) || c_arch[k] != arch[ci] && has_dest(ci)) begin
            failures++; $display("FAIL commit %0d: fault %b inj %b", ci, c_fault[k], inj[ci]);
          end
          n_fault += c_fault[k];
          ci++; n++;
        end
        n_cw[n]++;
      end
      checks++;
      if (usage_perr) begin failures++; $display("FAIL usage parity"); end
    end
    idle_inputs();
    $display("instructions %0d cycles %0d", NPROG, cyc);
    $display("trailing registers: own %0d shared(RBR) %0d reused(RVR) %0d", n_own, n_shared, n_reuse);
    $display("trailing ROB entries: shared %0d separate %0d; narrow results %0d; CAM hits %0d",
             n_rob_sh, n_rob_sep, n_narrow, n_cam);
    $display("slack release: reached %0d deadlock-escape %0d violation %0d drain %0d",
             n_reason[1], n_reason[2], n_reason[3], n_reason[4]);
    $display("LVB: skipped (LVBR) %0d forwarded %0d full-stalls %0d; leading stalls %0d; mispredicts %0d",
             n_lvb_skip, n_lvb_hit, n_lvb_full, n_stall, n_mispred);
    $display("commit width histogram 1:%0d 2:%0d 3:%0d 4:%0d; faults detected %0d; reads checked %0d",
             n_cw[1], n_cw[2], n_cw[3], n_cw[4], n_fault, n_rd);
    checks++;
    if (n_own == 0 || n_shared == 0 || n_reuse == 0 || n_rob_sh == 0 || n_rob_sep == 0 || n_cam == 0 ||
        (REQ_SLACK && n_reason[1] == 0) || n_reason[3] == 0 || n_reason[4] == 0 || (REQ_DEADLOCK && n_reason[2] == 0) ||
        n_lvb_skip == 0 || (REQ_LVB_FULL && n_lvb_full == 0) || n_lvb_hit == 0 || n_fault == 0 || n_mispred == 0 || n_stall == 0 ||
        n_cw[4] == 0 || n_cw[3] == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    wait (lsb_done);
    done = 1;
  end

  // ---------------- load/store buffer stream ----------------
  bit lsb_done = 0;
  initial begin
    m_ld_en = 0; m_ld_store = 0; m_la_en = 0; m_la_store = 0; m_la_idx = 0; m_la_addr = 0; m_la_val = 0;
    m_td_en = 0; m_td_store = 0; m_td_two_src = 0; m_tb_en = 0; m_tb_store = 0; m_tb_idx = 0;
    m_tb_addr = 0; m_tb_val = 0; m_c_load = 0; m_c_store = 0;
    @(posedge rst_n);
    for (int b = 0; b < 120; b++) begin
      automatic bit st = $urandom_range(0, 1) == 1, early = $urandom_range(0, 1) == 1, two = $urandom_range(0, 2) == 0;
      automatic logic [31:0] addr = $urandom, v = $urandom;
      automatic logic [SI-1:0] idx;
      automatic int mode;
      if ($urandom_range(0, 1) == 1) v[31:16] = '0;
      @(negedge clk); m_ld_en = 1; m_ld_store = st; #1; idx = m_ld_idx;
      checks++; if (!m_ld_ok) begin failures++; $display("FAIL LSB room"); end
      @(negedge clk); m_ld_en = 0;
      if (early) begin
        m_la_en = 1; m_la_store = st; m_la_idx = idx; m_la_addr = addr; m_la_val = v;
        @(negedge clk); m_la_en = 0;
      end
      m_td_en = 1; m_td_store = st; m_td_two_src = two; #1;
      mode = int'(m_td_mode);
      checks++;
      if (!m_td_avail || m_td_idx != idx ||
          mode != (st ? ((early && (v[31:16] == '0 || v[31:16] == '1 || v[15:0] == '0 || v[15:0] == '1)) ? 0 : 3)
                      : (early ? 0 : two ? 2 : 1))) begin
        failures++; $display("FAIL LSB mode %0d", mode);
      end
      n_lsb_mode[mode]++;
      if (mode == 2) begin
        @(negedge clk); m_td_en = 0;
        m_la_en = 1; m_la_store = st; m_la_idx = idx; m_la_addr = addr; m_la_val = v;
        @(negedge clk); m_la_en = 0; m_td_en = 1; #1; early = 1;
      end
      @(negedge clk); m_td_en = 0;
      if (!early) begin
        m_la_en = 1; m_la_store = st; m_la_idx = idx; m_la_addr = addr; m_la_val = v;
        @(negedge clk); m_la_en = 0;
      end
      m_tb_en = 1; m_tb_store = st; m_tb_idx = idx; m_tb_addr = addr; m_tb_val = v; #1;
      checks++; if (m_tb_fault) begin failures++; $display("FAIL LSB broadcast fault"); end
      @(negedge clk); m_tb_en = 0;
      if (st) m_c_store = 1; else m_c_load = 1; #1;
      checks++; if (m_c_fault) begin failures++; $display("FAIL LSB commit fault"); end
      @(negedge clk); m_c_store = 0; m_c_load = 0;
    end
    $display("LSB modes: share %0d depend %0d stall %0d separate %0d",
             n_lsb_mode[0], n_lsb_mode[1], n_lsb_mode[2], n_lsb_mode[3]);
    checks++;
    if (n_lsb_mode[0] == 0 || n_lsb_mode[1] == 0 || n_lsb_mode[2] == 0 || n_lsb_mode[3] == 0) begin
      failures++; $display("FAIL an LSB mode never happened");
    end
    lsb_done = 1;
  end
endmodule
