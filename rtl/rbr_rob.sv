// rbr_rob: reorder buffer of a staggered RMT core with RBR and RVR support.
//
// The ROB is split into a leading section (NL entries) and a trailing section
// (NT entries), each a circular queue. Every leading entry carries, besides
// its destination mapping (current and previous register, for ROB-walk
// recovery), a size bit that is cleared at dispatch and set when the
// instruction writes back a narrow result, and an RVR reuse candidate
// written when the CAM finds its result in another register.
//
// The replica pointer names the leading entry whose trailing copy is renamed
// next. The rename logic reads that entry (rp_* outputs) and then allocates
// the trailing copy (ta_*). A trailing copy whose mapping equals its
// leading copy's, and every control instruction, takes no trailing entry:
// the parity-bits buffer, one slot per leading entry, records that with a
// duplicated valid-parity bit and stores a parity bit computed from the
// trailing copy's own view of the entry. Other trailing copies take an entry
// in the trailing section with their mapping and a check bit (set when they
// were given the leading copy's register).
//
// Commit takes pairs in order from the leading head while commit_limiter
// allows (four ROB entries per cycle). Per pair it checks: both copies done,
// the result compare in the value buffer (cmp_* ports), equal valid-parity
// copies, the entry parity for a shared entry, and for a separate entry that
// the registers are equal exactly when the check bit is set. Any failure
// sets c_fault_o for that pair. Committed pairs release the previous
// mappings (c_*rel_* ports) for the usage vectors and the RVR CAM.
//
// Sizes follow the evaluated machine (160 leading, 32 trailing). Single
// dispatch, trailing rename and writeback per thread and cycle, and no
// squash, are this design's simplifications. NL and NT may be any size; the
// queue pointers wrap explicitly.
module rbr_rob
  import rbr_pkg::*;
#(
  parameter int NL = ROB_LDG,
  parameter int NT = ROB_TLG,
  parameter int NP = NPREG,
  parameter int NA = NARCH,
  parameter int CW = COMMIT_W,
  localparam int LW = $clog2(NL),
  localparam int TW = $clog2(NT),
  localparam int PW = $clog2(NP),
  localparam int AW = $clog2(NA)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // leading dispatch (into ltail)
  input  logic                  d_en,
  input  logic                  d_has_dest,
  input  logic [AW-1:0]         d_arch,
  input  logic [PW-1:0]         d_preg,
  input  logic [PW-1:0]         d_prev,
  input  logic                  d_ctrl,
  output logic                  d_ok_o,
  output logic [LW-1:0]         d_idx_o,
  // leading writeback
  input  logic                  lwb_en,
  input  logic [LW-1:0]         lwb_idx,
  input  logic                  lwb_narrow,
  input  logic                  lwb_fault,
  input  logic                  lwb_cand_v,
  input  logic [PW-1:0]         lwb_cand_preg,
  output logic [PW-1:0]         lwb_preg_o,
  output logic                  lwb_has_dest_o,
  output logic                  lwb_replicated_o, // trailing copy already renamed
  output logic                  lwb_oldest_o,     // entry is the ROB head
  // replica pointer view for trailing rename
  output logic                  rp_valid_o,
  output logic [LW-1:0]         rp_idx_o,
  output logic                  rp_has_dest_o,
  output logic [PW-1:0]         rp_preg_o,
  output logic [PW-1:0]         rp_prev_o,
  output logic                  rp_size_o,
  output logic                  rp_cand_v_o,
  output logic [PW-1:0]         rp_cand_preg_o,
  output logic [LW:0]           dist_o,         // leading entries not yet replicated
  // trailing allocation at the replica pointer
  input  logic                  ta_en,
  input  logic                  ta_sep,         // needs a trailing ROB entry
  input  logic                  ta_has_dest,
  input  logic [AW-1:0]         ta_arch,
  input  logic [PW-1:0]         ta_preg,
  input  logic [PW-1:0]         ta_prev,
  input  logic                  ta_ctrl,
  input  logic                  ta_check,
  output logic                  ta_sep_ok_o,    // trailing section has room
  // trailing writeback (tagged by the leading index)
  input  logic                  twb_en,
  input  logic [LW-1:0]         twb_idx,
  input  logic                  twb_fault,
  output logic [PW-1:0]         twb_preg_o,
  output logic                  twb_shared_o,   // write upper half of a shared register
  output logic                  twb_has_dest_o,
  // value buffer compare
  output logic [CW-1:0][LW-1:0] cmp_idx_o,
  output logic [CW-1:0]         cmp_shared_o,
  input  logic [CW-1:0]         cmp_mis_i,
  // commit
  output logic [CW-1:0]         c_valid_o,
  output logic [CW-1:0]         c_fault_o,
  output logic [CW-1:0]         c_sep_o,
  output logic [CW-1:0]         c_lrel_o,
  output logic [CW-1:0][PW-1:0] c_lrel_preg_o,
  output logic [CW-1:0]         c_trel_o,
  output logic [CW-1:0][PW-1:0] c_trel_preg_o,
  output logic [CW-1:0][AW-1:0] c_arch_o,
  output logic [CW-1:0][PW-1:0] c_lpreg_o,
  output logic [CW-1:0][PW-1:0] c_tpreg_o,
  output logic [LW:0]           nrep_o,         // trailing copies renamed, not committed
  output logic [LW:0]           lcount_o,
  output logic [TW:0]           tcount_o
);
  // leading section
  logic            l_has_dest [NL];
  logic [AW-1:0]   l_arch     [NL];
  logic [PW-1:0]   l_preg     [NL];
  logic [PW-1:0]   l_prev     [NL];
  logic            l_ctrl     [NL];
  logic            l_done     [NL];
  logic            l_fault    [NL];
  logic            size_bit   [NL];
  logic            cand_v     [NL];
  logic [PW-1:0]   cand_preg  [NL];
  // parity-bits buffer (one slot per leading entry)
  logic [1:0]      pb_vp      [NL];   // duplicated valid-parity bit
  logic            pb_par     [NL];
  logic            t_done     [NL];
  logic            t_fault    [NL];
  logic [TW-1:0]   t_idx      [NL];
  // trailing section
  logic [PW-1:0]   t_preg     [NT];
  logic [PW-1:0]   t_prev     [NT];
  logic            t_check    [NT];

  logic [LW-1:0] lhead, ltail, rep;
  logic [LW:0]   lcount, ndist, nrep;
  logic [TW-1:0] thead, ttail;
  logic [TW:0]   tcount;

  // Circular-queue pointer steps; s is below twice the section size.
  function automatic logic [LW-1:0] lwrap(int s);
    return LW'(s >= NL ? s - NL : s);
  endfunction
  function automatic logic [TW-1:0] twrap(int s);
    return TW'(s >= NT ? s - NT : s);
  endfunction

  function automatic logic entry_parity(logic hd, logic [AW-1:0] a, logic [PW-1:0] p,
                                        logic [PW-1:0] pv, logic c);
    return ^{hd, a, p, pv, c};
  endfunction

  // ---- dispatch / rename views -------------------------------------------
  assign d_ok_o        = lcount < (LW+1)'(NL);
  assign d_idx_o       = ltail;
  assign lwb_preg_o    = l_preg[lwb_idx];
  assign ndist         = lcount - nrep;
  assign dist_o        = ndist;
  assign rp_valid_o    = ndist != '0;
  assign rp_idx_o      = rep;
  assign rp_has_dest_o = l_has_dest[rep];
  assign rp_preg_o     = l_preg[rep];
  assign rp_prev_o     = l_prev[rep];
  assign rp_size_o     = size_bit[rep] && l_done[rep];
  assign rp_cand_v_o   = cand_v[rep] && l_done[rep];
  assign rp_cand_preg_o= cand_preg[rep];
  assign ta_sep_ok_o   = tcount < (TW+1)'(NT);
  assign twb_preg_o    = pb_vp[twb_idx][0] ? l_preg[twb_idx] : t_preg[t_idx[twb_idx]];
  assign twb_shared_o  = pb_vp[twb_idx][0] ? l_has_dest[twb_idx] : t_check[t_idx[twb_idx]];
  assign lcount_o      = lcount;
  assign nrep_o        = nrep;
  assign lwb_has_dest_o   = l_has_dest[lwb_idx];
  assign lwb_replicated_o = (LW+1)'(lwrap(int'(lwb_idx) + NL - int'(lhead))) < nrep;
  assign lwb_oldest_o     = lwb_idx == lhead;
  assign twb_has_dest_o   = l_has_dest[twb_idx];
  assign tcount_o      = tcount;


  // ---- commit window ------------------------------------------------------
  logic [CW-1:0] win_ready, win_shared, take;
  logic [$clog2(CW+1)-1:0] c_cnt;
  logic [LW-1:0] wl [CW];
  logic [TW-1:0] wt [CW];
  int unsigned   nsep;

  always_comb begin
    nsep = 0;
    for (int k = 0; k < CW; k++) begin
      wl[k]         = lwrap(int'(lhead) + k);
      wt[k]         = twrap(int'(thead) + int'(nsep));
      win_shared[k] = pb_vp[wl[k]][0];
      win_ready[k]  = (LW+1)'(k) < nrep && l_done[wl[k]] && t_done[wl[k]];
      if (!win_shared[k]) nsep = nsep + 1;
    end
  end

  commit_limiter #(.NSLOT(CW), .BUDGET(CW)) u_lim (
    .ready_i(win_ready), .shared_i(win_shared), .count_o(c_cnt), .take_o(take)
  );

  always_comb begin
    for (int k = 0; k < CW; k++) begin
      logic idmatch, pfail, vfail;
      cmp_idx_o[k]     = wl[k];
      cmp_shared_o[k]  = win_shared[k] ? l_has_dest[wl[k]] : t_check[wt[k]];
      c_valid_o[k]     = take[k];
      c_sep_o[k]       = !win_shared[k];
      idmatch          = l_preg[wl[k]] == t_preg[wt[k]];
      pfail            = win_shared[k] &&
                         (entry_parity(l_has_dest[wl[k]], l_arch[wl[k]], l_preg[wl[k]],
                                       l_prev[wl[k]], l_ctrl[wl[k]]) != pb_par[wl[k]]);
      vfail            = pb_vp[wl[k]][0] != pb_vp[wl[k]][1];
      c_fault_o[k]     = take[k] && (l_fault[wl[k]] || t_fault[wl[k]] || pfail || vfail ||
                         (l_has_dest[wl[k]] && cmp_mis_i[k]) ||
                         (!win_shared[k] && l_has_dest[wl[k]] && (idmatch != t_check[wt[k]])));
      c_lrel_o[k]      = take[k] && l_has_dest[wl[k]];
      c_lrel_preg_o[k] = l_prev[wl[k]];
      c_trel_o[k]      = take[k] && l_has_dest[wl[k]];
      c_trel_preg_o[k] = win_shared[k] ? l_prev[wl[k]] : t_prev[wt[k]];
      c_arch_o[k]      = l_arch[wl[k]];
      c_lpreg_o[k]     = l_preg[wl[k]];
      c_tpreg_o[k]     = win_shared[k] ? l_preg[wl[k]] : t_preg[wt[k]];
    end
  end

  // nrep: leading entries whose trailing copy is renamed, not yet committed
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nrep <= '0;
    else nrep <= nrep + (LW+1)'(ta_en) - (LW+1)'(c_cnt);
  end

  // ---- state ---------------------------------------------------------------
  logic [TW:0] c_tsep;
  always_comb begin
    c_tsep = '0;
    for (int k = 0; k < CW; k++) if (take[k] && !win_shared[k]) c_tsep = c_tsep + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lhead <= '0; ltail <= '0; rep <= '0; lcount <= '0;
      thead <= '0; ttail <= '0; tcount <= '0;
      for (int i = 0; i < NL; i++) begin
        l_done[i] <= 1'b0; l_fault[i] <= 1'b0; size_bit[i] <= 1'b0; cand_v[i] <= 1'b0;
        t_done[i] <= 1'b0; t_fault[i] <= 1'b0; pb_vp[i] <= '0; pb_par[i] <= 1'b0;
        l_has_dest[i] <= 1'b0; l_arch[i] <= '0; l_preg[i] <= '0; l_prev[i] <= '0;
        l_ctrl[i] <= 1'b0; cand_preg[i] <= '0; t_idx[i] <= '0;
      end
      for (int i = 0; i < NT; i++) begin
        t_preg[i] <= '0; t_prev[i] <= '0; t_check[i] <= 1'b0;
      end
    end else begin
      if (d_en && d_ok_o) begin
        l_has_dest[ltail] <= d_has_dest;
        l_arch[ltail]     <= d_arch;
        l_preg[ltail]     <= d_preg;
        l_prev[ltail]     <= d_prev;
        l_ctrl[ltail]     <= d_ctrl;
        l_done[ltail]     <= 1'b0;
        l_fault[ltail]    <= 1'b0;
        size_bit[ltail]   <= 1'b0;
        cand_v[ltail]     <= 1'b0;
        t_done[ltail]     <= 1'b0;
        t_fault[ltail]    <= 1'b0;
        ltail             <= lwrap(int'(ltail) + 1);
      end
      if (lwb_en) begin
        l_done[lwb_idx]    <= 1'b1;
        l_fault[lwb_idx]   <= lwb_fault;
        size_bit[lwb_idx]  <= lwb_narrow;
        cand_v[lwb_idx]    <= lwb_cand_v;
        cand_preg[lwb_idx] <= lwb_cand_preg;
      end
      if (ta_en) begin
        pb_vp[rep]  <= {2{!ta_sep}};
        pb_par[rep] <= entry_parity(ta_has_dest, ta_arch, ta_preg, ta_prev, ta_ctrl);
        t_idx[rep]  <= ttail;
        if (ta_sep) begin
          t_preg[ttail]  <= ta_preg;
          t_prev[ttail]  <= ta_prev;
          t_check[ttail] <= ta_check;
          ttail          <= twrap(int'(ttail) + 1);
        end
        rep <= lwrap(int'(rep) + 1);
      end
      if (twb_en) begin
        t_done[twb_idx]  <= 1'b1;
        t_fault[twb_idx] <= twb_fault;
      end
      lhead  <= lwrap(int'(lhead) + int'(c_cnt));
      thead  <= twrap(int'(thead) + int'(c_tsep));
      lcount <= lcount + (LW+1)'(d_en && d_ok_o) - (LW+1)'(c_cnt);
      tcount <= tcount + (TW+1)'(ta_en && ta_sep) - c_tsep;
    end
  end

  // ---- rules of the interface ----------------------------------------------
  a_ta_after_dispatch: assert property (@(posedge clk) disable iff (!rst_n) ta_en |-> rp_valid_o);
  a_ta_room:           assert property (@(posedge clk) disable iff (!rst_n) (ta_en && ta_sep) |-> ta_sep_ok_o);
endmodule
