// lsb_check: load/store buffer with reduced redundancy for trailing
// memory instructions.
//
// Leading loads and stores take entries in the load buffer (NLB) and the
// store buffer (NSB) in program order and fill in their address (and store
// value) when their address is generated, which sets the entry's valid bit.
// Two LSB pointers, one per buffer, name the next leading entry whose
// trailing copy is dispatched. A trailing memory instruction is dispatched
// with td_* and told how it executes (td_mode_o):
//   SHARE  - the leading address is known: no entry is allocated; the
//            trailing copy later broadcasts its address (tb_*) into the
//            buffer and it is compared with the leading entry;
//   DEPEND - trailing load whose leading address is not known yet and that
//            has one register operand: no entry, made dependent on the
//            leading load, then it broadcasts like SHARE;
//   STALL  - trailing load with two register operands and unknown leading
//            address: dispatch waits (the pointer does not move);
//   SEP    - trailing store whose leading copy has no address yet or stores
//            a normal-sized value: it takes one of NSBT trailing store
//            entries; its broadcast fills that entry and the compare with
//            the leading store is done at commit.
// Any address (or store value) mismatch marks the instruction faulty
// (tb_fault_o / c_fault_o). After a store's compare, a parity bit over the
// leading address protects it until commit. Commit (c_load/c_store) frees
// the head entries. Decisions and compares are combinational; state changes
// at the clock edge. Entry counts follow the evaluated machine (40 leading
// load entries, 35 leading store entries, no trailing load entries, 5
// trailing store entries); the counts need not be powers of two.
module lsb_check
  import rbr_pkg::*;
#(
  parameter int NLB  = LB_LDG,
  parameter int NSB  = SB_LDG,
  parameter int NSBT = SB_TLG,
  parameter int AWID = XLEN,
  localparam int LI  = $clog2(NLB),
  localparam int SI  = $clog2((NSB > NLB) ? NSB : NLB),  // index width shared by both buffers
  localparam int TI  = (NSBT > 1) ? $clog2(NSBT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // leading dispatch
  input  logic             ld_en,
  input  logic             ld_store,
  output logic             ld_ok_o,
  output logic [SI-1:0]    ld_idx_o,      // entry index (load or store buffer)
  // leading address generation
  input  logic             la_en,
  input  logic             la_store,
  input  logic [SI-1:0]    la_idx,
  input  logic [AWID-1:0]  la_addr,
  input  logic [XLEN-1:0]  la_val,
  // trailing dispatch at the LSB pointer
  input  logic             td_en,
  input  logic             td_store,
  input  logic             td_two_src,
  output logic             td_avail_o,    // a leading entry is waiting
  output logic [1:0]       td_mode_o,     // 0 SHARE 1 DEPEND 2 STALL 3 SEP
  output logic [SI-1:0]    td_idx_o,      // leading entry of the pair
  // trailing broadcast
  input  logic             tb_en,
  input  logic             tb_store,
  input  logic [SI-1:0]    tb_idx,
  input  logic [AWID-1:0]  tb_addr,
  input  logic [XLEN-1:0]  tb_val,
  output logic             tb_fault_o,
  // commit of the oldest load / store pair
  input  logic             c_load,
  input  logic             c_store,
  output logic             c_fault_o,
  output logic [$clog2(NSBT+1)-1:0] tsb_used_o
);
  localparam logic [1:0] M_SHARE = 2'd0, M_DEPEND = 2'd1, M_STALL = 2'd2, M_SEP = 2'd3;

  logic            lb_v    [NLB];
  logic [AWID-1:0] lb_addr [NLB];
  logic            sb_v    [NSB];
  logic [AWID-1:0] sb_addr [NSB];
  logic [XLEN-1:0] sb_val  [NSB];
  logic            sb_par  [NSB];
  logic            sb_pv   [NSB];   // valid-parity: address checked and protected
  logic            sb_sep  [NSB];   // trailing copy holds its own entry
  logic [TI-1:0]   sb_tix  [NSB];
  logic [AWID-1:0] tsb_addr[NSBT];
  logic [XLEN-1:0] tsb_val [NSBT];

  logic [LI-1:0] lhead, ltail, lptr;
  logic [SI-1:0] shead, stail, sptr;
  logic [LI:0]   lcnt, lpend;
  logic [SI:0]   scnt, spend;
  logic [TI-1:0] thead, ttail;
  logic [$clog2(NSBT+1)-1:0] tcnt;

  function automatic logic [LI-1:0] linc(logic [LI-1:0] x);
    return (x == LI'(NLB - 1)) ? '0 : x + 1'b1;
  endfunction
  function automatic logic [SI-1:0] sinc(logic [SI-1:0] x);
    return (x == SI'(NSB - 1)) ? '0 : x + 1'b1;
  endfunction
  function automatic logic [TI-1:0] tinc(logic [TI-1:0] x);
    return (x == TI'(NSBT - 1)) ? '0 : x + 1'b1;
  endfunction

  size_info_t      sv_info;
  logic [HALF-1:0] sv_sig;
  narrow_detect u_nd (.val_i(sb_val[sptr]), .info_o(sv_info), .sig_o(sv_sig));

  // ---- leading dispatch --------------------------------------------------
  assign ld_ok_o  = ld_store ? (scnt < (SI+1)'(NSB)) : (lcnt < (LI+1)'(NLB));
  assign ld_idx_o = ld_store ? stail : SI'(ltail);

  // ---- trailing dispatch -------------------------------------------------
  always_comb begin
    td_avail_o = td_store ? (spend != '0) : (lpend != '0);
    td_idx_o   = td_store ? sptr : SI'(lptr);
    if (td_store) begin
      if (sb_v[sptr] && sv_info.width) td_mode_o = M_SHARE;
      else                             td_mode_o = (tcnt < ($clog2(NSBT+1))'(NSBT)) ? M_SEP : M_STALL;
    end else begin
      if (lb_v[lptr])                  td_mode_o = M_SHARE;
      else if (!td_two_src)            td_mode_o = M_DEPEND;
      else                             td_mode_o = M_STALL;
    end
  end

  // ---- trailing broadcast compare ----------------------------------------
  always_comb begin
    tb_fault_o = 1'b0;
    if (tb_en && !tb_store) tb_fault_o = lb_addr[tb_idx[LI-1:0]] != tb_addr;
    if (tb_en && tb_store && !sb_sep[tb_idx])
      tb_fault_o = (sb_addr[tb_idx] != tb_addr) || (sb_val[tb_idx] != tb_val);
  end

  // ---- commit check --------------------------------------------------------
  always_comb begin
    c_fault_o = 1'b0;
    if (c_store) begin
      if (sb_sep[shead])
        c_fault_o = (tsb_addr[sb_tix[shead]] != sb_addr[shead]) ||
                    (tsb_val[sb_tix[shead]]  != sb_val[shead]);
      else if (sb_pv[shead])
        c_fault_o = (^sb_addr[shead]) != sb_par[shead];
    end
  end
  assign tsb_used_o = tcnt;

  logic td_take;
  assign td_take = td_en && td_avail_o && td_mode_o != M_STALL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lhead <= '0; ltail <= '0; lptr <= '0; lcnt <= '0; lpend <= '0;
      shead <= '0; stail <= '0; sptr <= '0; scnt <= '0; spend <= '0;
      thead <= '0; ttail <= '0; tcnt <= '0;
      for (int i = 0; i < NLB; i++) begin lb_v[i] <= 1'b0; lb_addr[i] <= '0; end
      for (int i = 0; i < NSB; i++) begin
        sb_v[i] <= 1'b0; sb_addr[i] <= '0; sb_val[i] <= '0; sb_par[i] <= 1'b0;
        sb_pv[i] <= 1'b0; sb_sep[i] <= 1'b0; sb_tix[i] <= '0;
      end
      for (int i = 0; i < NSBT; i++) begin tsb_addr[i] <= '0; tsb_val[i] <= '0; end
    end else begin
      // leading dispatch
      if (ld_en && ld_ok_o) begin
        if (ld_store) begin
          sb_v[stail] <= 1'b0; sb_pv[stail] <= 1'b0; sb_sep[stail] <= 1'b0;
          stail <= sinc(stail);
        end else begin
          lb_v[ltail] <= 1'b0;
          ltail <= linc(ltail);
        end
      end
      // leading address generation
      if (la_en) begin
        if (la_store) begin
          sb_v[la_idx] <= 1'b1; sb_addr[la_idx] <= la_addr; sb_val[la_idx] <= la_val;
        end else begin
          lb_v[la_idx[LI-1:0]] <= 1'b1; lb_addr[la_idx[LI-1:0]] <= la_addr;
        end
      end
      // trailing dispatch
      if (td_take) begin
        if (td_store) begin
          if (td_mode_o == M_SEP) begin
            sb_sep[sptr] <= 1'b1; sb_tix[sptr] <= ttail;
            ttail <= tinc(ttail);
          end
          sptr <= sinc(sptr);
        end else lptr <= linc(lptr);
      end
      // trailing broadcast
      if (tb_en && tb_store) begin
        if (sb_sep[tb_idx]) begin
          tsb_addr[sb_tix[tb_idx]] <= tb_addr; tsb_val[sb_tix[tb_idx]] <= tb_val;
        end else begin
          sb_pv[tb_idx] <= 1'b1; sb_par[tb_idx] <= ^sb_addr[tb_idx];
        end
      end
      // commit
      if (c_load)  lhead <= linc(lhead);
      if (c_store) begin
        shead <= sinc(shead);
        if (sb_sep[shead]) thead <= tinc(thead);
      end
      lcnt  <= lcnt  + (LI+1)'(ld_en && ld_ok_o && !ld_store) - (LI+1)'(c_load);
      scnt  <= scnt  + (SI+1)'(ld_en && ld_ok_o &&  ld_store) - (SI+1)'(c_store);
      lpend <= lpend + (LI+1)'(ld_en && ld_ok_o && !ld_store) - (LI+1)'(td_take && !td_store);
      spend <= spend + (SI+1)'(ld_en && ld_ok_o &&  ld_store) - (SI+1)'(td_take &&  td_store);
      tcnt  <= tcnt + ($clog2(NSBT+1))'(td_take && td_store && td_mode_o == M_SEP)
                    - ($clog2(NSBT+1))'(c_store && sb_sep[shead]);
    end
  end

  logic unused;
  assign unused = ^{sv_sig, sv_info.location, sv_info.value, thead};
endmodule
