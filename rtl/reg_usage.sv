// reg_usage: register allocation state for RBR and RVR.
//
// Two usage bit vectors, one per thread, say which physical registers are
// mapped by leading and by trailing instructions. A register shared by both
// copies of an instruction (RBR) or reused by a trailing instruction (RVR)
// has both bits set, and returns to the free pool only when both are clear.
// A parity bit per register protects the pair of usage bits (perr_o).
// The candidate-valid vector marks registers recorded as RVR reuse
// candidates: set when the CAM names the register and cleared when a
// trailing instruction reuses it. This design also keeps a register with
// its candidate bit set out of the free pool: it cannot be reallocated
// (and given another value) before the trailing instruction that recorded
// it as candidate has been renamed, so a stale candidate is never reused.
//
// Allocation: the leading port takes the lowest-numbered free register and
// the trailing port the highest-numbered other one, so both can allocate in
// the same cycle (the trailing port needs two free registers). Grants are combinational; the state updates at the clock
// edge. Up to NREL leading and NREL trailing releases per cycle. After reset
// registers 0..NARCH-1 hold the architectural state of both threads.
module reg_usage
  import rbr_pkg::*;
#(
  parameter int N    = NPREG,
  parameter int NA   = NARCH,
  parameter int NREL = COMMIT_W,
  localparam int PW  = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   al_req,      // leading allocation
  output logic                   al_ok,
  output logic [PW-1:0]          al_preg,
  input  logic                   at_req,      // trailing allocation
  output logic                   at_ok,
  output logic [PW-1:0]          at_preg,
  input  logic                   st_en,       // trailing maps an existing register
  input  logic [PW-1:0]          st_preg,
  input  logic [NREL-1:0]        rl_en,       // leading releases
  input  logic [NREL-1:0][PW-1:0] rl_preg,
  input  logic [NREL-1:0]        rt_en,       // trailing releases
  input  logic [NREL-1:0][PW-1:0] rt_preg,
  input  logic                   cs_en,       // mark reuse candidate
  input  logic [PW-1:0]          cs_preg,
  input  logic                   cc_en,       // candidate reused
  input  logic [PW-1:0]          cc_preg,
  output logic [N-1:0]           cand_valid_o,
  output logic [N-1:0]           free_o,
  output logic                   perr_o
);
  logic [N-1:0] use_l, use_t, par, cand;
  logic [N-1:0] nl, nt, nc;

  always_comb begin
    free_o  = ~(use_l | use_t | cand);
    al_ok   = 1'b0;
    al_preg = '0;
    for (int i = N - 1; i >= 0; i--)
      if (free_o[i]) begin al_ok = 1'b1; al_preg = PW'(i); end
    at_ok   = 1'b0;
    at_preg = '0;
    for (int i = 0; i < N; i++)
      if (free_o[i] && al_preg != PW'(i)) begin
        at_ok = 1'b1; at_preg = PW'(i);
      end
    perr_o = |(par ^ use_l ^ use_t);
  end

  always_comb begin
    nl = use_l;
    nt = use_t;
    nc = cand;
    for (int k = 0; k < NREL; k++) begin
      if (rl_en[k]) nl[rl_preg[k]] = 1'b0;
      if (rt_en[k]) nt[rt_preg[k]] = 1'b0;
    end
    if (al_req && al_ok) nl[al_preg] = 1'b1;
    if (at_req && at_ok) nt[at_preg] = 1'b1;
    if (st_en)           nt[st_preg] = 1'b1;
    if (cc_en) nc[cc_preg] = 1'b0;
    if (cs_en) nc[cs_preg] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        use_l[i] <= (i < NA);
        use_t[i] <= (i < NA);
        par[i]   <= 1'b0;
      end
      cand <= '0;
    end else begin
      use_l <= nl;
      use_t <= nt;
      par   <= nl ^ nt;
      cand  <= nc;
    end
  end

  assign cand_valid_o = cand;
endmodule
