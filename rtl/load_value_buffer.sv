// load_value_buffer: forwards values loaded by the leading thread to the
// trailing thread, with load value buffer reduction (LVBR).
//
// Only leading loads access memory. Their values reach the trailing copies
// through this fully associative buffer of (register identifier, value)
// entries. A trailing load broadcasts the register identifier of its leading
// copy; on a match it takes the value and the entry is freed, on a miss it
// waits (rd_hit_o=0) to be woken by the leading load's write.
// LVBR: if the leading load's value is narrow and its trailing copy has not
// been renamed yet (the replica pointer has not passed it), the trailing copy
// will share the register and read the value there, so no entry is taken
// (w_skip_o). Writes take the lowest free entry; w_ok_o=0 when an entry is
// needed and none may be taken. The last free entry is kept for the oldest
// instruction in flight (w_oldest): younger loads could otherwise fill the
// buffer while the oldest load, which all commits wait for, finds no room.
// That reservation is this design's choice. Lookups are combinational, updates happen at
// the clock edge. The 16 entries are the size used with LVBR.
module load_value_buffer
  import rbr_pkg::*;
#(
  parameter int N   = LVB_N,
  parameter int NP  = NPREG,
  localparam int PW = $clog2(NP)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            w_en,          // leading load writes back
  input  logic [PW-1:0]   w_preg,
  input  logic [XLEN-1:0] w_val,
  input  logic            w_tr_renamed,  // its trailing copy is already renamed
  input  logic            w_oldest,      // it is the oldest instruction in flight
  output logic            w_ok_o,
  output logic            w_skip_o,      // LVBR: no entry needed
  input  logic            rd_en,         // trailing load broadcast
  input  logic [PW-1:0]   rd_preg,
  output logic            rd_hit_o,
  output logic [XLEN-1:0] rd_val_o,
  output logic [$clog2(N+1)-1:0] used_o
);
  logic            valid [N];
  logic [PW-1:0]   preg  [N];
  logic [XLEN-1:0] value [N];

  size_info_t      w_info;
  logic [HALF-1:0] w_sig;
  logic            has_free, has_two;
  logic [$clog2(N)-1:0] free_idx, hit_idx;

  narrow_detect u_nd (.val_i(w_val), .info_o(w_info), .sig_o(w_sig));

  always_comb begin
    w_skip_o = w_info.width && !w_tr_renamed;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (!valid[i]) begin has_free = 1'b1; free_idx = ($clog2(N))'(i); end
    used_o   = '0;
    for (int i = 0; i < N; i++) used_o = used_o + valid[i];
    has_two  = int'(used_o) + 2 <= N;
    w_ok_o   = w_skip_o || has_two || (has_free && w_oldest);
    rd_hit_o = 1'b0;
    hit_idx  = '0;
    for (int i = N - 1; i >= 0; i--)
      if (valid[i] && preg[i] == rd_preg) begin rd_hit_o = rd_en; hit_idx = ($clog2(N))'(i); end
    rd_val_o = value[hit_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        valid[i] <= 1'b0; preg[i] <= '0; value[i] <= '0;
      end
    end else begin
      if (rd_hit_o) valid[hit_idx] <= 1'b0;
      if (w_en && !w_skip_o && w_ok_o) begin
        valid[free_idx] <= 1'b1;
        preg[free_idx]  <= w_preg;
        value[free_idx] <= w_val;
      end
    end
  end

  // The significant part itself is kept in the register, not here.
  logic unused;
  assign unused = ^w_sig;
endmodule
