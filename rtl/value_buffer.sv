// value_buffer: additional value buffer (AVB) for the commit-time compare.
//
// The results of both copies of an instruction are compared when the pair
// commits. To keep that off the register file ports, results are also
// written here, one entry per leading ROB entry. The entry mirrors the
// register: a narrow leading result is kept compressed in bits 15:0 with
// its status bits; when the trailing copy shares the register, its
// compressed result goes to bits 31:16 of the same word, so the compare
// needs a single read of one word (upper half against lower half). A
// trailing copy with a register of its own writes a second word and the
// compare reads both, rebuilding the leading value first.
//
// Writes happen at the clock edge. NCMP compare ports are combinational:
// cmp_mis_o[k] is 1 when the two results differ. The storage layout is this
// design's choice; the buffer's role and the single-read case for a shared
// register follow the RBR scheme.
module value_buffer
  import rbr_pkg::*;
#(
  parameter int N    = ROB_LDG,
  parameter int NCMP = COMMIT_W,
  localparam int IW  = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   lw_en,
  input  logic [IW-1:0]          lw_idx,
  input  logic [XLEN-1:0]        lw_val,
  input  logic                   tw_en,
  input  logic [IW-1:0]          tw_idx,
  input  logic                   tw_shared,
  input  logic [XLEN-1:0]        tw_val,
  input  logic [NCMP-1:0][IW-1:0] cmp_idx,
  input  logic [NCMP-1:0]        cmp_shared,
  output logic [NCMP-1:0]        cmp_mis_o
);
  logic [XLEN-1:0] word_l [N];
  logic [XLEN-1:0] word_t [N];
  size_info_t      info_l [N];

  size_info_t      lw_info, tw_info;
  logic [HALF-1:0] lw_sig, tw_sig;

  narrow_detect u_nd_l (.val_i(lw_val), .info_o(lw_info), .sig_o(lw_sig));
  narrow_detect u_nd_t (.val_i(tw_val), .info_o(tw_info), .sig_o(tw_sig));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        word_l[i] <= '0;
        word_t[i] <= '0;
        info_l[i] <= '0;
      end
    end else begin
      if (lw_en) begin
        word_l[lw_idx] <= lw_info.width ? {word_l[lw_idx][XLEN-1:HALF], lw_sig} : lw_val;
        info_l[lw_idx] <= lw_info;
      end
      if (tw_en) begin
        if (tw_shared) word_l[tw_idx][XLEN-1:HALF] <= tw_sig;
        else           word_t[tw_idx]              <= tw_val;
      end
    end
  end

  for (genvar k = 0; k < NCMP; k++) begin : g_cmp
    logic [XLEN-1:0] lval;
    value_reconstruct u_rc (
      .raw_i(word_l[cmp_idx[k]]), .info_i(info_l[cmp_idx[k]]), .hi_i(1'b0), .val_o(lval)
    );
    always_comb begin
      if (cmp_shared[k])
        cmp_mis_o[k] = word_l[cmp_idx[k]][XLEN-1:HALF] != word_l[cmp_idx[k]][HALF-1:0];
      else
        cmp_mis_o[k] = lval != word_t[cmp_idx[k]];
    end
  end

  // Only the significant half of a trailing result is kept when shared;
  // its size bits are checked by the register file at write time.
  logic unused;
  assign unused = ^tw_info;
endmodule
