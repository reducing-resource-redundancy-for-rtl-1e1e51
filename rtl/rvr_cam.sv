// rvr_cam: register value reuse (RVR) CAM.
//
// A small fully associative buffer of recent normal-sized results. Each
// entry holds the value, the physical register that holds it, a valid bit
// and a type bit (integer / floating point). When a leading instruction
// writes back a normal result (lk_en), the value is searched among valid
// entries of the same type:
//   hit  - hit_o/hit_preg_o name the register already holding the value
//          (the reuse candidate for the trailing copy of this instruction),
//          and the entry's register identifier is replaced by the new
//          instruction's register, which now also holds the value;
//   miss - the least recently filled entry is overwritten with the value.
// When a leading instruction that redefines a register commits, entries
// holding that register are invalidated (NINV ports, one per commit slot).
// The search is combinational; updates happen at the clock edge. Entry
// count 8 and the fields follow the RVR scheme; FIFO replacement is the
// reading of "least recently filled".
module rvr_cam
  import rbr_pkg::*;
#(
  parameter int N    = CAM_N,
  parameter int NP   = NPREG,
  parameter int NINV = COMMIT_W,
  localparam int PW  = $clog2(NP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   lk_en,
  input  logic [XLEN-1:0]        lk_val,
  input  logic                   lk_type,
  input  logic [PW-1:0]          lk_preg,
  output logic                   hit_o,
  output logic [PW-1:0]          hit_preg_o,
  input  logic [NINV-1:0]        inv_en,
  input  logic [NINV-1:0][PW-1:0] inv_preg
);
  typedef struct packed {
    logic            valid;
    logic            typ;
    logic [PW-1:0]   preg;
    logic [XLEN-1:0] value;
  } cam_entry_t;

  cam_entry_t             ent [N];
  logic [$clog2(N)-1:0]   fill_ptr;
  logic [$clog2(N)-1:0]   hit_idx;

  always_comb begin
    hit_o      = 1'b0;
    hit_idx    = '0;
    for (int i = N - 1; i >= 0; i--)
      if (ent[i].valid && ent[i].typ == lk_type && ent[i].value == lk_val) begin
        hit_o   = 1'b1;
        hit_idx = ($clog2(N))'(i);
      end
    hit_preg_o = ent[hit_idx].preg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ent[i] <= '0;
      fill_ptr <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        for (int k = 0; k < NINV; k++)
          if (inv_en[k] && ent[i].preg == inv_preg[k]) ent[i].valid <= 1'b0;
      if (lk_en) begin
        if (hit_o) ent[hit_idx].preg <= lk_preg;
        else begin
          ent[fill_ptr] <= '{valid: 1'b1, typ: lk_type, preg: lk_preg, value: lk_val};
          fill_ptr      <= fill_ptr + 1'b1;
        end
      end
    end
  end
endmodule
