// rbr_rename: front-end map tables of the two threads.
//
// The leading and trailing threads are renamed with separate map tables.
// Each trailing entry carries a map bit, kept in two copies, that is set
// when the trailing mapping of that architectural register is the same
// physical register as the leading mapping (its copies got one shared
// register). A trailing instruction whose previous mapping has the map bit
// set and whose new register equals its leading copy's register has a ROB
// entry identical to the leading one and needs no ROB entry of its own; the
// rename outputs tr_mbit_o for that decision. The two copies must agree,
// otherwise the bit counts as clear, so an upset can only cost an entry.
// All map bits are cleared on a branch misprediction (mispredict).
//
// Each trailing entry also holds a half bit (this design's addition) that
// tells readers to take the trailing copy from the upper half of a shared
// narrow register; unlike the map bit it is not cleared on misprediction.
// Reads are combinational; writes happen at the clock edge. After reset
// architectural register i maps to physical register i in both tables, with
// map bits set.
module rbr_rename
  import rbr_pkg::*;
#(
  parameter int NA  = NARCH,
  parameter int NP  = NPREG,
  parameter int NS  = 2,            // source read ports per thread
  localparam int AW = $clog2(NA),
  localparam int PW = $clog2(NP)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mispredict,
  // leading destination rename
  input  logic                 lr_en,
  input  logic [AW-1:0]        lr_arch,
  input  logic [PW-1:0]        lr_preg,
  output logic [PW-1:0]        lr_prev_o,
  // trailing destination rename
  input  logic                 tr_en,
  input  logic [AW-1:0]        tr_arch,
  input  logic [PW-1:0]        tr_preg,
  input  logic                 tr_same,      // same register as the leading copy
  output logic [PW-1:0]        tr_prev_o,
  output logic                 tr_mbit_o,
  // source lookups
  input  logic [NS-1:0][AW-1:0] ls_arch,
  output logic [NS-1:0][PW-1:0] ls_preg_o,
  input  logic [NS-1:0][AW-1:0] ts_arch,
  output logic [NS-1:0][PW-1:0] ts_preg_o,
  output logic [NS-1:0]         ts_hi_o
);
  logic [PW-1:0] lmap [NA];
  logic [PW-1:0] tmap [NA];
  logic [1:0]    mbit [NA];
  logic          half [NA];

  assign lr_prev_o = lmap[lr_arch];
  assign tr_prev_o = tmap[tr_arch];
  assign tr_mbit_o = &mbit[tr_arch];

  for (genvar s = 0; s < NS; s++) begin : g_src
    assign ls_preg_o[s] = lmap[ls_arch[s]];
    assign ts_preg_o[s] = tmap[ts_arch[s]];
    assign ts_hi_o[s]   = half[ts_arch[s]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NA; i++) begin
        lmap[i] <= PW'(i);
        tmap[i] <= PW'(i);
        mbit[i] <= 2'b11;
        half[i] <= 1'b0;
      end
    end else begin
      if (lr_en) lmap[lr_arch] <= lr_preg;
      if (tr_en) begin
        tmap[tr_arch] <= tr_preg;
        mbit[tr_arch] <= {2{tr_same}};
        half[tr_arch] <= tr_same;
      end
      if (mispredict)
        for (int i = 0; i < NA; i++) mbit[i] <= 2'b00;
    end
  end
endmodule
