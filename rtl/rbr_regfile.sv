// rbr_regfile: unified physical register file with register-bits reuse.
//
// Each of the NPREG 32-bit registers carries three status bits (width,
// location, value) and a parity bit over them. A leading result is size
// checked on write: a narrow result is stored compressed in bits 15:0 and
// the status bits are set; a normal result is stored whole with width=0.
// A trailing result whose instruction shares the leading copy's register
// (RBR) is compressed the same way into bits 31:16; if it is not narrow, or
// its location/value bits differ from the stored ones, tw_fault_o flags the
// instruction as faulty (the leading copy must then have been wrong about
// the size). A trailing result with a register of its own, or reusing an
// RVR register, is written whole.
//
// Reads are combinational through value_reconstruct; rd_hi selects the
// trailing copy of a shared register. rd_perr flags a parity error in the
// status bits. Writes take effect at the clock edge; on reset all registers
// are zero and marked normal. Port counts (one leading write, one trailing
// write, NRD reads) are this design's choice; the evaluated machine is 8
// wide.
module rbr_regfile
  import rbr_pkg::*;
#(
  parameter int N   = NPREG,
  parameter int NRD = 2,
  localparam int PW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // leading write
  input  logic                  lw_en,
  input  logic [PW-1:0]         lw_preg,
  input  logic [XLEN-1:0]       lw_val,
  output size_info_t            lw_info_o,   // size check result
  // trailing write
  input  logic                  tw_en,
  input  logic [PW-1:0]         tw_preg,
  input  logic                  tw_shared,   // RBR: write the upper half
  input  logic [XLEN-1:0]       tw_val,
  output logic                  tw_fault_o,
  // reads
  input  logic [NRD-1:0][PW-1:0] rd_preg,
  input  logic [NRD-1:0]         rd_hi,
  output logic [NRD-1:0][XLEN-1:0] rd_val,
  output logic [NRD-1:0]         rd_perr
);
  logic [XLEN-1:0] data   [N];
  size_info_t      info   [N];
  logic            parity [N];

  size_info_t      lw_info, tw_info;
  logic [HALF-1:0] lw_sig,  tw_sig;

  narrow_detect u_nd_l (.val_i(lw_val), .info_o(lw_info), .sig_o(lw_sig));
  narrow_detect u_nd_t (.val_i(tw_val), .info_o(tw_info), .sig_o(tw_sig));

  assign lw_info_o = lw_info;

  always_comb begin
    tw_fault_o = 1'b0;
    if (tw_en && tw_shared)
      tw_fault_o = !tw_info.width || !info[tw_preg].width ||
                   (tw_info.location != info[tw_preg].location) ||
                   (tw_info.value    != info[tw_preg].value);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        data[i]   <= '0;
        info[i]   <= '0;
        parity[i] <= 1'b0;
      end
    end else begin
      if (lw_en) begin
        if (lw_info.width) data[lw_preg][HALF-1:0] <= lw_sig;
        else               data[lw_preg]           <= lw_val;
        info[lw_preg]   <= lw_info;
        parity[lw_preg] <= parity3(lw_info);
      end
      if (tw_en) begin
        if (tw_shared) data[tw_preg][XLEN-1:HALF] <= tw_sig;
        else begin
          data[tw_preg] <= tw_val;
          if (!(lw_en && lw_preg == tw_preg)) begin
            info[tw_preg]   <= '0;
            parity[tw_preg] <= 1'b0;
          end
        end
      end
    end
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    value_reconstruct u_rc (
      .raw_i (data[rd_preg[r]]),
      .info_i(info[rd_preg[r]]),
      .hi_i  (rd_hi[r]),
      .val_o (rd_val[r])
    );
    assign rd_perr[r] = parity3(info[rd_preg[r]]) ^ parity[rd_preg[r]];
  end
endmodule
