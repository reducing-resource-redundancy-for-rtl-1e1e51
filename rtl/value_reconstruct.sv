// value_reconstruct: rebuilds a full 32-bit operand from a register read
// (RBR reconstruct stage, placed after register read).
//
// A register marked narrow holds 16-bit significant parts: the leading copy's
// in bits 15:0 and, when shared, the trailing copy's in bits 31:16. The
// reader picks a half with hi_i, then the location/value bits say where the
// 16 non-significant bits go and whether they are zeros or ones. A register
// not marked narrow is passed through whole. Purely combinational.
module value_reconstruct
  import rbr_pkg::*;
(
  input  logic [XLEN-1:0] raw_i,   // register contents
  input  size_info_t      info_i,  // status bits of the register
  input  logic            hi_i,    // 1: read the trailing copy (upper half)
  output logic [XLEN-1:0] val_o
);
  logic [HALF-1:0] sig;
  logic [HALF-1:0] fill;

  always_comb begin
    sig  = hi_i ? raw_i[XLEN-1:HALF] : raw_i[HALF-1:0];
    fill = {HALF{info_i.value}};
    if (!info_i.width)         val_o = raw_i;
    else if (info_i.location)  val_o = {fill, sig};
    else                       val_o = {sig, fill};
  end
endmodule
