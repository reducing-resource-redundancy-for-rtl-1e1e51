// narrow_detect: size check of a result value (RBR size-check stage).
//
// A 32-bit value is narrow when at least its 16 leading bits or its 16
// trailing bits are all zeros or all ones. The other half is then the
// significant part and fits in 16 bits. The outputs are the three status
// bits kept with a register: width (narrow), location (1 when the
// non-significant bits are in front, i.e. the upper half) and value (1 when
// the non-significant bits are ones). Example: 0xfa25ffff gives width,
// location, value = 1,0,1 and significant part 0xfa25.
//
// The narrow test and the bit meanings follow the RBR scheme. When both
// halves qualify (e.g. 0x0000ffff), this design prefers location=1 (upper
// half non-significant), which favours the traditional narrow value.
// Purely combinational.
module narrow_detect
  import rbr_pkg::*;
(
  input  logic [XLEN-1:0] val_i,
  output size_info_t      info_o,
  output logic [HALF-1:0] sig_o
);
  logic up0, up1, lo0, lo1;

  always_comb begin
    up0 = (val_i[XLEN-1:HALF] == '0);
    up1 = (val_i[XLEN-1:HALF] == '1);
    lo0 = (val_i[HALF-1:0] == '0);
    lo1 = (val_i[HALF-1:0] == '1);
    info_o = '0;
    sig_o  = val_i[HALF-1:0];
    if (up0 || up1) begin
      info_o.width    = 1'b1;
      info_o.location = 1'b1;
      info_o.value    = up1;
      sig_o           = val_i[HALF-1:0];
    end else if (lo0 || lo1) begin
      info_o.width    = 1'b1;
      info_o.location = 1'b0;
      info_o.value    = lo1;
      sig_o           = val_i[XLEN-1:HALF];
    end
  end
endmodule
