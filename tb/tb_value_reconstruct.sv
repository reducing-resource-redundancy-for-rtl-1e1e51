// tb_value_reconstruct: packs random narrow values into a register the way
// the register file does (leading copy in bits 15:0, trailing copy in bits
// 31:16) with a reference compressor, then checks that both halves
// reconstruct to the original values, and that normal registers pass
// through whole.
module tb_value_reconstruct;
  import rbr_pkg::*;
  logic [31:0] raw, val;
  size_info_t  info;
  logic        hi;
  int checks = 0, failures = 0;

  value_reconstruct dut (.raw_i(raw), .info_i(info), .hi_i(hi), .val_o(val));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] a, b;
      logic loc, vb;
      logic [31:0] va, vbv;
      a = 16'($urandom); b = 16'($urandom);
      loc = 1'($urandom); vb = 1'($urandom);
      va  = loc ? {{16{vb}}, a} : {a, {16{vb}}};
      vbv = loc ? {{16{vb}}, b} : {b, {16{vb}}};
      info = '{width: 1'b1, location: loc, value: vb};
      raw  = {b, a};
      hi = 1'b0; #1; checks++;
      if (val != va) begin failures++; $display("FAIL lo %h -> %h exp %h", raw, val, va); end
      hi = 1'b1; #1; checks++;
      if (val != vbv) begin failures++; $display("FAIL hi %h -> %h exp %h", raw, val, vbv); end
      info = '0; raw = $urandom; hi = 1'($urandom); #1; checks++;
      if (val != raw) begin failures++; $display("FAIL normal %h -> %h", raw, val); end
    end
    // example of the RBR scheme: register holds 0xfa25fa25 with bits 101
    info = '{width: 1'b1, location: 1'b0, value: 1'b1}; raw = 32'hfa25fa25;
    hi = 1'b0; #1; checks++; if (val != 32'hfa25ffff) failures++;
    hi = 1'b1; #1; checks++; if (val != 32'hfa25ffff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
