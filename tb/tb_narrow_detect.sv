// tb_narrow_detect: checks the narrow-value classification against a
// reference that tests each half bit by bit. Directed values include the
// 0xfa25ffff example (status bits 1,0,1, significant part 0xfa25) and
// the corner cases where both halves qualify; then random values, with a
// bias towards narrow ones.
module tb_narrow_detect;
  import rbr_pkg::*;
  logic [31:0] v;
  size_info_t  info;
  logic [15:0] sig;
  int checks = 0, failures = 0;

  narrow_detect dut (.val_i(v), .info_o(info), .sig_o(sig));

  function automatic logic all_same(logic [15:0] h, logic b);
    for (int i = 0; i < 16; i++) if (h[i] != b) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(logic [31:0] x);
    logic [2:0] exp_bits; logic [15:0] exp_sig;
    v = x; #1;
    if (all_same(x[31:16], 1'b0))      begin exp_bits = 3'b110; exp_sig = x[15:0];  end
    else if (all_same(x[31:16], 1'b1)) begin exp_bits = 3'b111; exp_sig = x[15:0];  end
    else if (all_same(x[15:0], 1'b0))  begin exp_bits = 3'b100; exp_sig = x[31:16]; end
    else if (all_same(x[15:0], 1'b1))  begin exp_bits = 3'b101; exp_sig = x[31:16]; end
    else                               begin exp_bits = 3'b000; exp_sig = x[15:0];  end
    checks++;
    if ({info.width, info.location, info.value} != exp_bits ||
        (exp_bits[2] && sig != exp_sig)) begin
      failures++;
      $display("FAIL %h: bits %b%b%b sig %h, expected %b %h", x, info.width, info.location,
               info.value, sig, exp_bits, exp_sig);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hfa25ffff);
    if (!(info.width && !info.location && info.value && sig == 16'hfa25)) failures++;
    checks++;
    check(32'h0000ffff); check(32'hffff0000); check(32'h00000000); check(32'hffffffff);
    check(32'h3f000000); check(32'h00001234); check(32'hffff8000); check(32'h12345678);
    check(32'h0001ffff); check(32'hfffe0000);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom;
      case ($urandom_range(0, 4))
        0: r[31:16] = '0;
        1: r[31:16] = '1;
        2: r[15:0]  = '0;
        3: r[15:0]  = '1;
        default: ;
      endcase
      check(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
