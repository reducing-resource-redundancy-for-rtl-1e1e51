// tb_value_buffer: writes leading and trailing results into the value
// buffer and checks the commit compare: equal results compare clean and
// a corrupted trailing result is caught, both for a register shared by the
// two copies (single word, halves compared) and for separate registers
// (normal and narrow leading values, rebuilt before the compare).
module tb_value_buffer;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lw_en = 0, tw_en = 0, tw_shared = 0;
  logic [6:0] lw_idx = 0, tw_idx = 0;
  logic [31:0] lw_val = 0, tw_val = 0;
  logic [3:0][6:0] cmp_idx = '0;
  logic [3:0] cmp_shared = '0, mis;
  int checks = 0, failures = 0;

  value_buffer #(.N(N), .NCMP(4)) dut (.clk, .rst_n, .lw_en, .lw_idx, .lw_val, .tw_en, .tw_idx,
    .tw_shared, .tw_val, .cmp_idx, .cmp_shared, .cmp_mis_o(mis));

  function automatic logic is_narrow(logic [31:0] x);
    return x[31:16] == 16'h0 || x[31:16] == 16'hffff || x[15:0] == 16'h0 || x[15:0] == 16'hffff;
  endfunction
  function automatic logic [31:0] rnd(bit narrow);
    logic [31:0] r = $urandom;
    if (narrow) case ($urandom_range(0, 3))
      0: r[31:16] = '0; 1: r[31:16] = '1; 2: r[15:0] = '0; default: r[15:0] = '1;
    endcase
    return r;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      automatic int idx = $urandom_range(0, N - 1);
      automatic logic [31:0] v = rnd($urandom_range(0, 1));
      automatic bit sh = is_narrow(v) && $urandom_range(0, 1);
      automatic bit bad = $urandom_range(0, 3) == 0;
      automatic logic [31:0] tv = v;
      automatic int slot = $urandom_range(0, 3);
      if (bad) begin
        // corrupt a bit of the significant part so the shared compare can see it
        if (v[31:16] == '0 || v[31:16] == '1) tv[$urandom_range(0, 15)] ^= 1'b1;
        else tv[$urandom_range(16, 31)] ^= 1'b1;
      end
      @(negedge clk); lw_en = 1; lw_idx = 7'(idx); lw_val = v;
      @(negedge clk); lw_en = 0; tw_en = 1; tw_idx = 7'(idx); tw_val = tv; tw_shared = sh;
      @(negedge clk); tw_en = 0;
      cmp_idx[slot] = 7'(idx); cmp_shared[slot] = sh; #1;
      checks++;
      if (mis[slot] != bad) begin
        failures++;
        $display("FAIL idx %0d v %h tv %h shared %b: mis %b", idx, v, tv, sh, mis[slot]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
