// tb_rbr_regfile: drives the RBR register file with leading and trailing
// writes and compares every read with a reference model that keeps the
// full 32-bit values of both copies. Covers the 0xfa25ffff example
// (register holds 0xfa25fa25 after both copies wrote), shared narrow
// registers read through either half, normal values, trailing results of
// the wrong size (must flag a fault) and the status-bit parity.
module tb_rbr_regfile;
  import rbr_pkg::*;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lw_en = 0, tw_en = 0, tw_shared = 0;
  logic [6:0] lw_preg = 0, tw_preg = 0;
  logic [31:0] lw_val = 0, tw_val = 0;
  size_info_t lw_info;
  logic tw_fault;
  logic [1:0][6:0] rd_preg;
  logic [1:0] rd_hi, rd_perr;
  logic [1:0][31:0] rd_val;
  int checks = 0, failures = 0;

  rbr_regfile #(.N(N), .NRD(2)) dut (.*, .lw_info_o(lw_info), .tw_fault_o(tw_fault));

  logic [31:0] ref_l [N];
  logic [31:0] ref_t [N];
  logic        shared [N];

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

  task automatic expect_read(int p, bit hi, logic [31:0] e, string what);
    rd_preg[0] = 7'(p); rd_hi[0] = hi; #1;
    checks++;
    if (rd_val[0] !== e || rd_perr[0]) begin
      failures++;
      $display("FAIL %s p%0d hi=%0b: %h exp %h perr=%b", what, p, hi, rd_val[0], e, rd_perr[0]);
    end
  endtask

  task automatic lwrite(int p, logic [31:0] v);
    @(negedge clk); lw_en = 1; lw_preg = 7'(p); lw_val = v;
    @(negedge clk); lw_en = 0;
    ref_l[p] = v; ref_t[p] = v; shared[p] = 0;
  endtask

  task automatic twrite(int p, bit sh, logic [31:0] v, output bit fault);
    @(negedge clk); tw_en = 1; tw_preg = 7'(p); tw_shared = sh; tw_val = v; #1;
    fault = tw_fault;
    @(negedge clk); tw_en = 0;
    if (sh) begin ref_t[p] = v; shared[p] = 1; end
    else begin ref_l[p] = v; ref_t[p] = v; shared[p] = 0; end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit f;
    rd_preg = '0; rd_hi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin ref_l[i] = 0; ref_t[i] = 0; shared[i] = 0; end
    // worked example: P10
    lwrite(10, 32'hfa25ffff);
    checks++;
    if (dut.data[10][15:0] != 16'hfa25) begin failures++; $display("FAIL P10 low half"); end
    twrite(10, 1, 32'hfa25ffff, f);
    checks++;
    if (dut.data[10] != 32'hfa25fa25 || f) begin failures++; $display("FAIL P10 %h", dut.data[10]); end
    checks++;
    if ({dut.info[10].width, dut.info[10].location, dut.info[10].value} != 3'b101) failures++;
    expect_read(10, 0, 32'hfa25ffff, "example lo");
    expect_read(10, 1, 32'hfa25ffff, "example hi");
    // random traffic
    for (int it = 0; it < 1500; it++) begin
      automatic int p = $urandom_range(0, N - 1);
      automatic logic [31:0] v = rnd($urandom_range(0, 2) != 0);
      lwrite(p, v);
      expect_read(p, 0, v, "leading");
      if (is_narrow(v) && $urandom_range(0, 1)) begin
        // trailing copy shares the register; usually the same result
        automatic bit bad = ($urandom_range(0, 7) == 0);
        automatic logic [31:0] tv = bad ? rnd($urandom_range(0, 1)) : v;
        bit exp_fault;
        size_info_t a, b;
        a = '{width: 1, location: (v[31:16] == '0 || v[31:16] == '1),
              value: (v[31:16] == '0 || v[31:16] == '1) ? v[31] : v[0]};
        b = '{width: is_narrow(tv), location: (tv[31:16] == '0 || tv[31:16] == '1),
              value: (tv[31:16] == '0 || tv[31:16] == '1) ? tv[31] : tv[0]};
        exp_fault = !b.width || a.location != b.location || a.value != b.value;
        twrite(p, 1, tv, f);
        checks++;
        if (f != exp_fault) begin failures++; $display("FAIL fault %h/%h: %b", v, tv, f); end
        if (!exp_fault) begin
          expect_read(p, 1, tv, "trailing");
          expect_read(p, 0, v, "leading after trailing");
        end
      end else if ($urandom_range(0, 1)) begin
        automatic int q = $urandom_range(0, N - 1);
        automatic logic [31:0] tv = rnd($urandom_range(0, 1));
        twrite(q, 0, tv, f);
        expect_read(q, 0, tv, "trailing own");
      end
    end
    // parity: flip a status bit and expect a parity error
    @(negedge clk);
    dut.info[10].value = ~dut.info[10].value;
    rd_preg[1] = 7'd10; rd_hi[1] = 0; #1; checks++;
    if (!rd_perr[1]) begin failures++; $display("FAIL parity not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
