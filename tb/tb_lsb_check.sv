// tb_lsb_check: runs batches of memory instructions through the
// load/store buffer. Per batch: leading copies are dispatched, some of
// them generate their address early; trailing copies are dispatched in
// order and the chosen mode is checked against the rules (SHARE when the
// leading address is known, and for stores also a narrow value; DEPEND
// for a one-operand load; STALL for a two-operand load; SEP for other
// stores); trailing copies then broadcast a correct or a corrupted address
// and the fault flags are checked at broadcast (shared) or at commit
// (separate store entry). A flipped address bit after the store compare
// must be caught by the parity bit at commit.
module tb_lsb_check;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en = 0, ld_store = 0, ld_ok, la_en = 0, la_store = 0;
  logic td_en = 0, td_store = 0, td_two_src = 0, td_avail, tb_en = 0, tb_store = 0, tb_fault;
  logic c_load = 0, c_store = 0, c_fault;
  logic [4:0] ld_idx, la_idx = 0, td_idx, tb_idx = 0;
  logic [31:0] la_addr = 0, la_val = 0, tb_addr = 0, tb_val = 0;
  logic [1:0] td_mode;
  logic [2:0] tsb_used;
  int checks = 0, failures = 0;
  int n_share = 0, n_dep = 0, n_stall = 0, n_sep = 0;

  lsb_check #(.NLB(30), .NSB(30), .NSBT(5)) dut (.clk, .rst_n, .ld_en, .ld_store, .ld_ok_o(ld_ok),
    .ld_idx_o(ld_idx), .la_en, .la_store, .la_idx, .la_addr, .la_val, .td_en, .td_store, .td_two_src,
    .td_avail_o(td_avail), .td_mode_o(td_mode), .td_idx_o(td_idx), .tb_en, .tb_store, .tb_idx,
    .tb_addr, .tb_val, .tb_fault_o(tb_fault), .c_load, .c_store, .c_fault_o(c_fault),
    .tsb_used_o(tsb_used));

  typedef struct {
    bit st; bit two; bit agu; logic [4:0] idx; logic [31:0] addr; logic [31:0] val;
    int mode; bit bad;
  } op_t;
  op_t ops [8];

  function automatic logic is_narrow(logic [31:0] x);
    return x[31:16] == 16'h0 || x[31:16] == 16'hffff || x[15:0] == 16'h0 || x[15:0] == 16'hffff;
  endfunction

  task automatic agu(int i);
    @(negedge clk); la_en = 1; la_store = ops[i].st; la_idx = ops[i].idx;
    la_addr = ops[i].addr; la_val = ops[i].val;
    @(negedge clk); la_en = 0; ops[i].agu = 1;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit flip_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      automatic int n = $urandom_range(1, 8), nst = 0;
      for (int i = 0; i < n; i++) begin
        ops[i].st = $urandom_range(0, 1) && nst < 5; nst += ops[i].st;
        ops[i].two = $urandom_range(0, 3) == 0; ops[i].agu = 0;
        ops[i].addr = $urandom; ops[i].val = $urandom;
        if ($urandom_range(0, 1)) ops[i].val[31:16] = '0;
        ops[i].bad = $urandom_range(0, 5) == 0;
        @(negedge clk); ld_en = 1; ld_store = ops[i].st; #1;
        checks++; if (!ld_ok) begin failures++; $display("FAIL no room"); end
        ops[i].idx = ld_idx;
        @(negedge clk); ld_en = 0;
      end
      for (int i = 0; i < n; i++) if ($urandom_range(0, 1)) agu(i);
      // trailing dispatch in order
      for (int i = 0; i < n; i++) begin
        automatic int em;
        @(negedge clk); td_en = 1; td_store = ops[i].st; td_two_src = ops[i].two; #1;
        if (ops[i].st) em = (ops[i].agu && is_narrow(ops[i].val)) ? 0 : 3;
        else em = ops[i].agu ? 0 : (ops[i].two ? 2 : 1);
        checks++;
        if (!td_avail || td_mode != 2'(em) || td_idx != ops[i].idx) begin
          failures++; $display("FAIL td op%0d mode %0d exp %0d", i, td_mode, em);
        end
        case (em) 0: n_share++; 1: n_dep++; 2: n_stall++; default: n_sep++; endcase
        @(negedge clk); td_en = 0;
        if (em == 2) begin
          agu(i);
          @(negedge clk); td_en = 1; td_store = 0; td_two_src = 1; #1;
          checks++; if (td_mode != 2'd0) begin failures++; $display("FAIL after stall"); end
          em = 0; n_share++;
          @(negedge clk); td_en = 0;
        end
        ops[i].mode = em;
      end
      for (int i = 0; i < n; i++) if (!ops[i].agu) agu(i);
      // trailing broadcasts
      for (int i = 0; i < n; i++) begin
        @(negedge clk); tb_en = 1; tb_store = ops[i].st; tb_idx = ops[i].idx;
        tb_addr = ops[i].addr ^ (ops[i].bad ? 32'h10 : 32'h0); tb_val = ops[i].val; #1;
        checks++;
        if (tb_fault != (ops[i].bad && ops[i].mode != 3)) begin
          failures++; $display("FAIL tb op%0d fault %b bad %b mode %0d", i, tb_fault, ops[i].bad, ops[i].mode);
        end
        @(negedge clk); tb_en = 0;
      end
      // commit loads then stores
      for (int i = 0; i < n; i++) if (!ops[i].st) begin
        @(negedge clk); c_load = 1; @(negedge clk); c_load = 0;
      end
      for (int i = 0; i < n; i++) if (ops[i].st) begin
        automatic bit ef = ops[i].mode == 3 && ops[i].bad;
        @(negedge clk);
        if (!flip_done && ops[i].mode == 0) begin
          dut.sb_addr[ops[i].idx] = dut.sb_addr[ops[i].idx] ^ 32'h100; ef = 1; flip_done = 1;
        end
        c_store = 1; #1;
        checks++;
        if (c_fault != ef) begin failures++; $display("FAIL commit store op%0d fault %b exp %b", i, c_fault, ef); end
        @(negedge clk); c_store = 0;
      end
    end
    checks++;
    if (n_share == 0 || n_dep == 0 || n_stall == 0 || n_sep == 0 || !flip_done) begin
      failures++; $display("FAIL a mode never happened %0d %0d %0d %0d", n_share, n_dep, n_stall, n_sep);
    end
    $display("modes: share %0d depend %0d stall %0d sep %0d", n_share, n_dep, n_stall, n_sep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
