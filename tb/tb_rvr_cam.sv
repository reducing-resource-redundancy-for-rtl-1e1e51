// tb_rvr_cam: checks the RVR CAM against a reference list. First the
// worked example: i1 writes X in P10 (miss, entry filled), ix writes X in
// P20 (hit naming P10, entry now holds P20), iy writes X in P30 (hit
// naming P20). Then random lookups from a small value pool, with
// invalidations by committing redefiners, checking hits, named registers
// and least-recently-filled replacement over the 8 entries.
module tb_rvr_cam;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_en = 0, lk_type = 0, hit;
  logic [31:0] lk_val = 0;
  logic [6:0] lk_preg = 0, hit_preg;
  logic [3:0] inv_en = 0;
  logic [3:0][6:0] inv_preg = '0;
  int checks = 0, failures = 0;

  rvr_cam #(.N(N), .NP(128), .NINV(4)) dut (.clk, .rst_n, .lk_en, .lk_val, .lk_type, .lk_preg,
    .hit_o(hit), .hit_preg_o(hit_preg), .inv_en, .inv_preg);

  bit          rv [N];
  logic [31:0] rval [N];
  logic [6:0]  rp [N];
  bit          rt [N];
  int          fptr = 0;

  task automatic lookup(logic [31:0] v, bit t, logic [6:0] p, int exp_preg);
    int found = -1;
    @(negedge clk);
    lk_en = 1; lk_val = v; lk_type = t; lk_preg = p; #1;
    for (int i = 0; i < N; i++) if (rv[i] && rval[i] == v && rt[i] == t) begin found = i; break; end
    checks++;
    if (hit != (found >= 0) || (found >= 0 && hit_preg != rp[found]) ||
        (exp_preg >= 0 && (!hit || hit_preg != 7'(exp_preg)))) begin
      failures++;
      $display("FAIL lookup %h: hit %b p%0d, model %0d", v, hit, hit_preg, found);
    end
    if (found >= 0) rp[found] = p;
    else begin rv[fptr] = 1; rval[fptr] = v; rp[fptr] = p; rt[fptr] = t; fptr = (fptr + 1) % N; end
    @(negedge clk); lk_en = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) rv[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup(32'h4048f5c3, 0, 7'd10, -1);
    lookup(32'h4048f5c3, 0, 7'd20, 10);
    checks++; if (dut.ent[0].preg != 7'd20) begin failures++; $display("FAIL entry id"); end
    lookup(32'h4048f5c3, 0, 7'd30, 20);
    for (int it = 0; it < 3000; it++) begin
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        for (int k = 0; k < 4; k++) begin
          inv_en[k] = $urandom_range(0, 1); inv_preg[k] = 7'($urandom_range(0, 15));
          if (inv_en[k]) for (int i = 0; i < N; i++) if (rp[i] == inv_preg[k]) rv[i] = 0;
        end
        @(negedge clk); inv_en = 0;
      end
      lookup(32'h12340000 + 32'($urandom_range(0, 11)), 1'($urandom_range(0, 1)),
             7'($urandom_range(0, 15)), -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
