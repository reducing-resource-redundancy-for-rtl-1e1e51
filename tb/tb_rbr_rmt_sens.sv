// tb_rbr_rmt_sens: end-to-end test of rbr_rmt_top at the resource sizes of
// the sensitivity study the scheme was evaluated with, all other sizes at
// their defaults:
//   - 96 and 164 integer physical registers (default 128);
//   - load/store buffers of 32 and 24 entries. The base machine splits them
//     3:1 between the threads (24/8 and 18/6); with RBR the trailing load
//     part is dropped and the trailing store part halved (4 and 3), the
//     rest going to the leading thread: 32 load and 28 + 4 store entries,
//     24 load and 21 + 3 store entries. The same rule turns the default 40
//     into 40 load and 35 + 5 store entries.
//   - ROBs of 128 and 256 entries in total. With the leading section 64
//     entries larger than the trailing one and the trailing part halved for
//     RBR, the rest going to the leading thread, these are 112 + 16 and
//     208 + 48 entries (the default 192 gives 160 + 32 by the same rule).
// Each size is an independent rmt_system (unit plus driver,
// same checks as the full-size test) running a 3000-instruction program;
// the result line adds up their checks and failures. A watchdog ends the
// run if any of them does not finish.
module tb_rbr_rmt_sens;
  localparam int NCFG = 6, NPROG = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fl  [NCFG];

  rmt_system #(.NP(96),  .NPROG(NPROG))                        s_rf96  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  rmt_system #(.NP(164), .NPROG(NPROG))                        s_rf164 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  rmt_system #(.NLB(32), .NSB(28), .NSBT(4), .NPROG(NPROG))    s_lsb32 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  rmt_system #(.NLB(24), .NSB(21), .NSBT(3), .NPROG(NPROG))    s_lsb24 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  rmt_system #(.NL(112), .NT(16), .NPROG(NPROG))               s_rob128(.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  rmt_system #(.NL(208), .NT(48), .NPROG(NPROG))               s_rob256(.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]));

  function automatic int sum(input int a [NCFG]);
    int s = 0;
    for (int i = 0; i < NCFG; i++) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    @(posedge clk);
    for (int i = 0; i < NCFG; i++) $display("size %0d: checks %0d failures %0d", i, chk[i], fl[i]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fl));
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog: finished %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fl) + 1);
    $finish;
  end
endmodule
