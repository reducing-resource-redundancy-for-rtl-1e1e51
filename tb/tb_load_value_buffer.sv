// tb_load_value_buffer: leading loads write values, trailing loads look
// them up by the leading register identifier. Checks against a reference
// set: hits return the value and free the entry, misses wait, narrow
// values whose trailing copy is not renamed yet take no entry (LVBR), and
// a full buffer refuses writes that need an entry (the last free entry
// only to the oldest instruction in flight).
module tb_load_value_buffer;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_en = 0, w_tr_renamed = 0, w_oldest = 0, w_ok, w_skip, rd_en = 0, rd_hit;
  logic [6:0] w_preg = 0, rd_preg = 0;
  logic [31:0] w_val = 0, rd_val;
  logic [4:0] used;
  int checks = 0, failures = 0;

  load_value_buffer #(.N(N), .NP(128)) dut (.clk, .rst_n, .w_en, .w_preg, .w_val, .w_tr_renamed, .w_oldest,
    .w_ok_o(w_ok), .w_skip_o(w_skip), .rd_en, .rd_preg, .rd_hit_o(rd_hit), .rd_val_o(rd_val),
    .used_o(used));

  bit          mv [128];
  logic [31:0] mval [128];
  int          cnt = 0;

  function automatic logic is_narrow(logic [31:0] x);
    return x[31:16] == 16'h0 || x[31:16] == 16'hffff || x[15:0] == 16'h0 || x[15:0] == 16'hffff;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) mv[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        automatic logic [6:0] p = 7'($urandom);
        automatic bit skip;
        w_val = $urandom;
        if ($urandom_range(0, 2) == 0) w_val[31:16] = '0;
        w_preg = p; w_tr_renamed = $urandom_range(0, 1); w_oldest = $urandom_range(0, 1);
        skip = is_narrow(w_val) && !w_tr_renamed;
        if (!mv[p]) begin
          w_en = 1; #1;
          checks++;
          if (w_skip != skip || w_ok != (skip || cnt < N - 1 || (cnt < N && w_oldest))) begin
            failures++; $display("FAIL write p%0d skip %b ok %b cnt %0d", p, w_skip, w_ok, cnt);
          end
          if (!skip && (cnt < N - 1 || (cnt < N && w_oldest))) begin mv[p] = 1; mval[p] = w_val; cnt++; end
        end
      end else begin
        automatic logic [6:0] p = 7'($urandom);
        rd_en = 1; rd_preg = p; #1;
        checks++;
        if (rd_hit != mv[p] || (mv[p] && rd_val != mval[p])) begin
          failures++; $display("FAIL read p%0d hit %b val %h", p, rd_hit, rd_val);
        end
        if (mv[p]) begin mv[p] = 0; cnt--; end
      end
      @(posedge clk); #1; w_en = 0; rd_en = 0;
      checks++;
      if (used != 5'(cnt)) begin failures++; $display("FAIL used %0d exp %0d", used, cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
