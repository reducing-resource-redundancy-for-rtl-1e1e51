// tb_commit_limiter: exhaustive check of the commit decision for four
// slots against a reference that walks the slots and spends a budget of
// four ROB entries (one per shared pair, two per separate pair). Also
// checks the three cases the scheme names: all shared -> 4, none shared
// -> 2, two or three shared -> 3.
module tb_commit_limiter;
  logic [3:0] ready, shared, take;
  logic [2:0] count;
  int checks = 0, failures = 0;

  commit_limiter #(.NSLOT(4), .BUDGET(4)) dut (
    .ready_i(ready), .shared_i(shared), .count_o(count), .take_o(take));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int s = 0; s < 16; s++) begin
        automatic int budget = 4, n = 0;
        automatic logic [3:0] et = '0;
        ready = 4'(r); shared = 4'(s); #1;
        for (int k = 0; k < 4; k++) begin
          automatic int cost = shared[k] ? 1 : 2;
          if (!ready[k] || cost > budget) break;
          budget -= cost; et[k] = 1'b1; n++;
        end
        checks++;
        if (count != 3'(n) || take != et) begin
          failures++;
          $display("FAIL r=%b s=%b: count %0d take %b, exp %0d %b", ready, shared, count, take, n, et);
        end
      end
    ready = 4'hf;
    shared = 4'b1111; #1; checks++; if (count != 4) failures++;
    shared = 4'b0000; #1; checks++; if (count != 2) failures++;
    shared = 4'b0011; #1; checks++; if (count != 3) failures++;
    shared = 4'b0111; #1; checks++; if (count != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
