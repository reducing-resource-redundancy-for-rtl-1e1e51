// commit_limiter: decides how many instruction pairs commit this cycle.
//
// Commit reads at most BUDGET ROB entries per cycle. A pair whose trailing
// copy shares the leading copy's ROB entry costs one entry; a pair with a
// separate trailing entry costs two. Pairs are taken in program order from
// the head while they are ready and fit, up to NSLOT pairs. With BUDGET=4
// this commits four distinct instructions when all four share their entry,
// three when two or three of them do (if the order allows), and two when
// none does. The limit of four follows the RBR ROB scheme. The scheme
// decides the count one cycle ahead of commit; here it is combinational
// and the ROB registers nothing extra, a simplification of this design.
module commit_limiter #(
  parameter int NSLOT  = 4,
  parameter int BUDGET = 4,
  localparam int CW    = $clog2(NSLOT + 1)
) (
  input  logic [NSLOT-1:0] ready_i,   // pair k is complete
  input  logic [NSLOT-1:0] shared_i,  // pair k uses one ROB entry
  output logic [CW-1:0]    count_o,   // pairs committed: the first count_o
  output logic [NSLOT-1:0] take_o     // take_o[k]: pair k commits
);
  int  used;
  logic stop;

  always_comb begin
    used    = 0;
    stop    = 1'b0;
    count_o = '0;
    take_o  = '0;
    for (int k = 0; k < NSLOT; k++) begin
      if (!stop && ready_i[k] && (used + (shared_i[k] ? 1 : 2)) <= BUDGET) begin
        used      = used + (shared_i[k] ? 1 : 2);
        take_o[k] = 1'b1;
        count_o   = count_o + 1'b1;
      end else begin
        stop = 1'b1;
      end
    end
  end
endmodule
