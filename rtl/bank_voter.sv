// bank_voter: majority vote over the predictions of the sub-AM banks.
//
// Each active bank holds a copy of the same support set and produces its own
// best class; `vote` adds one vote for `vote_class`. The class with the most
// votes is on `winner` (combinational from the vote counters, through a
// comparator_tree); ties go to the lower class index, which is this design's
// choice. `clear` zeroes all counters before a new query.
module bank_voter #(
  parameter int N_CLASS = 32,
  parameter int N_BANK  = 8,
  localparam int CW = $clog2(N_CLASS),
  localparam int VW = $clog2(N_BANK + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          vote,
  input  logic [CW-1:0] vote_class,
  output logic [CW-1:0] winner,
  output logic [VW-1:0] winner_votes
);
  logic [N_CLASS-1:0][VW-1:0] votes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       votes <= '0;
    else if (clear)   votes <= '0;
    else if (vote && votes[vote_class] != '1)
      votes[vote_class] <= votes[vote_class] + 1'b1;
  end

  comparator_tree #(.N(N_CLASS), .W(VW)) u_tree (
    .val(votes), .max_val(winner_votes), .max_idx(winner)
  );
endmodule
