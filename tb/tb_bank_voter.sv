// tb_bank_voter: casts random votes from up to 8 banks and checks the winner
// (most votes, lowest class on a tie) and its vote count.
module tb_bank_voter;
  logic clk = 0, rst_n = 0, clear = 0, vote = 0;
  logic [4:0] vote_class, winner;
  logic [3:0] winner_votes;
  int votes [32];
  int checks = 0, failures = 0;

  bank_voter dut (.clk, .rst_n, .clear, .vote, .vote_class, .winner, .winner_votes);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vote_class = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int nb, best, bi;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      foreach (votes[i]) votes[i] = 0;
      nb = 1 + $urandom % 8;
      for (int b = 0; b < nb; b++) begin
        vote_class = 5'((t % 2) ? ($urandom % 4) : ($urandom % 32));
        votes[vote_class]++;
        vote = 1;
        @(negedge clk);
        vote = 0;
        if (b % 3 == 1) @(negedge clk);
      end
      best = -1; bi = 0;
      for (int i = 0; i < 32; i++) if (votes[i] > best) begin best = votes[i]; bi = i; end
      checks++;
      if (int'(winner) != bi || int'(winner_votes) != best) begin
        failures++;
        $display("FAIL winner %0d (%0d votes) expected %0d (%0d)", winner, winner_votes, bi, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
