// tb_sense_ctrl: runs the inference sequencer alone. The testbench plays the
// comparator tree and the voter: for each bank it supplies a winner index and
// score. It checks, for random bank masks and both modes, the bank order, the
// number and order of sensing steps (64 or 128 per bank), the vote pulses,
// the recorded per-bank results and the latency 2 + banks * (N + 4).
module tb_sense_ctrl;
  import sapiens_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, mode_2b = 0;
  logic [127:0] query;
  logic [7:0]   bank_mask;
  logic         busy, done, mode_q, sense_en, acc_clear, acc_capture;
  logic         vote_clear, vote;
  logic [4:0]   class_out, max_idx, vote_class, winner;
  logic [7:0]   max_val;
  logic [7:0][4:0] bank_class;
  logic [7:0][7:0] bank_score;
  arr_op_t      op;
  logic [127:0] query_q;
  logic [6:0]   step;
  logic [2:0]   bank_sel;
  int checks = 0, failures = 0;

  sense_ctrl dut (.*);

  always #5 clk = ~clk;

  // per-bank answers provided by the testbench
  always_comb begin
    max_idx = 5'(bank_sel * 3 + 1);
    max_val = 8'(bank_sel + 100);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    query = '0; bank_mask = '0; winner = 5'd17;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int n, nb, cyc, sense_cycles, votes, exp_bank, bad_step, bad_bank;
      logic [7:0] m;
      m = (t == 0) ? 8'hFF : (t == 1) ? 8'h00 : 8'($urandom);
      n = (t % 2) ? 128 : 64;
      nb = $countones(m);
      winner = 5'($urandom);
      @(negedge clk);
      query = {$urandom, $urandom, $urandom, $urandom};
      bank_mask = m; mode_2b = (n == 64); start = 1;
      @(posedge clk);
      #1 start = 0;
      check(busy || m == 0, "busy after start");
      check(query_q == query, "query latched");
      cyc = 1; sense_cycles = 0; votes = 0; exp_bank = -1; bad_step = 0; bad_bank = 0;
      while (!done && cyc < 5000) begin
        if (sense_en) begin
          if (sense_cycles % n == 0) begin
            // a new bank starts: the next set bit of the mask
            for (int b = exp_bank + 1; b < 8; b++) if (m[b]) begin exp_bank = b; break; end
          end
          if (int'(step) != sense_cycles % n) bad_step++;
          if (int'(bank_sel) != exp_bank) bad_bank++;
          if (op != OP_SENSE) bad_step++;
          sense_cycles++;
        end
        if (vote) begin
          votes++;
          if (vote_class != 5'(bank_sel * 3 + 1)) bad_bank++;
        end
        @(posedge clk);
        #1 cyc++;
      end
      check(cyc == 2 + nb * (n + 4), $sformatf("latency %0d expected %0d", cyc, 2 + nb * (n + 4)));
      check(sense_cycles == nb * n, $sformatf("sense cycles %0d", sense_cycles));
      check(bad_step == 0, "step sequence");
      check(bad_bank == 0, "bank order");
      check(votes == nb, "votes");
      check(class_out == winner, "class_out");
      for (int b = 0; b < 8; b++) if (m[b]) begin
        check(bank_class[b] == 5'(b * 3 + 1) && bank_score[b] == 8'(b + 100), "bank record");
      end
      @(posedge clk);
      #1 check(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
