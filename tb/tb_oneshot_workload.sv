// tb_oneshot_workload: a 32-way one-shot classification run in the spirit of
// the published experiments. A random support set of 32 classes is loaded
// into all 8 banks, then every bank gets its own sprinkling of flipped
// devices (12 of 128 cells per vector, standing in for programming
// variation), so banks can disagree. The classes share a common base vector. 96 noisy queries (3 per class) are classified with
// 3, 4, ..., 8 voting banks in 2-bit mode, and 32 more in 1-bit mode with
// 8 banks. Every per-bank winner, score and vote is checked against a
// reference model of the stored (disturbed) data; the accuracy against the
// true class is printed for each bank count.
module tb_oneshot_workload;
  import sapiens_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_valid = 0, prog_ready, prog_done, prog_fail;
  prog_cmd_t prog_cmd = CMD_WRITE;
  logic [4:0] prog_class = '0;
  logic [7:0] prog_bank_mask = '0;
  logic [31:0][2:0] prog_levels = '0;
  logic [31:0] prog_pulses, prog_form_steps;
  logic prog_clipped, inf_clipped;
  logic inf_valid = 0, inf_ready, inf_done, inf_mode_2b = 1;
  logic [31:0][2:0] inf_levels = '0;
  logic [7:0] inf_bank_mask = '1;
  logic [4:0] inf_class;
  logic [7:0][4:0] inf_bank_class;
  logic [7:0][7:0] inf_bank_score;
  logic [11:0] sa_vdd_mv = 12'd1000;
  logic [19:0] sa_rchg_ohm = 20'd7000;
  int checks = 0, failures = 0;

  sapiens_top #(.SET_CYCLES(3), .RESET_CYCLES(5), .FORM_CYCLES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [127:0] therm(input logic [31:0][2:0] lv);
    logic [127:0] v;
    logic [95:0]  flat;
    flat = lv;
    v = '0;
    for (int e = 0; e < 32; e++) begin
      v = v | (128'((1 << int'(flat[2:0])) - 1) << (4 * e));
      flat = flat >> 3;
    end
    return v;
  endfunction

  logic [31:0][2:0] feat_lv [32];
  logic [127:0]     store [8][32];

  initial begin
    int correct [9], total [9], disagree;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (correct[i]) begin correct[i] = 0; total[i] = 0; end
    disagree = 0;
    dut.u_array.form_all();
    // classes are close to each other: each is a common base with 12
    // elements redrawn, which makes the task hard enough for banks to differ
    for (int e = 0; e < 32; e++) feat_lv[0][e] = 3'($urandom_range(4, 0));
    for (int c = 31; c >= 0; c--) begin
      feat_lv[c] = feat_lv[0];
      for (int k = 0; k < 12; k++) feat_lv[c][$urandom_range(31, 0)] = 3'($urandom_range(4, 0));
      for (int b = 0; b < 8; b++) begin
        logic [127:0] v;
        v = therm(feat_lv[c]);
        for (int k = 0; k < 12; k++) v[$urandom_range(127, 0)] ^= 1'b1;   // per-bank variation
        store[b][c] = v;
        dut.u_array.write_row(8 * c + b, v);
      end
    end

    for (int t = 0; t < 128; t++) begin
      int nb, cls, n, cyc, votes [32], bv, vc;
      logic [7:0] m;
      logic [31:0][2:0] lv;
      logic [127:0] q;
      logic m2;
      cls = t % 32;
      if (t < 96) begin nb = 3 + (t % 6); m2 = 1'b1; end
      else begin nb = 8; m2 = 1'b0; end
      m = 8'((1 << nb) - 1);
      n = m2 ? 64 : 128;
      lv = feat_lv[cls];
      for (int k = 0; k < 24; k++) begin
        int e;
        e = $urandom_range(31, 0);
        lv[e] = (lv[e] == 3'd4) ? 3'd3 : (lv[e] == 3'd0) ? 3'd1 : ($urandom_range(1, 0) == 1) ? lv[e] + 3'd1 : lv[e] - 3'd1;
      end
      q = therm(lv);
      @(negedge clk);
      inf_levels = lv; inf_bank_mask = m; inf_mode_2b = m2; inf_valid = 1;
      @(posedge clk);
      #1 inf_valid = 0;
      cyc = 1;
      while (!inf_done && cyc < 20000) begin @(posedge clk); #1 cyc++; end
      check(cyc == 2 + nb * (n + 4), "latency");
      foreach (votes[i]) votes[i] = 0;
      for (int b = 0; b < nb; b++) begin
        int bs, bc, s;
        bs = -1; bc = 0;
        for (int c = 0; c < 32; c++) begin
          s = $countones(~(q ^ store[b][c]));
          if (s > bs) begin bs = s; bc = c; end
        end
        votes[bc]++;
        check(int'(inf_bank_class[b]) == bc && int'(inf_bank_score[b]) == bs, $sformatf("query %0d bank %0d", t, b));
        if (bc != int'(inf_class)) disagree++;
      end
      bv = -1; vc = 0;
      for (int c = 0; c < 32; c++) if (votes[c] > bv) begin bv = votes[c]; vc = c; end
      check(int'(inf_class) == vc, $sformatf("query %0d vote", t));
      total[nb]++;
      if (int'(inf_class) == cls) correct[nb]++;
    end
    for (int b = 3; b <= 8; b++)
      $display("banks %0d: %0d of %0d queries classified as their true class", b, correct[b], total[b]);
    $display("per-bank answers that differed from the vote: %0d", disagree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
