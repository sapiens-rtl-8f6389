// tb_match_accum: drives random SA outputs and checks each class counter
// against a reference sum (out_l + out_h in 2-bit mode, out_h in 1-bit mode),
// with the one-cycle register stage in between, and that clear zeroes it.
module tb_match_accum;
  logic clk = 0, rst_n = 0, clear = 0, capture = 0, mode_2b = 0;
  logic [31:0] sa_l, sa_h;
  logic [31:0][7:0] count;
  int ref_cnt [32];
  int checks = 0, failures = 0;

  match_accum dut (.clk, .rst_n, .clear, .capture, .mode_2b, .sa_l, .sa_h, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int j = 0; j < 32; j++) begin
      checks++;
      if (int'(count[j]) != ref_cnt[j]) begin
        failures++;
        $display("FAIL %s class %0d: %0d vs %0d", what, j, count[j], ref_cnt[j]);
      end
    end
  endtask

  initial begin
    sa_l = '0; sa_h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int steps;
      mode_2b = run[0];
      steps   = mode_2b ? 64 : 128;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      foreach (ref_cnt[j]) ref_cnt[j] = 0;
      compare("after clear");
      for (int s = 0; s < steps; s++) begin
        logic [31:0] h, l;
        h = $urandom; l = $urandom | h;       // thermometer: h implies l
        sa_h = h; sa_l = l; capture = 1;
        for (int j = 0; j < 32; j++)
          ref_cnt[j] += mode_2b ? (int'(l[j]) + int'(h[j])) : int'(h[j]);
        @(negedge clk);
        // idle gaps must not count
        if (s % 7 == 3) begin capture = 0; sa_h = '1; sa_l = '1; @(negedge clk); end
      end
      capture = 0;
      @(negedge clk);
      @(negedge clk);
      compare("end of run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
